// tb_flex_mult: self-checking test of the Booth / Wallace / CLA flexible multiplier.
//
// Three instances (W = 163, the field size; W = 8 and W = 16, odd/even digit counts) are
// driven with corner values and random operands in both modes. Integer products are
// compared with the simulator's own multiplication, carry-less products with a bit-serial
// XOR model. The multiplier is combinational, so each check is made 1 ns after the inputs.
module tb_flex_mult;
  localparam int W = 163;

  logic           mode;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  logic [7:0]     a8, b8;
  logic [15:0]    p8;
  logic [15:0]    a16, b16;
  logic [31:0]    p16;
  int checks = 0, failures = 0;

  flex_mult #(.W(W))  dut     (.gf_mode(mode), .a(a),   .b(b),   .p(p));
  flex_mult #(.W(8))  dut8    (.gf_mode(mode), .a(a8),  .b(b8),  .p(p8));
  flex_mult #(.W(16)) dut16   (.gf_mode(mode), .a(a16), .b(b16), .p(p16));

  function automatic logic [2*W-1:0] clmul(logic [W-1:0] x, logic [W-1:0] y);
    logic [2*W-1:0] r = '0;
    for (int i = 0; i < W; i++) if (y[i]) r ^= ({{W{1'b0}}, x} << i);
    return r;
  endfunction

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom;   // top word partially used
    return v;
  endfunction

  task automatic check_big(logic m, logic [W-1:0] x, logic [W-1:0] y);
    logic [2*W-1:0] exp;
    mode = m; a = x; b = y;
    #1;
    exp = m ? clmul(x, y) : ({{W{1'b0}}, x} * {{W{1'b0}}, y});
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 5) $display("FAIL W=%0d mode=%0d a=%h b=%h got %h exp %h", W, m, x, y, p, exp);
    end
  endtask

  task automatic check_small(logic m);
    logic [15:0] e8;
    logic [31:0] e16;
    a8 = 8'($urandom); b8 = 8'($urandom); a16 = 16'($urandom); b16 = 16'($urandom);
    mode = m;
    #1;
    e8 = 0; e16 = 0;
    if (m) begin
      for (int i = 0; i < 8; i++)  if (b8[i])  e8  ^= 16'(a8) << i;
      for (int i = 0; i < 16; i++) if (b16[i]) e16 ^= 32'(a16) << i;
    end else begin
      e8  = 16'(a8) * 16'(b8);
      e16 = 32'(a16) * 32'(b16);
    end
    checks += 2;
    if (p8 !== e8)   begin failures++; $display("FAIL W=8 mode=%0d %h*%h got %h exp %h", m, a8, b8, p8, e8); end
    if (p16 !== e16) begin failures++; $display("FAIL W=16 mode=%0d %h*%h got %h exp %h", m, a16, b16, p16, e16); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      check_big(m[0], '0, '1);
      check_big(m[0], '1, '1);
      check_big(m[0], '1, 163'h1);
      check_big(m[0], {1'b1, {(W-1){1'b0}}}, {1'b1, {(W-1){1'b0}}});
      check_big(m[0], 163'h5555_5555_5555, '1);
      for (int i = 0; i < 300; i++) check_big(m[0], rnd(), rnd());
      for (int i = 0; i < 500; i++) check_small(m[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
