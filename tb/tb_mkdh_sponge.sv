// tb_mkdh_sponge: self-checking test of the MKDH sponge hash.
//
// Messages of 0, 3, 135, 136 (full last block, so a padding-only block follows), 137, 300
// and 500 bytes are fed block by block and the digests compared with the reference sponge;
// the empty message and "abc" are also checked against the published SHA3-256 digests.
// A second squeeze (out_next) is checked against one more reference permutation.
// Timing: out_valid must be seen 25 cycles after the clock edge that takes the last block
// (one edge to absorb, 24 rounds; 50 when a padding block follows), and 25 after out_next.
module tb_mkdh_sponge;
  import hcp_ref_pkg::*;

  localparam int RATE = 1088;
  localparam int RB   = RATE / 8;

  logic            clk = 0, rst_n = 0;
  logic            in_valid = 0, in_ready, in_last = 0, out_valid, out_next = 0, busy;
  logic [RATE-1:0] in_block = '0;
  logic [7:0]      in_bytes = '0;
  logic [255:0]    out_data;
  int checks = 0, failures = 0, pad_blocks = 0;

  mkdh_sponge #(.RATE(RATE), .OUT_BITS(256)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_block(in_block),
    .in_last(in_last), .in_bytes(in_bytes), .out_valid(out_valid), .out_data(out_data),
    .out_next(out_next), .busy(busy)
  );

  always #5 clk = ~clk;

  task automatic expect_eq(logic [255:0] got, logic [255:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic hash(byte unsigned msg [$], output logic [255:0] dig);
    int pos = 0, n, cyc, exp_cyc;
    bit last;
    do begin
      n = (msg.size() - pos > RB) ? RB : msg.size() - pos;
      last = (pos + n == msg.size());
      @(negedge clk);
      in_valid = 1; in_last = last; in_bytes = 8'(n);
      in_block = '0;
      for (int i = 0; i < n; i++) in_block[8*i +: 8] = msg[pos + i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      pos += n;
      @(negedge clk);
      in_valid = 0;
    end while (!last);
    exp_cyc = (n == RB) ? 50 : 25;
    if (n == RB) pad_blocks++;
    cyc = 1;
    while (!out_valid) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL latency %0d exp %0d (len %0d)", cyc, exp_cyc, msg.size());
    end
    dig = out_data;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned m [$];
    logic [255:0] d;
    int lens [7] = '{0, 3, 135, 136, 137, 300, 500};
    kstate_t s;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    hash(m, d);
    expect_eq(d, 256'h4a43f8804b0ad882fa493be44dff80f562d661a05647c15166d71ebff8c6ffa7, "sha3('')");
    m = '{8'h61, 8'h62, 8'h63};
    hash(m, d);
    expect_eq(d, 256'h3215431145e2bf465b529d3e6e085f85bd90d36b2d175c04b225e24fa75d983a, "sha3(abc)");
    foreach (lens[li]) begin
      m.delete();
      for (int i = 0; i < lens[li]; i++) m.push_back(8'($urandom));
      hash(m, d);
      s = sponge_state(m, RB);
      expect_eq(d, first_256(s), $sformatf("len %0d", lens[li]));
    end
    // second squeeze of the last message
    @(negedge clk);
    out_next = 1;
    @(negedge clk);
    out_next = 0;
    cyc = 1;
    while (!out_valid) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 25) begin failures++; $display("FAIL squeeze latency %0d", cyc); end
    expect_eq(out_data, first_256(keccak_f(s)), "second squeeze");
    checks++;
    if (pad_blocks == 0) begin failures++; $display("FAIL no padding-only block"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
