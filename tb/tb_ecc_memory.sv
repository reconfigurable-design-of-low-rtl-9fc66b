// tb_ecc_memory: self-checking test of the ECC register file.
//
// Writes random words through the write port and reads them back on both read ports,
// checking against a shadow array; also checks that a read of the address being written
// returns the old word until the clock edge.
module tb_ecc_memory;
  localparam int M = 163;
  localparam int DEPTH = 8;

  logic         clk = 0;
  logic         we;
  logic [2:0]   wa, ra, rb;
  logic [M-1:0] wd, rda, rdb;
  logic [M-1:0] shadow [DEPTH];
  logic [DEPTH-1:0] written = '0;
  int checks = 0, failures = 0;

  ecc_memory #(.M(M), .DEPTH(DEPTH)) dut (
    .clk(clk), .we(we), .wa(wa), .wd(wd), .ra(ra), .rda(rda), .rb(rb), .rdb(rdb)
  );

  always #5 clk = ~clk;

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] v;
    for (int i = 0; i < M; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; ra = 0; rb = 0; wd = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; wa = 3'(i); wd = rnd();
      shadow[i] = wd;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 3'($urandom); wd = rnd();
      ra = 3'($urandom); rb = wa;
      #1;
      checks += 2;
      if (rda !== shadow[ra]) begin failures++; $display("FAIL port a addr %0d", ra); end
      if (rdb !== shadow[rb]) begin failures++; $display("FAIL port b old value addr %0d", rb); end
      @(posedge clk);
      if (we) shadow[wa] = wd;
      #1;
      checks++;
      if (rdb !== shadow[rb]) begin failures++; $display("FAIL port b new value addr %0d", rb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
