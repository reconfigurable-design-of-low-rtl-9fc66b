// tb_ecc_processor: self-checking test of the ECC processor (memory, control and
// arithmetic units together) on the NIST B-163 curve.
//
// For each scalar k the x coordinate of k*G from the processor is compared with the
// reference double-and-add scalar multiplication in affine coordinates (hcp_ref_pkg).
// Cases: k = 0 and k = n (point at infinity), k = 1, 2, 3, n - 1, small and random k, and
// a base point other than G. The latency is checked against the schedule of the control
// unit: 1 + 7 + 14*t + 180 cycles from start to done, t the top set bit of k (M = 163).
module tb_ecc_processor;
  import hcp_pkg::*;
  import hcp_ref_pkg::*;

  localparam fe_t ORDER = 163'h4_0000_0000_0000_0000_0002_92FE_77E7_0C12_A423_4C33;

  logic clk = 0, rst_n = 0, start = 0;
  fe_t  k, x_in, x_out;
  logic busy, done, inf;
  int checks = 0, failures = 0;
  int ones = 0, zeros = 0;

  ecc_processor #(.M(163), .POLY(163'hC9)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .k(k), .x_in(x_in), .b_in(CURVE_B),
    .busy(busy), .done(done), .x_out(x_out), .inf(inf)
  );

  always #5 clk = ~clk;

  // ladder branch counters
  always @(posedge clk)
    if (dut.u_ctrl.state == dut.u_ctrl.S_LADDER && dut.u_ctrl.step == 0) begin
      if (dut.u_ctrl.lbit) ones++; else zeros++;
    end

  function automatic fe_t rnd();
    fe_t v;
    for (int i = 0; i < 163; i += 32) v[i +: 32] = $urandom;
    v[162] = 1'b0;
    return v;
  endfunction

  task automatic run(fe_t kk, point_t p);
    point_t q;
    int cyc, t;
    q = pt_mul(kk, p);
    @(negedge clk);
    k = kk; x_in = p.x; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    checks += 2;
    if (inf !== q.inf) begin
      failures++;
      $display("FAIL k=%h inf=%0d exp %0d", kk, inf, q.inf);
    end
    if (!q.inf && x_out !== q.x) begin
      failures++;
      $display("FAIL k=%h x=%h exp %h", kk, x_out, q.x);
    end
    if (kk != 0) begin
      t = 0;
      for (int i = 0; i < 163; i++) if (kk[i]) t = i;
      checks++;
      if (cyc != 1 + 7 + 14 * t + 180) begin
        failures++;
        $display("FAIL k=%h latency %0d exp %0d", kk, cyc, 1 + 7 + 14 * t + 180);
      end
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    point_t g, p2;
    g = base_point();
    k = '0; x_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    checks++;
    if (!pt_mul(ORDER, g).inf) begin failures++; $display("FAIL reference order"); end
    run(163'd0, g);
    run(163'd1, g);
    run(163'd2, g);
    run(163'd3, g);
    run(163'd1000, g);
    run(ORDER - 1, g);
    run(ORDER, g);
    for (int i = 0; i < 4; i++) run(rnd(), g);
    p2 = pt_mul(163'd987654321, g);
    run(rnd(), p2);
    checks++;
    if (ones == 0 || zeros == 0) begin failures++; $display("FAIL ladder branches %0d %0d", ones, zeros); end
    $display("ladder steps: bit1 %0d bit0 %0d", ones, zeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
