// ecc_processor: elliptic-curve scalar multiplier over GF(2^M).
//
// Computes x(k*P) on the binary curve y^2 + xy = x^3 + ax^2 + b from the x coordinate of P,
// the scalar k and the coefficient b. It is built from the three units the design names:
// the memory unit (ecc_memory, eight field registers), the control unit (ecc_control,
// Montgomery ladder and Itoh-Tsujii inversion) and the arithmetic unit (ecc_arith_unit,
// built around the Booth/Wallace/CLA flexible multiplier). One field operation per clock.
// Interface: pulse start with k, x_in and b_in valid; x_in and b_in are read during the
// first two cycles of the operation and must stay valid until then. done pulses one cycle
// with x_out valid (held until the next operation) and inf set when k*P is the point at
// infinity. Latency is 188 + 14*t cycles for M = 163, t being the top set bit of k.
module ecc_processor
  import hcp_pkg::*;
#(
  parameter int unsigned  M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic [M-1:0] x_in,
  input  logic [M-1:0] b_in,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] x_out,
  output logic         inf
);
  uop_t         uop;
  logic         we, last_op;
  logic [M-1:0] rda, rdb, au_y, wd;

  ecc_control #(.M(M)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .k       (k),
    .opa_zero(rda == '0),
    .uop     (uop),
    .we      (we),
    .busy    (busy),
    .done    (done),
    .inf     (inf),
    .last_op (last_op)
  );

  ecc_memory #(.M(M), .DEPTH(8)) u_mem (
    .clk(clk),
    .we (we),
    .wa (uop.dst),
    .wd (wd),
    .ra (uop.sa),
    .rda(rda),
    .rb (uop.sb),
    .rdb(rdb)
  );

  ecc_arith_unit #(.M(M), .POLY(POLY)) u_au (
    .op(uop.op),
    .a (rda),
    .b (rdb),
    .y (au_y)
  );

  always_comb begin
    unique case (uop.wsel)
      WS_AU:   wd = au_y;
      WS_X:    wd = x_in;
      WS_B:    wd = b_in;
      default: wd = M'(1);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_out <= '0;
    else if (start && !busy) x_out <= '0;
    else if (last_op) x_out <= au_y;
  end
endmodule
