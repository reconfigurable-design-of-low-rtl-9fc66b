// ecc_arith_unit: the arithmetic unit of the ECC processor.
//
// Performs one GF(2^M) operation per clock on two field elements read from the memory unit:
//   AU_MUL   y = a * b mod f(x)  -- flexible multiplier in carry-less mode, then reduction
//   AU_ADD   y = a + b          -- bitwise XOR
//   AU_MOVA  y = a              -- copy
// Squaring is a multiplication with a = b. The unit is combinational; the result is written
// back into the memory unit at the next clock edge. The multiplier is the one the design
// centres on; the adder, the copy and the reduction step are this design's own additions.
module ecc_arith_unit
  import hcp_pkg::*;
#(
  parameter int unsigned  M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  au_op_e       op,
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);
  logic [2*M-1:0] prod;
  logic [M-1:0]   red;

  flex_mult #(.W(M)) u_mult (
    .gf_mode(1'b1),
    .a      (a),
    .b      (b),
    .p      (prod)
  );

  gf2m_reduce #(.M(M), .POLY(POLY)) u_red (
    .c(prod[2*M-2:0]),
    .r(red)
  );

  always_comb begin
    unique case (op)
      AU_MUL:  y = red;
      AU_ADD:  y = a ^ b;
      AU_MOVA: y = a;
      default: y = a;
    endcase
  end
endmodule
