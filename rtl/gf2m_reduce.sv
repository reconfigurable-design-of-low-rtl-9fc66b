// gf2m_reduce: reduction of a carry-less product modulo the field polynomial.
//
// Input c is a polynomial of degree up to 2M-2; output r = c mod f(x), with
// f(x) = x^M + POLY(x). Each set coefficient above x^(M-1), from the top down, is cancelled
// by XORing a shifted copy of f. The loop unrolls into an XOR network, which is sparse for
// the trinomials and pentanomials recommended for binary fields. Combinational.
// The reduction step is this design's own: the document gives only the field.
module gf2m_reduce #(
  parameter int unsigned M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9)
) (
  input  logic [2*M-2:0] c,
  output logic [M-1:0]   r
);
  always_comb begin
    logic [2*M-2:0] t;
    t = c;
    for (int i = 2 * M - 2; i >= int'(M); i--) begin
      if (t[i]) t[i-M +: M+1] = t[i-M +: M+1] ^ {1'b1, POLY};
    end
    r = t[M-1:0];
  end
endmodule
