// cla_adder: carry-lookahead adder, the final stage of the flexible multiplier.
//
// Generate and propagate signals are combined by a parallel-prefix (Kogge-Stone) network,
// so every carry is looked ahead in log2(W) levels instead of rippling. carry_en = 0 turns
// every generate term off: no carry is then produced and the sum is the bitwise XOR of the
// operands, which is addition in GF(2)[x]. Purely combinational.
// The document names a CLA for the last addition; the prefix form is this design's choice.
module cla_adder #(
  parameter int unsigned W = 328
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         carry_en,
  output logic [W-1:0] sum
);
  logic [W-1:0] g, p, gg, pp, gn, pn;
  logic [W-1:0] c;

  always_comb begin
    g  = a & b & {W{carry_en}};
    p  = a ^ b;
    gg = g;
    pp = p;
    for (int d = 1; d < W; d = d * 2) begin
      gn = gg;
      pn = pp;
      for (int i = d; i < W; i++) begin
        gn[i] = gg[i] | (pp[i] & gg[i-d]);
        pn[i] = pp[i] & pp[i-d];
      end
      gg = gn;
      pp = pn;
    end
    c[0] = cin & carry_en;
    for (int i = 1; i < W; i++) c[i] = gg[i-1] | (pp[i-1] & cin & carry_en);
    sum = p ^ c;
  end
endmodule
