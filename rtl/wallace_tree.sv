// wallace_tree: reduces N partial-product rows to two rows with layers of 3:2 compressors.
//
// Each layer groups the rows in threes; every group becomes a sum row (a^b^c) and a carry
// row (majority, shifted one place left); leftover rows pass to the next layer. The number
// of layers is fixed at elaboration (about log1.5(N/2)). With carry_en = 0 the carry rows
// are zero and the tree computes the XOR of all rows, the GF(2)[x] sum of the partial
// products. Purely combinational; the two outputs go to the carry-lookahead adder.
module wallace_tree #(
  parameter int unsigned N  = 83,
  parameter int unsigned PW = 328
) (
  input  logic [PW-1:0] rows_in [N],
  input  logic          carry_en,
  output logic [PW-1:0] sum_row,
  output logic [PW-1:0] carry_row
);
  function automatic int unsigned rows_at(int unsigned n, int unsigned lvl);
    int unsigned rr = n;
    for (int unsigned i = 0; i < lvl; i++) rr = 2 * (rr / 3) + rr % 3;
    return rr;
  endfunction

  function automatic int unsigned num_levels(int unsigned n);
    int unsigned rr = n;
    int unsigned l = 0;
    for (int unsigned i = 0; i < 64; i++) begin
      if (rr > 2) begin
        rr = 2 * (rr / 3) + rr % 3;
        l++;
      end
    end
    return l;
  endfunction

  localparam int unsigned NL = num_levels(N);

  for (genvar l = 0; l <= NL; l++) begin : lv
    localparam int unsigned R = rows_at(N, l);
    logic [PW-1:0] r [R];
    if (l == 0) begin : g_in
      for (genvar i = 0; i < R; i++) begin : g_row
        assign r[i] = rows_in[i];
      end
    end else begin : g_csa
      localparam int unsigned RP = rows_at(N, l - 1);
      for (genvar g = 0; g < RP / 3; g++) begin : grp
        logic [PW-1:0] x0, x1, x2, mj;
        assign x0 = lv[l-1].r[3*g];
        assign x1 = lv[l-1].r[3*g+1];
        assign x2 = lv[l-1].r[3*g+2];
        assign mj = (x0 & x1) | (x0 & x2) | (x1 & x2);
        assign r[2*g]   = x0 ^ x1 ^ x2;
        assign r[2*g+1] = carry_en ? {mj[PW-2:0], 1'b0} : '0;
      end
      for (genvar i = 0; i < RP % 3; i++) begin : pass
        assign r[2*(RP/3)+i] = lv[l-1].r[3*(RP/3)+i];
      end
    end
  end

  assign sum_row   = lv[NL].r[0];
  assign carry_row = lv[NL].r[1];
endmodule
