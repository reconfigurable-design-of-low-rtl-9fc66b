// flex_mult: the flexible multiplier of the ECC arithmetic unit.
//
// Multiplication runs in three steps, as the design describes: (1) a radix-4 modified Booth
// encoder halves the number of partial products, (2) a Wallace tree of 3:2 compressors adds
// them until two rows remain, (3) a carry-lookahead adder adds the last two rows.
//
// mode selects the arithmetic:
//   gf_mode = 0  unsigned integer product p = a * b (2W bits). Booth digits of b take values
//                in {-2,-1,0,1,2}; a negative digit contributes ~(|d|*a) and a +1 placed in a
//                separate correction row.
//   gf_mode = 1  carry-less product in GF(2)[x] (2W-1 bits, top bit zero). Each radix-4
//                digit (b[2i+1], b[2i]) selects a ^ (a << 1) combinations, the compressors and
//                the adder drop their carries, so the rows are XORed.
// The carry-less mode is this design's choice: it is how one Booth/Wallace/CLA array can
// serve the GF(2^m) field the processor works in. Purely combinational.
module flex_mult #(
  parameter int unsigned W = 163
) (
  input  logic           gf_mode,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned ND = W / 2 + 1;   // Booth digits of the zero-extended multiplier
  localparam int unsigned NR = ND + 1;      // partial-product rows plus the +1 correction row
  localparam int unsigned PW = 2 * W + 2;   // row width, products taken modulo 2^PW

  logic [2*ND:0]   bx;                       // {0.., b, 0}: bit j+1 holds b[j]
  logic [PW-1:0]   rows [NR];
  logic [PW-1:0]   s_row, c_row, total;

  assign bx = {{(2*ND - W){1'b0}}, b, 1'b0};

  always_comb begin
    logic [PW-1:0] neg_row;
    neg_row = '0;
    for (int i = 0; i < ND; i++) begin
      logic b_lo, b_mid, b_hi, one, two, neg;
      logic [W+1:0] mag;       // |d| * a, W+2 bits with a zero sign bit
      logic [PW-1:0] row;
      b_lo  = bx[2*i];         // b[2i-1]
      b_mid = bx[2*i+1];       // b[2i]
      b_hi  = bx[2*i+2];       // b[2i+1]
      // Booth digit of the window (b[2i+1], b[2i], b[2i-1])
      one = b_mid ^ b_lo;
      two = (b_hi & ~b_mid & ~b_lo) | (~b_hi & b_mid & b_lo);
      neg = b_hi & ~(b_mid & b_lo);
      if (gf_mode) begin
        // carry-less digit: b[2i]*a xor b[2i+1]*(a<<1)
        mag = ({2'b00, a} & {(W+2){b_mid}}) ^ ({1'b0, a, 1'b0} & {(W+2){b_hi}});
        row = PW'(mag) << (2 * i);
      end else begin
        mag = one ? {2'b00, a} : (two ? {1'b0, a, 1'b0} : '0);
        if (neg) begin
          row = {{(PW - W - 2){1'b1}}, ~mag} << (2 * i);
          // -(mag << 2i) = (~mag << 2i) + (1 << 2i): the +1 goes to the correction row
          neg_row[2*i] = 1'b1;
        end else begin
          row = PW'(mag) << (2 * i);
        end
      end
      rows[i] = row;
    end
    rows[ND] = neg_row;
  end

  wallace_tree #(.N(NR), .PW(PW)) u_tree (
    .rows_in  (rows),
    .carry_en (~gf_mode),
    .sum_row  (s_row),
    .carry_row(c_row)
  );

  cla_adder #(.W(PW)) u_cla (
    .a       (s_row),
    .b       (c_row),
    .cin     (1'b0),
    .carry_en(~gf_mode),
    .sum     (total)
  );

  assign p = total[2*W-1:0];

  // Carry-less products never reach bit 2W-1.
  always_comb if (gf_mode) assert (total[PW-1:2*W-1] == '0);
endmodule
