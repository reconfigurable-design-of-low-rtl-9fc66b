// ecc_control: the control unit of the ECC processor.
//
// Computes the affine x coordinate of k*P from the x coordinate of P with the Montgomery
// ladder in Lopez-Dahab projective coordinates, then converts to affine with one field
// inversion. Each cycle it issues one micro-operation (an arithmetic-unit operation, two
// source registers and a destination register of the memory unit).
//   init       7 ops : load x and b, X1 = x, Z1 = 1, Z2 = x^2, X2 = x^4 + b
//   ladder    14 ops per scalar bit below the most significant one. For bit 1 the pair
//                     (X1,Z1) takes the point addition and (X2,Z2) the doubling; for bit 0
//                     the register roles are swapped, so the same op list serves both.
//   inversion Itoh-Tsujii: beta_1 = Z1, beta_2k = beta_k^(2^k) * beta_k,
//                     beta_(2k+1) = beta_2k^2 * Z1, following the bits of M-1; then
//                     1/Z1 = beta_(M-1)^2 and x = X1 / Z1.
// For M = 163 and a scalar whose top set bit is t, done follows start by
// 1 + 7 + 14*t + 180 cycles (idle, init, ladder, inversion and final multiply).
// Handshake: start is taken in IDLE; busy is high until done pulses for one cycle.
// inf is high with done when k*P is the point at infinity (k = 0 or Z1 = 0).
// The document names the control unit only: the ladder, the op schedule and the inversion
// are this design's choices (the ladder is the usual one for GF(2^m) ECC processors).
module ecc_control
  import hcp_pkg::*;
#(
  parameter int unsigned M = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] k,
  input  logic         opa_zero,   // operand a of the current op is zero
  output uop_t         uop,
  output logic         we,
  output logic         busy,
  output logic         done,
  output logic         inf,
  output logic         last_op     // the current op writes the final x coordinate
);
  localparam int unsigned E    = M - 1;
  localparam int unsigned EMSB = $clog2(E + 1) - 1;   // index of the top set bit of M-1
  localparam int unsigned IW   = $clog2(M + 1);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_LADDER, S_INV_INIT, S_INV_COPY, S_INV_SQR, S_INV_MUL,
    S_INV_SQA, S_INV_MULA, S_FIN_SQ, S_FIN_MUL
  } state_e;

  state_e        state;
  logic [M-1:0]  k_reg;
  logic [3:0]    step;
  logic [IW-1:0] bit_i;     // current ladder bit
  logic [IW-1:0] kk;        // beta index
  logic [IW-1:0] sq_cnt;    // squarings left in S_INV_SQR
  logic [IW-1:0] j;         // current bit of M-1
  logic [IW-1:0] top;       // top set bit of k
  logic          k_zero;

  localparam logic [E:0] E_VEC = (E + 1)'(E);

  always_comb begin
    top    = '0;
    k_zero = (k == '0);
    for (int i = 0; i < int'(M); i++) if (k[i]) top = IW'(i);
  end

  function automatic uop_t mk(au_op_e op, logic [2:0] dst, logic [2:0] sa, logic [2:0] sb,
                              wsel_e ws = WS_AU);
    uop_t u;
    u.op = op; u.wsel = ws; u.dst = dst; u.sa = sa; u.sb = sb;
    return u;
  endfunction

  // Register roles of the ladder step: A takes the addition, B the doubling.
  logic       lbit;
  logic [2:0] xa, za, xb, zb;
  assign lbit = k_reg[bit_i];
  assign xa = lbit ? R_X1 : R_X2;
  assign za = lbit ? R_Z1 : R_Z2;
  assign xb = lbit ? R_X2 : R_X1;
  assign zb = lbit ? R_Z2 : R_Z1;

  always_comb begin
    uop = mk(AU_MOVA, R_T1, R_T1, R_T1);
    we  = 1'b0;
    unique case (state)
      S_INIT: begin
        we = 1'b1;
        unique case (step)
          4'd0:    uop = mk(AU_MOVA, R_X,  R_X,  R_X, WS_X);
          4'd1:    uop = mk(AU_MOVA, R_B,  R_B,  R_B, WS_B);
          4'd2:    uop = mk(AU_MOVA, R_X1, R_X,  R_X);
          4'd3:    uop = mk(AU_MOVA, R_Z1, R_X,  R_X, WS_ONE);
          4'd4:    uop = mk(AU_MUL,  R_Z2, R_X,  R_X);
          4'd5:    uop = mk(AU_MUL,  R_X2, R_Z2, R_Z2);
          default: uop = mk(AU_ADD,  R_X2, R_X2, R_B);
        endcase
      end
      S_LADDER: begin
        we = 1'b1;
        unique case (step)
          // point addition into (XA, ZA)
          4'd0:    uop = mk(AU_MUL, R_T1, xa,   zb);
          4'd1:    uop = mk(AU_MUL, R_T2, xb,   za);
          4'd2:    uop = mk(AU_ADD, za,   R_T1, R_T2);
          4'd3:    uop = mk(AU_MUL, za,   za,   za);
          4'd4:    uop = mk(AU_MUL, R_T1, R_T1, R_T2);
          4'd5:    uop = mk(AU_MUL, R_T2, R_X,  za);
          4'd6:    uop = mk(AU_ADD, xa,   R_T1, R_T2);
          // point doubling of (XB, ZB)
          4'd7:    uop = mk(AU_MUL, R_T1, xb,   xb);
          4'd8:    uop = mk(AU_MUL, R_T2, zb,   zb);
          4'd9:    uop = mk(AU_MUL, zb,   R_T1, R_T2);
          4'd10:   uop = mk(AU_MUL, R_T1, R_T1, R_T1);
          4'd11:   uop = mk(AU_MUL, R_T2, R_T2, R_T2);
          4'd12:   uop = mk(AU_MUL, R_T2, R_B,  R_T2);
          default: uop = mk(AU_ADD, xb,   R_T1, R_T2);
        endcase
      end
      S_INV_INIT: begin we = 1'b1; uop = mk(AU_MOVA, R_T1, R_Z1, R_Z1); end
      S_INV_COPY: begin we = 1'b1; uop = mk(AU_MOVA, R_T2, R_T1, R_T1); end
      S_INV_SQR:  begin we = 1'b1; uop = mk(AU_MUL,  R_T2, R_T2, R_T2); end
      S_INV_MUL:  begin we = 1'b1; uop = mk(AU_MUL,  R_T1, R_T1, R_T2); end
      S_INV_SQA:  begin we = 1'b1; uop = mk(AU_MUL,  R_T1, R_T1, R_T1); end
      S_INV_MULA: begin we = 1'b1; uop = mk(AU_MUL,  R_T1, R_T1, R_Z1); end
      S_FIN_SQ:   begin we = 1'b1; uop = mk(AU_MUL,  R_T1, R_T1, R_T1); end
      S_FIN_MUL:  begin we = 1'b1; uop = mk(AU_MUL,  R_X1, R_X1, R_T1); end
      default: ;
    endcase
  end

  assign busy    = (state != S_IDLE);
  assign last_op = (state == S_FIN_MUL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      k_reg  <= '0;
      step   <= '0;
      bit_i  <= '0;
      kk     <= '0;
      sq_cnt <= '0;
      j      <= '0;
      done   <= 1'b0;
      inf    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k_reg <= k;
          step  <= '0;
          if (k_zero) begin
            done <= 1'b1;
            inf  <= 1'b1;
          end else begin
            inf   <= 1'b0;
            state <= S_INIT;
            bit_i <= top - 1'b1;
            if (top == '0) bit_i <= '0;
          end
        end
        S_INIT: begin
          step <= step + 1'b1;
          if (step == 4'd6) begin
            step  <= '0;
            state <= (bit_i == '0 && k_reg[M-1:1] == '0) ? S_INV_INIT : S_LADDER;
          end
        end
        S_LADDER: begin
          step <= step + 1'b1;
          if (step == 4'd13) begin
            step <= '0;
            if (bit_i == '0) state <= S_INV_INIT;
            else bit_i <= bit_i - 1'b1;
          end
        end
        S_INV_INIT: begin
          inf   <= opa_zero;
          kk    <= IW'(1);
          j     <= IW'(EMSB - 1);
          state <= S_INV_COPY;
        end
        S_INV_COPY: begin
          sq_cnt <= kk;
          state  <= S_INV_SQR;
        end
        S_INV_SQR: begin
          sq_cnt <= sq_cnt - 1'b1;
          if (sq_cnt == IW'(1)) state <= S_INV_MUL;
        end
        S_INV_MUL: begin
          kk <= {kk[IW-2:0], 1'b0};
          if (E_VEC[j]) state <= S_INV_SQA;
          else if (j == '0) state <= S_FIN_SQ;
          else begin
            j     <= j - 1'b1;
            state <= S_INV_COPY;
          end
        end
        S_INV_SQA: state <= S_INV_MULA;
        S_INV_MULA: begin
          kk <= kk + 1'b1;
          if (j == '0) state <= S_FIN_SQ;
          else begin
            j     <= j - 1'b1;
            state <= S_INV_COPY;
          end
        end
        S_FIN_SQ: state <= S_FIN_MUL;
        S_FIN_MUL: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // done is reported only once the unit is idle again.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
