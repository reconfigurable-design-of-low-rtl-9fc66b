// hcp_kem_ctrl: key-encapsulation sequencer of the hybrid crypto processor.
//
// Runs Kurosawa-Desmedt style key encapsulation on the shared ECC processor (group
// operations) and the shared MKDH sponge (target-collision-resistant hash TCR, key
// derivation KDF and message authentication MAC). With the receiver's public key given as
// x coordinates (g1, g2, c, d) and the sender's ephemeral scalar r:
//   1  u1    = x(r*G1)                    ECC
//   2  u2    = x(r*G2)                    ECC
//   3  alpha = TCR(u1 || u2)  (low M bits) MKDH
//   4  e     = x(r*C)                     ECC
//   5  w     = x(r*D)                     ECC
//   6  f     = x(alpha*W) = x(r*alpha*D)  ECC
//   7  K1 || K2 = KDF(e || f)             MKDH, K1 = digest[127:0], K2 = digest[255:128]
//   8  T     = MAC_K2(u1 || u2) = H(K2 || u1 || u2)   MKDH
// Output: ciphertext CT = (u1, u2, T) and the session key K = K1. err ("bottom") is set when
// any scalar multiplication gives the point at infinity. Field elements enter the hash as
// ceil(M/8) little-endian bytes, keys as 16 little-endian bytes.
// The document gives the steps u1, u2, alpha, the split of the derived key into K1 and K2,
// T and CT; it combines the two Diffie-Hellman values into one group element c^r d^(r*alpha).
// This x-only design has no point addition, so it feeds both x coordinates e and f to the
// KDF instead; that and the byte formats are this design's choices.
// Decapsulation (decap = 1 at start) is the receiver's side, for G1 = G, C = c*G1 and
// D = d*G1 with secret scalars c, d: from the received (u1, u2, T) it recomputes
// alpha = TCR(u1 || u2), e = x(c*U1), f = x(alpha*(d*U1)), K1 || K2 = KDF(e || f) and
// T' = MAC_K2(u1 || u2). If T' differs from T, or a point at infinity appears, err (bottom)
// is set and the key output is zero. The document states only that decapsulation returns
// bottom for ciphertext outside the group; the tag check is this design's, and no group
// membership test is made.
// Key generation (keygen = 1 at start, takes priority over decap) produces the receiver's
// public values for the secrets c, d: pk_cx = x(c*G1), pk_dx = x(d*G1). G1 and G2 are
// inputs (generators chosen outside).
// Handshake: start is taken when idle; done pulses one cycle with the outputs valid; the
// outputs hold until the next start. Inputs must stay valid while busy.
module hcp_kem_ctrl #(
  parameter int unsigned M    = 163,
  parameter int unsigned RATE = 1088,
  localparam int unsigned RB  = RATE / 8,
  localparam int unsigned BW  = $clog2(RB + 1),
  localparam int unsigned NB  = (M + 7) / 8     // bytes per field element
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [M-1:0]    r,
  input  logic [M-1:0]    g1x,
  input  logic [M-1:0]    g2x,
  input  logic [M-1:0]    cx,
  input  logic [M-1:0]    dx,
  input  logic            keygen,     // 1: compute the public key (C, D) from c, d
  input  logic            decap,      // 1: decapsulate (u1_in, u2_in, tag_in) with c, d
  input  logic [M-1:0]    sk_c,
  input  logic [M-1:0]    sk_d,
  input  logic [M-1:0]    u1_in,
  input  logic [M-1:0]    u2_in,
  input  logic [255:0]    tag_in,
  output logic            busy,
  output logic            done,
  output logic            err,
  output logic [M-1:0]    u1,
  output logic [M-1:0]    u2,
  output logic [255:0]    tag,
  output logic [127:0]    key,
  output logic [M-1:0]    pk_cx,
  output logic [M-1:0]    pk_dx,
  // ECC processor
  output logic            ecc_start,
  output logic [M-1:0]    ecc_k,
  output logic [M-1:0]    ecc_x,
  input  logic            ecc_done,
  input  logic [M-1:0]    ecc_x_out,
  input  logic            ecc_inf,
  // MKDH sponge
  output logic            h_valid,
  input  logic            h_ready,
  output logic [RATE-1:0] h_block,
  output logic            h_last,
  output logic [BW-1:0]   h_bytes,
  input  logic            h_out_valid,
  input  logic [255:0]    h_out
);
  typedef enum logic [3:0] {
    P_IDLE, P_U1, P_U2, P_TCR, P_E, P_W, P_F, P_KDF, P_MAC
  } phase_e;

  phase_e       phase;
  logic         issued;        // request of the current phase handed over
  logic [M-1:0] alpha, e_x, w_x, f_x;
  logic [127:0] k2;
  logic         is_hash;
  logic         dec;           // current operation is a decapsulation
  logic         kg;            // current operation is a key generation

  localparam int unsigned NB8 = 8 * NB;

  assign is_hash = (phase == P_TCR) || (phase == P_KDF) || (phase == P_MAC);
  assign busy    = (phase != P_IDLE);

  // ECC operands of the current phase
  always_comb begin
    ecc_k = r;
    ecc_x = g1x;
    unique case (phase)
      P_U2:    ecc_x = g2x;
      P_E:     begin ecc_x = kg ? g1x : (dec ? u1 : cx); ecc_k = (dec || kg) ? sk_c : r; end
      P_W:     begin ecc_x = kg ? g1x : (dec ? u1 : dx); ecc_k = (dec || kg) ? sk_d : r; end
      P_F:     begin ecc_k = alpha; ecc_x = w_x; end
      default: ;
    endcase
  end
  assign ecc_start = busy && !is_hash && !issued;

  // Hash message of the current phase
  always_comb begin
    h_block = '0;
    h_bytes = BW'(2 * NB);
    unique case (phase)
      P_KDF: begin
        h_block[0 +: NB8]   = NB8'(e_x);
        h_block[NB8 +: NB8] = NB8'(f_x);
      end
      P_MAC: begin
        h_block[0 +: 128]         = k2;
        h_block[128 +: NB8]       = NB8'(u1);
        h_block[128 + NB8 +: NB8] = NB8'(u2);
        h_bytes                   = BW'(16 + 2 * NB);
      end
      default: begin
        h_block[0 +: NB8]   = NB8'(u1);
        h_block[NB8 +: NB8] = NB8'(u2);
      end
    endcase
  end
  assign h_valid = is_hash && !issued;
  assign h_last  = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase  <= P_IDLE;
      issued <= 1'b0;
      dec    <= 1'b0;
      kg     <= 1'b0;
      pk_cx  <= '0;
      pk_dx  <= '0;
      done   <= 1'b0;
      err    <= 1'b0;
      u1     <= '0;
      u2     <= '0;
      alpha  <= '0;
      e_x    <= '0;
      w_x    <= '0;
      f_x    <= '0;
      k2     <= '0;
      key    <= '0;
      tag    <= '0;
    end else begin
      done <= 1'b0;
      if (phase == P_IDLE) begin
        if (start) begin
          issued <= 1'b0;
          err    <= 1'b0;
          dec    <= decap && !keygen;
          kg     <= keygen;
          if (keygen) begin
            phase <= P_E;
          end else if (decap) begin
            u1    <= u1_in;
            u2    <= u2_in;
            phase <= P_TCR;
          end else begin
            phase <= P_U1;
          end
        end
      end else if (!issued) begin
        if (!is_hash || h_ready) issued <= 1'b1;
      end else if (!is_hash && ecc_done) begin
        issued <= 1'b0;
        if (ecc_inf) err <= 1'b1;
        unique case (phase)
          P_U1:    begin u1  <= ecc_x_out; phase <= P_U2;  end
          P_U2:    begin u2  <= ecc_x_out; phase <= P_TCR; end
          P_E: begin
            if (kg) pk_cx <= ecc_x_out;
            else e_x <= ecc_x_out;
            phase <= P_W;
          end
          P_W: begin
            if (kg) begin
              pk_dx <= ecc_x_out;
              phase <= P_IDLE;
              done  <= 1'b1;
            end else begin
              w_x   <= ecc_x_out;
              phase <= P_F;
            end
          end
          default: begin f_x <= ecc_x_out; phase <= P_KDF; end
        endcase
      end else if (is_hash && h_out_valid) begin
        issued <= 1'b0;
        unique case (phase)
          P_TCR: begin alpha <= h_out[M-1:0]; phase <= P_E; end
          P_KDF: begin key <= h_out[127:0]; k2 <= h_out[255:128]; phase <= P_MAC; end
          default: begin
            tag   <= h_out;
            phase <= P_IDLE;
            done  <= 1'b1;
            if (dec && (h_out != tag_in || err)) begin
              err <= 1'b1;
              key <= '0;
            end
          end
        endcase
      end
    end
  end

  // The MAC message must fit in one block of the sponge.
  if (RATE < 8 * (16 + 2 * NB)) begin : g_rate_check
    $error("hcp_kem_ctrl: RATE too small for one-block messages");
  end
endmodule
