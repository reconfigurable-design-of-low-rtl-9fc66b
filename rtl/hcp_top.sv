// hcp_top: hybrid crypto processor (HCP) for signcryption.
//
// Joins the two engines of the hybrid scheme: the ECC processor over GF(2^M) (scalar
// multiplication by a Booth/Wallace/CLA flexible multiplier) and the MKDH sponge hash
// (1600-bit Keccak-f permutation). The key-encapsulation sequencer hcp_kem_ctrl drives both:
// five scalar multiplications and three hashes produce the ciphertext (u1, u2, T) and the
// 128-bit session key K for a receiver public key (G1, G2, C, D) and an ephemeral scalar r.
// With keygen = 1 it computes the receiver's public values pk_cx = x(c*G1), pk_dx = x(d*G1)
// from the secret scalars sk_c, sk_d (two scalar multiplications, about 4.9k cycles).
// With decap = 1 the same engines run the receiver's side: from (u1_in, u2_in, tag_in) and
// the secret scalars sk_c, sk_d (C = c*G1, D = d*G1) they recover the key, or set err when
// the tag does not verify.
// Interface: pulse start with decap, r (or the decapsulation inputs), the four x coordinates
// and the curve coefficient b valid and held while busy; done pulses for one cycle with u1,
// u2, tag, key valid and err set when a scalar multiplication reached the point at infinity
// or, in decapsulation, the tag is wrong. One encapsulation takes about 12.1k cycles at
// M = 163 (five scalar multiplications, three hashes); a decapsulation about 7.4k.
module hcp_top
  import hcp_pkg::*;
#(
  parameter int unsigned  M    = 163,
  parameter logic [M-1:0] POLY = M'('hC9),
  parameter int unsigned  RATE = 1088
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] r,
  input  logic [M-1:0] g1x,
  input  logic [M-1:0] g2x,
  input  logic [M-1:0] cx,
  input  logic [M-1:0] dx,
  input  logic [M-1:0] curve_b,
  input  logic         keygen,
  input  logic         decap,
  input  logic [M-1:0] sk_c,
  input  logic [M-1:0] sk_d,
  input  logic [M-1:0] u1_in,
  input  logic [M-1:0] u2_in,
  input  logic [255:0] tag_in,
  output logic         busy,
  output logic         done,
  output logic         err,
  output logic [M-1:0] u1,
  output logic [M-1:0] u2,
  output logic [255:0] tag,
  output logic [127:0] key,
  output logic [M-1:0] pk_cx,
  output logic [M-1:0] pk_dx
);
  localparam int unsigned BW = $clog2(RATE / 8 + 1);

  logic            ecc_start, ecc_done, ecc_inf, ecc_busy;
  logic [M-1:0]    ecc_k, ecc_x, ecc_x_out;
  logic            h_valid, h_ready, h_last, h_out_valid, h_busy;
  logic [RATE-1:0] h_block;
  logic [BW-1:0]   h_bytes;
  logic [255:0]    h_out;

  hcp_kem_ctrl #(.M(M), .RATE(RATE)) u_kem (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .r          (r),
    .g1x        (g1x),
    .g2x        (g2x),
    .cx         (cx),
    .dx         (dx),
    .keygen     (keygen),
    .decap      (decap),
    .sk_c       (sk_c),
    .sk_d       (sk_d),
    .u1_in      (u1_in),
    .u2_in      (u2_in),
    .tag_in     (tag_in),
    .busy       (busy),
    .done       (done),
    .err        (err),
    .u1         (u1),
    .u2         (u2),
    .tag        (tag),
    .key        (key),
    .pk_cx      (pk_cx),
    .pk_dx      (pk_dx),
    .ecc_start  (ecc_start),
    .ecc_k      (ecc_k),
    .ecc_x      (ecc_x),
    .ecc_done   (ecc_done),
    .ecc_x_out  (ecc_x_out),
    .ecc_inf    (ecc_inf),
    .h_valid    (h_valid),
    .h_ready    (h_ready),
    .h_block    (h_block),
    .h_last     (h_last),
    .h_bytes    (h_bytes),
    .h_out_valid(h_out_valid),
    .h_out      (h_out)
  );

  ecc_processor #(.M(M), .POLY(POLY)) u_ecc (
    .clk  (clk),
    .rst_n(rst_n),
    .start(ecc_start),
    .k    (ecc_k),
    .x_in (ecc_x),
    .b_in (curve_b),
    .busy (ecc_busy),
    .done (ecc_done),
    .x_out(ecc_x_out),
    .inf  (ecc_inf)
  );

  mkdh_sponge #(.RATE(RATE), .OUT_BITS(256)) u_mkdh (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (h_valid),
    .in_ready (h_ready),
    .in_block (h_block),
    .in_last  (h_last),
    .in_bytes (h_bytes),
    .out_valid(h_out_valid),
    .out_data (h_out),
    .out_next (1'b0),
    .busy     (h_busy)
  );

  // The two engines are used one at a time.
  assert property (@(posedge clk) disable iff (!rst_n) !(ecc_busy && h_busy));
endmodule
