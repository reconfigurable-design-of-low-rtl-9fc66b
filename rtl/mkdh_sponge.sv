// mkdh_sponge: the MKDH hash, a sponge over the 1600-bit Keccak-f permutation.
//
// The 1600-bit state is the sum of the rate (RATE bits, the part messages are XORed into
// and digests are read from) and the capacity (1600 - RATE bits). The message arrives in
// RATE-bit blocks, byte i of a block in bits [8i+7:8i]. The sponge pads it to a multiple
// of the rate (domain byte DSUFFIX after the last message byte, 0x80 ORed into the last
// byte of the block; a full last block gets a padding-only block), then
//   absorbing: state ^= block, then 24 rounds, one per clock;
//   squeezing: the first OUT_BITS bits of the state are the output; out_next permutes
//              again for the next OUT_BITS, so the output length is unbounded.
// Interface: in_valid/in_ready handshake for blocks; in_last marks the message's last block
// and in_bytes (0..RATE/8) its number of valid bytes. out_valid stays high with out_data
// until out_next (more output) or the first block of a new message.
// Timing: 1 + 24 cycles per absorbed block, 25 cycles per extra squeeze.
// Rate, output size and padding are this design's choices (the SHA3-256 ones); the state
// width, the sponge phases, the padding to a multiple of the rate and the identical rounds
// follow the design description.
module mkdh_sponge
  import hcp_pkg::*;
#(
  parameter int unsigned RATE     = 1088,
  parameter int unsigned OUT_BITS = 256,
  parameter logic [7:0]  DSUFFIX  = 8'h06,
  localparam int unsigned RB      = RATE / 8,
  localparam int unsigned BW      = $clog2(RB + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  output logic                in_ready,
  input  logic [RATE-1:0]     in_block,
  input  logic                in_last,
  input  logic [BW-1:0]       in_bytes,
  output logic                out_valid,
  output logic [OUT_BITS-1:0] out_data,
  input  logic                out_next,
  output logic                busy
);
  typedef enum logic [1:0] {S_IDLE, S_ABSORB, S_PERM, S_OUT} state_e;

  state_e          state;
  logic [1599:0]   st, st_next, round_out;
  logic [4:0]      rnd;
  logic            in_msg;      // a message is being absorbed (state not cleared)
  logic            pad_pending; // a padding-only block must follow
  logic            finishing;   // the permutation running is the last of absorption
  logic [RATE-1:0] blk_padded, pad_only;

  // Padding of a last block holding n < RB bytes.
  function automatic logic [RATE-1:0] pad_block(logic [RATE-1:0] blk, logic [BW-1:0] n);
    logic [RATE-1:0] pb;
    for (int i = 0; i < int'(RB); i++)
      pb[8*i +: 8] = (i < int'(n)) ? blk[8*i +: 8] : 8'h00;
    for (int i = 0; i < int'(RB); i++)
      if (i == int'(n)) pb[8*i +: 8] = pb[8*i +: 8] ^ DSUFFIX;
    pb[RATE-1 -: 8] = pb[RATE-1 -: 8] ^ 8'h80;
    return pb;
  endfunction

  assign blk_padded = (in_last && in_bytes < BW'(RB)) ? pad_block(in_block, in_bytes) : in_block;
  assign pad_only   = pad_block('0, '0);

  keccak_round u_round (
    .s_in (st),
    .rc   (KECCAK_RC[rnd]),
    .s_out(round_out)
  );

  assign in_ready  = (state == S_IDLE) || (state == S_OUT && !out_next);
  assign out_valid = (state == S_OUT);
  assign out_data  = st[OUT_BITS-1:0];
  assign busy      = (state == S_ABSORB) || (state == S_PERM);

  always_comb begin
    st_next = in_msg ? st : '0;
    st_next[RATE-1:0] = st_next[RATE-1:0] ^ blk_padded;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      st          <= '0;
      rnd         <= '0;
      in_msg      <= 1'b0;
      pad_pending <= 1'b0;
      finishing   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_OUT: begin
          if (state == S_OUT && out_next) begin
            rnd       <= '0;
            finishing <= 1'b1;
            state     <= S_PERM;
          end else if (in_valid) begin
            st          <= st_next;
            rnd         <= '0;
            in_msg      <= !in_last;
            finishing   <= in_last && in_bytes < BW'(RB);
            pad_pending <= in_last && in_bytes == BW'(RB);
            state       <= S_PERM;
          end
        end
        S_ABSORB: begin
          // padding-only block after a full last block
          st[RATE-1:0] <= st[RATE-1:0] ^ pad_only;
          pad_pending  <= 1'b0;
          finishing    <= 1'b1;
          rnd          <= '0;
          state        <= S_PERM;
        end
        S_PERM: begin
          st  <= round_out;
          rnd <= rnd + 1'b1;
          if (rnd == 5'd23) begin
            if (pad_pending) state <= S_ABSORB;
            else if (finishing) state <= S_OUT;
            else state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A block never claims more bytes than the rate holds.
  assert property (@(posedge clk) disable iff (!rst_n) (in_valid && in_ready) |-> in_bytes <= BW'(RB));
endmodule
