// keccak_round: one round of the 1600-bit MKDH permutation (Keccak-f[1600]).
//
// The state is 25 lanes of 64 bits; lane (x, y) sits at bits 64*(x + 5y). A round applies
// theta (column parity mixing), rho (fixed lane rotations), pi (lane transposition),
// chi (the only non-linear step, a ^ (~b & c) along rows) and iota (XOR of the round
// constant rc into lane (0,0)). Every round is identical except for rc, and the only
// word-length dependence is in the fixed rotations, as the design states. Combinational.
module keccak_round
  import hcp_pkg::*;
(
  input  logic [1599:0] s_in,
  input  logic [63:0]   rc,
  output logic [1599:0] s_out
);
  logic [63:0] a [25];
  logic [63:0] b [25];
  logic [63:0] c [5];
  logic [63:0] d [5];

  function automatic logic [63:0] rotl(logic [63:0] v, int n);
    return (n == 0) ? v : ((v << n) | (v >> (64 - n)));
  endfunction

  always_comb begin
    for (int i = 0; i < 25; i++) a[i] = s_in[64*i +: 64];
    // theta
    for (int x = 0; x < 5; x++) c[x] = a[x] ^ a[x+5] ^ a[x+10] ^ a[x+15] ^ a[x+20];
    for (int x = 0; x < 5; x++) d[x] = c[(x+4)%5] ^ rotl(c[(x+1)%5], 1);
    for (int i = 0; i < 25; i++) a[i] = a[i] ^ d[i%5];
    // rho and pi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        b[y + 5*((2*x + 3*y) % 5)] = rotl(a[x + 5*y], KECCAK_RHO[x + 5*y]);
    // chi
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        a[x + 5*y] = b[x + 5*y] ^ (~b[(x+1)%5 + 5*y] & b[(x+2)%5 + 5*y]);
    // iota
    a[0] = a[0] ^ rc;
    for (int i = 0; i < 25; i++) s_out[64*i +: 64] = a[i];
  end
endmodule
