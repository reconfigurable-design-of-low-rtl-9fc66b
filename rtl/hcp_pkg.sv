// hcp_pkg: constants and types shared by the hybrid crypto processor.
//
// Holds the operation and write-source encodings of the ECC arithmetic unit, the register
// map and micro-operation format of the ECC control unit, and the round constants and
// rotation offsets of the 1600-bit Keccak-f permutation used by the MKDH sponge.
package hcp_pkg;

  // Operations of the ECC arithmetic unit.
  typedef enum logic [1:0] {
    AU_MUL  = 2'd0,   // y = a * b mod f
    AU_ADD  = 2'd1,   // y = a + b (bitwise XOR)
    AU_MOVA = 2'd2    // y = a
  } au_op_e;

  // Source of the register-file write data.
  typedef enum logic [1:0] {
    WS_AU  = 2'd0,    // arithmetic unit result
    WS_X   = 2'd1,    // base-point x coordinate from the host
    WS_B   = 2'd2,    // curve coefficient b from the host
    WS_ONE = 2'd3     // the field element 1
  } wsel_e;

  // Register-file map used by the ECC control unit.
  localparam logic [2:0] R_X  = 3'd0;  // base point x
  localparam logic [2:0] R_B  = 3'd1;  // curve coefficient b
  localparam logic [2:0] R_X1 = 3'd2;
  localparam logic [2:0] R_Z1 = 3'd3;
  localparam logic [2:0] R_X2 = 3'd4;
  localparam logic [2:0] R_Z2 = 3'd5;
  localparam logic [2:0] R_T1 = 3'd6;
  localparam logic [2:0] R_T2 = 3'd7;

  // One micro-operation of the ECC control unit.
  typedef struct packed {
    au_op_e     op;
    wsel_e      wsel;
    logic [2:0] dst;
    logic [2:0] sa;
    logic [2:0] sb;
  } uop_t;

  // Keccak-f[1600] round constants, round 0 first.
  localparam logic [63:0] KECCAK_RC [24] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A, 64'h8000000080008000,
    64'h000000000000808B, 64'h0000000080000001, 64'h8000000080008081, 64'h8000000000008009,
    64'h000000000000008A, 64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089, 64'h8000000000008003,
    64'h8000000000008002, 64'h8000000000000080, 64'h000000000000800A, 64'h800000008000000A,
    64'h8000000080008081, 64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // Rotation offsets of the rho step, indexed [x + 5*y].
  localparam int KECCAK_RHO [25] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14
  };

endpackage
