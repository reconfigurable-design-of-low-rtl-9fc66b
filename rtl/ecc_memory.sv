// ecc_memory: the memory unit of the ECC processor.
//
// A register file of DEPTH field elements of M bits with two combinational read ports
// (the two operands of the arithmetic unit) and one write port written at the rising clock
// edge when we is high. A read of the address being written returns the old value.
// No reset: the control unit writes every register before it reads it.
// The document names the memory unit only; size and porting are this design's choices.
module ecc_memory #(
  parameter int unsigned M     = 163,
  parameter int unsigned DEPTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wa,
  input  logic [M-1:0]  wd,
  input  logic [AW-1:0] ra,
  output logic [M-1:0]  rda,
  input  logic [AW-1:0] rb,
  output logic [M-1:0]  rdb
);
  logic [M-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wd;
  end

  assign rda = mem[ra];
  assign rdb = mem[rb];
endmodule
