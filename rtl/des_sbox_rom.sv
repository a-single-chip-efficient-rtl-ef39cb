// des_sbox_rom: one DES S-box stored as a 64 x 4-bit read-only memory.
//
// The S-boxes are kept in on-chip memory configured as ROM rather than built
// from logic, the arrangement used for the whole design. The ROM is addressed
// directly with the 6-bit S-box input; the row/column split of the standard
// (outer two bits select the row, inner four the column) is folded into the
// stored contents, so the array index is the raw 6-bit input.
//
// Timing: synchronous read. The address presented in cycle t appears on
// `dout` in cycle t+1. This output register is the sub-pipeline stage in the
// middle of each DES round. The choice of a registered read port is this
// design's; it matches block-RAM ROMs on FPGAs.
//
// Parameter BOX (1..8) selects which of the eight standard S-boxes is stored.
module des_sbox_rom #(
  parameter int unsigned BOX = 1
) (
  input  logic       clk,
  input  logic [5:0] addr,
  output logic [3:0] dout
);
  import des_pkg::*;

  logic [3:0] rom [64];

  // Contents: rom[b] = S_BOX(row = {b[5],b[0]}, column = b[4:1]).
  initial begin
    for (int b = 0; b < 64; b++) rom[b] = SBOX_T[BOX-1][sbox_index(6'(b))];
  end

  always_ff @(posedge clk) dout <= rom[addr];

endmodule
