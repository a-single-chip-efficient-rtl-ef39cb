// des_f: the DES round function F(R, K).
//
// R (32 bits) is expanded to 48 bits by E, mixed with the 48-bit round key by
// XOR, split into eight 6-bit groups that address the eight S-box ROMs, and
// the 32 S-box output bits are reordered by P. This is the standard F of
// DES; its internal steps are the standard's.
//
// Timing: one sub-pipeline stage. `r` and `k` are sampled at the clock edge
// that ends cycle t (the S-box ROMs register their address), and `f` is valid
// throughout cycle t+1. Everything except the ROM read is combinational:
// E and P are wiring, the key mixing one level of XOR. Splitting the round at
// the ROM read is this design's reading of "sub pipelining inside each round".
module des_f (
  input  logic        clk,
  input  logic [31:0] r,   // right half of the round input
  input  logic [47:0] k,   // round key K_i
  output logic [31:0] f    // F(R, K), one cycle after r/k
);
  import des_pkg::*;

  logic [47:0] mixed;
  logic [31:0] s_out;

  assign mixed = e_expand(r) ^ k;

  for (genvar i = 0; i < 8; i++) begin : g_sbox
    des_sbox_rom #(.BOX(i + 1)) u_rom (
      .clk (clk),
      .addr(mixed[47-6*i -: 6]),
      .dout(s_out[31-4*i -: 4])
    );
  end

  assign f = p_perm(s_out);

endmodule
