// des_key_processor: DES round-key generator, run alongside the data rounds.
//
// The 64-bit key passes through PC-1, which drops the eight parity bits and
// yields two 28-bit halves C and D held in registers. Each round both halves
// are rotated by a cyclic shifter by one or two places; a comparator on the
// round counter decides which (one place before rounds 1, 2, 9 and 16,
// two otherwise). PC-2 picks the 48-bit round key K_i out of C||D.
// This structure (PC-1, C/D registers, cyclic shifters, comparators, PC-2)
// is the one given for the design; the counter encoding and the handshake are
// this design's own.
//
// Decryption takes the keys in reverse order K16 ... K1. Because the left
// rotations of all 16 rounds add up to 28 places, C16||D16 equals the PC-1
// output, so decryption loads PC-1 unrotated and rotates right, by the amount
// that produced the key just used.
//
// Interface and timing:
//   load    : captures PC1(key) and the direction. From the next cycle
//             `subkey` is K1 (encrypt) or K16 (decrypt) and `round` is 0.
//   advance : steps to the next round key at the clock edge; `round`
//             counts the keys already stepped past (0..15).
// `subkey` is a purely combinational function (PC-2) of the C/D registers.
module des_key_processor (
  input  logic        clk,
  input  logic        rst,      // synchronous, active high
  input  logic        load,
  input  logic        encrypt,  // 1: K1..K16, 0: K16..K1
  input  logic [63:0] key,
  input  logic        advance,
  output logic [47:0] subkey,
  output logic [3:0]  round
);
  import des_pkg::*;

  logic [27:0] c_q, d_q;
  logic        enc_q;
  logic [55:0] pc1_out;
  logic [4:0]  shift_round;  // 1-based round whose rotation is applied next
  logic        one_place;

  assign pc1_out = pc1_perm(key);

  // Comparator: which round's rotation comes next, and is it a single place?
  always_comb begin
    shift_round = enc_q ? 5'(round) + 5'd2 : 5'd16 - 5'(round);
    one_place   = (shift_round == 5'd1) || (shift_round == 5'd2) ||
                  (shift_round == 5'd9) || (shift_round == 5'd16);
  end

  function automatic logic [27:0] rotl(input logic [27:0] x, input logic one);
    return one ? {x[26:0], x[27]} : {x[25:0], x[27:26]};
  endfunction

  function automatic logic [27:0] rotr(input logic [27:0] x, input logic one);
    return one ? {x[0], x[27:1]} : {x[1:0], x[27:2]};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      c_q   <= '0;
      d_q   <= '0;
      enc_q <= 1'b1;
      round <= '0;
    end else if (load) begin
      enc_q <= encrypt;
      round <= '0;
      // Round 1 rotates by one place; decryption starts from C16 = C0.
      c_q   <= encrypt ? rotl(pc1_out[55:28], 1'b1) : pc1_out[55:28];
      d_q   <= encrypt ? rotl(pc1_out[27:0],  1'b1) : pc1_out[27:0];
    end else if (advance) begin
      round <= round + 4'd1;
      c_q   <= enc_q ? rotl(c_q, one_place) : rotr(c_q, one_place);
      d_q   <= enc_q ? rotl(d_q, one_place) : rotr(d_q, one_place);
    end
  end

  assign subkey = pc2_perm({c_q, d_q});

endmodule
