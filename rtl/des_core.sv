// des_core: iterative DES encryptor/decryptor with a sub-pipelined round.
//
// A 64-bit block goes through the initial permutation IP and is split into
// halves L and R. Sixteen times, F(R, K_i) is XORed into L and the halves are
// swapped; the output is the final permutation FP applied to R16||L16.
// One round's hardware (des_f) is reused for all 16 rounds, and each round is
// split into two clock cycles by the S-box ROM read: phase A presents
// E(R) xor K_i to the ROMs, phase B combines the ROM output with L and steps
// the key processor. The key processor (des_key_processor) runs alongside,
// producing the round keys in forward order for encryption and in reverse
// order for decryption; F and the data path are the same in both directions.
// The iterative loop and the split round follow the design; the two-phase
// controller and its handshake are this design's own.
//
// Interface and timing (synchronous active-high reset):
//   start   : accepted when `busy` is low. Samples din, key and encrypt.
//   busy    : high from the cycle after start until done.
//   done    : one-cycle pulse; dout is valid from that cycle and held until
//             the next completed block.
// A block takes LATENCY = 33 cycles: start in cycle 0 gives done in cycle 33
// (16 rounds x 2 cycles + 1). A new start may be given in the done cycle.
module des_core (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        encrypt,   // 1 encrypt, 0 decrypt
  input  logic [63:0] key,
  input  logic [63:0] din,
  output logic [63:0] dout,
  output logic        done,
  output logic        busy
);
  import des_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_PH_A, S_PH_B} state_t;
  state_t state;

  logic [31:0] l_q, r_q, f_out;
  logic [47:0] subkey;
  logic [3:0]  round;
  logic [63:0] ip_out;
  logic        accept, advance;

  assign accept  = start && (state == S_IDLE);
  assign advance = (state == S_PH_B);
  assign busy    = (state != S_IDLE);
  assign ip_out  = ip_perm(din);

  des_key_processor u_keys (
    .clk    (clk),
    .rst    (rst),
    .load   (accept),
    .encrypt(encrypt),
    .key    (key),
    .advance(advance),
    .subkey (subkey),
    .round  (round)
  );

  des_f u_f (
    .clk(clk),
    .r  (r_q),
    .k  (subkey),
    .f  (f_out)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      l_q   <= '0;
      r_q   <= '0;
      dout  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (accept) begin
          l_q   <= ip_out[63:32];
          r_q   <= ip_out[31:0];
          state <= S_PH_A;
        end
        S_PH_A: state <= S_PH_B;   // S-box ROMs capture E(R) xor K_i
        S_PH_B: begin
          l_q <= r_q;
          r_q <= l_q ^ f_out;
          if (round == 4'd15) begin
            // Output is FP(R16 || L16), the halves not swapped after round 16.
            dout  <= fp_perm({l_q ^ f_out, r_q});
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_PH_A;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
