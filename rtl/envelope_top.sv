// envelope_top: single-chip digital envelope, DES for the data and RSA for
// the session key.
//
// A digital envelope sends a message x encrypted under a secret session key
// k with a fast symmetric cipher, y = DES_k(x), together with the session key
// encrypted under the receiver's public key (N, E) with RSA, y' = k^E mod N.
// The envelope is the pair y'' = (y, y'). Both ciphers sit on one chip and
// work at the same time: the DES core (des_core) encrypts the block while
// the public key is still being loaded and the RSA exponentiation
// (rsa_modexp) runs. The two halves leave on separate ports: y on `ct`, y'
// byte-serially on `Output`.
//
// The port list is the one of the chip's simulation (clk, Start, Reset,
// Bus_Bits, key, pt, Encrypt, Done, ct, Output; 213 pins in all). How the
// narrow buses are sequenced is this design's own choice:
//   Start (cycle 0) : samples key, pt and Encrypt and starts DES. Bus_Bits
//                     carries the RSA_W/8 bytes of N and then the RSA_W/8
//                     bytes of the exponent, least significant byte first,
//                     one per cycle from cycle 0 (2*RSA_W/8 cycles).
//   RSA             : starts the cycle after the last exponent byte, with the
//                     session key (key, truncated or zero-extended to RSA_W
//                     bits) as the message.
//   Done            : rises once both DES and RSA are finished and stays high
//                     until the next Start or Reset. ct then holds y. In the
//                     cycle Done rises, Output carries byte 0 of y'; bytes
//                     1 .. RSA_W/8-1 follow one per cycle, then Output is 0.
// Start is ignored while an envelope is in progress. Reset is synchronous and
// active high.
//
// The two ciphers can be used on their own: Encrypt = 0 makes the DES core
// decrypt pt, and loading the private exponent D instead of E with an RSA
// ciphertext on `key` makes the RSA part recover the session key.
//
// For RSA_W = 64 an envelope takes 2*8 + 4551 + 1 = 4568 cycles from Start to
// Done (RSA dominates; DES needs 33 cycles).
module envelope_top #(
  parameter int unsigned RSA_W = 64   // RSA modulus width; a multiple of 8
) (
  input  logic        clk,
  input  logic        Reset,
  input  logic        Start,
  input  logic [7:0]  Bus_Bits,
  input  logic [63:0] key,
  input  logic [63:0] pt,
  input  logic        Encrypt,
  output logic        Done,
  output logic [63:0] ct,
  output logic [7:0]  Output
);
  localparam int unsigned NB = RSA_W / 8;          // bytes per RSA word
  localparam int unsigned BW = $clog2(2 * NB + 1);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_RSA_GO, S_WAIT, S_SEND} state_t;
  state_t state;

  logic [2*RSA_W-1:0] ne_q;       // {E, N}, filled from the top, LS byte first
  logic [RSA_W-1:0]   msg_q, yk_q;
  logic [BW-1:0]      cnt;
  logic               des_fin, rsa_fin;

  logic        des_start, des_done, des_busy;
  logic [63:0] des_out;
  logic        rsa_start, rsa_done, rsa_busy;
  logic [RSA_W-1:0] rsa_out;

  assign des_start = Start && (state == S_IDLE);
  assign rsa_start = (state == S_RSA_GO);

  des_core u_des (
    .clk    (clk),
    .rst    (Reset),
    .start  (des_start),
    .encrypt(Encrypt),
    .key    (key),
    .din    (pt),
    .dout   (des_out),
    .done   (des_done),
    .busy   (des_busy)
  );

  rsa_modexp #(.W(RSA_W)) u_rsa (
    .clk  (clk),
    .rst  (Reset),
    .start(rsa_start),
    .m    (msg_q),
    .e    (ne_q[2*RSA_W-1:RSA_W]),
    .n    (ne_q[RSA_W-1:0]),
    .c    (rsa_out),
    .done (rsa_done),
    .busy (rsa_busy)
  );

  always_ff @(posedge clk) begin
    if (Reset) begin
      state   <= S_IDLE;
      ne_q    <= '0;
      msg_q   <= '0;
      yk_q    <= '0;
      cnt     <= '0;
      des_fin <= 1'b0;
      rsa_fin <= 1'b0;
      Done    <= 1'b0;
      ct      <= '0;
      Output  <= '0;
    end else begin
      if (des_done) des_fin <= 1'b1;
      if (rsa_done) rsa_fin <= 1'b1;
      unique case (state)
        S_IDLE: if (Start) begin
          Done    <= 1'b0;
          Output  <= '0;
          msg_q   <= RSA_W'(key);
          ne_q    <= {Bus_Bits, ne_q[2*RSA_W-1:8]};
          cnt     <= BW'(1);
          des_fin <= 1'b0;
          rsa_fin <= 1'b0;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          ne_q <= {Bus_Bits, ne_q[2*RSA_W-1:8]};
          cnt  <= cnt + 1'b1;
          if (cnt == BW'(2 * NB - 1)) state <= S_RSA_GO;
        end
        S_RSA_GO: state <= S_WAIT;
        S_WAIT: if ((des_fin || des_done) && (rsa_fin || rsa_done)) begin
          // Envelope complete: y on ct, y' byte 0 on Output.
          Done   <= 1'b1;
          ct     <= des_out;
          yk_q   <= rsa_out >> 8;
          Output <= rsa_out[7:0];
          cnt    <= BW'(1);
          state  <= (NB == 1) ? S_IDLE : S_SEND;
        end
        S_SEND: begin
          Output <= yk_q[7:0];
          yk_q   <= yk_q >> 8;
          cnt    <= cnt + 1'b1;
          if (cnt == BW'(NB - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      // Output returns to 0 after the last byte of y'.
      if (state == S_IDLE && !Start) Output <= '0;
    end
  end

  // Neither core is ever started while it is still working.
  assert property (@(posedge clk) disable iff (Reset) des_start |-> !des_busy);
  assert property (@(posedge clk) disable iff (Reset) rsa_start |-> !rsa_busy);

endmodule
