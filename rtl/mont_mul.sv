// mont_mul: bit-serial radix-2 Montgomery modular multiplier.
//
// Computes P = A * B * 2^-W mod N for an odd modulus N < 2^W, without any
// trial division. One bit of A is consumed per clock cycle, least
// significant first:
//     S <- (S + a_i*B + q*N) / 2,   q = (S + a_i*B) mod 2
// Adding q*N makes the sum even, so the halving is exact. With B < N the
// running value stays below 2N (W+1 bits, W+2 bits for the sum), and a
// single conditional subtraction at the end brings it below N. A may be any
// W-bit value; B must be below N. Montgomery's method is the one chosen for
// the design's modular multiplications; the radix-2 bit-serial form, the
// widths and the handshake are this design's own.
//
// Interface and timing (synchronous active-high reset):
//   start : accepted when busy is low; samples a, b and n.
//   done  : one-cycle pulse in cycle W+2 after the start cycle; p holds the
//           result from then until the next completed product.
module mont_mul #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] n,
  output logic [W-1:0] p,
  output logic         done,
  output logic         busy
);
  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_FIX} state_t;
  state_t state;

  logic [W-1:0]  a_q, b_q, n_q;
  logic [W:0]    s_q;
  logic [CW-1:0] cnt;
  logic [W+1:0]  sum_ab, sum_abn;
  logic          q;

  always_comb begin
    sum_ab  = {1'b0, s_q} + (a_q[0] ? {2'b00, b_q} : '0);
    q       = sum_ab[0];
    sum_abn = sum_ab + (q ? {2'b00, n_q} : '0);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      a_q   <= '0;
      b_q   <= '0;
      n_q   <= '0;
      s_q   <= '0;
      cnt   <= '0;
      p     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a_q   <= a;
          b_q   <= b;
          n_q   <= n;
          s_q   <= '0;
          cnt   <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          s_q <= sum_abn[W+1:1];
          a_q <= a_q >> 1;
          cnt <= cnt + 1'b1;
          if (cnt == CW'(W - 1)) state <= S_FIX;
        end
        S_FIX: begin
          p     <= (s_q >= {1'b0, n_q}) ? W'(s_q - {1'b0, n_q}) : s_q[W-1:0];
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
