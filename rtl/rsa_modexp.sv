// rsa_modexp: RSA modular exponentiation C = M^E mod N with parallel
// squaring and multiplication on two Montgomery multipliers.
//
// Right-to-left square and multiply walks the exponent from its least
// significant bit:  Y := 1; Z := M; for each bit e_i { if e_i: Y := Y*Z;
// Z := Z*Z }  (all mod N). The new Y needs the old Z and the new Z needs only
// the old Z, so both products of one step are computed at the same time:
// multiplier A always squares Z, multiplier B multiplies Y by Z when e_i = 1
// and stays idle otherwise. One step costs one multiplication time whatever
// the bit, so an exponent of W bits takes W steps. This parallel square and
// multiply, and the use of Montgomery multiplication for both products,
// follow the design; the Montgomery-domain bookkeeping below is this
// design's own.
//
// Montgomery products carry a factor R^-1 (R = 2^W), so operands are kept
// as X*R mod N:
//   1. R2 = R^2 mod N, by doubling 1 modulo N 2W times (one cycle each).
//   2. Z := mont(M, R2) = M*R,  Y := mont(1, R2) = R   (both multipliers).
//   3. W steps of the loop above on these forms.
//   4. C := mont(Y, 1), leaving the Montgomery form.
// N must be odd and greater than 1. M may be any W-bit value; the result is
// (M mod N)^E mod N.
//
// Interface and timing (synchronous active-high reset):
//   start : accepted when busy is low; samples m, e and n.
//   done  : one-cycle pulse LATENCY = 2W + 1 + (W+2)(W+3) cycles after the
//           start cycle (4551 for W = 64); c then holds the result until the
//           next completed operation.
module rsa_modexp #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] m,
  input  logic [W-1:0] e,
  input  logic [W-1:0] n,
  output logic [W-1:0] c,
  output logic         done,
  output logic         busy
);
  localparam int unsigned CW = $clog2(2 * W + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_R2, S_CONV_GO, S_CONV_WAIT, S_LOOP_GO, S_LOOP_WAIT, S_OUT_GO, S_OUT_WAIT
  } state_t;
  state_t state;

  logic [W-1:0]  m_q, e_q, n_q, x_q, z_q, y_q;
  logic [CW-1:0] cnt;
  logic [W:0]    dbl;

  // Multiplier A: conversion of M, then the squarings.
  // Multiplier B: conversion of 1, the multiplications, the final conversion.
  logic [W-1:0] a_opa, a_opb, a_p, b_opa, b_opb, b_p;
  logic         a_start, a_done, a_busy, b_start, b_done, b_busy;

  always_comb begin
    a_start = 1'b0;
    b_start = 1'b0;
    a_opa   = z_q;
    a_opb   = z_q;
    b_opa   = y_q;
    b_opb   = z_q;
    unique case (state)
      S_CONV_GO: begin
        a_start = 1'b1;  a_opa = m_q;  a_opb = x_q;
        b_start = 1'b1;  b_opa = W'(1); b_opb = x_q;
      end
      S_LOOP_GO: begin
        a_start = 1'b1;
        b_start = e_q[0];
      end
      S_OUT_GO: begin
        b_start = 1'b1;  b_opa = y_q;  b_opb = W'(1);
      end
      default: ;
    endcase
  end

  mont_mul #(.W(W)) u_mul_a (
    .clk(clk), .rst(rst), .start(a_start), .a(a_opa), .b(a_opb), .n(n_q),
    .p(a_p), .done(a_done), .busy(a_busy)
  );

  mont_mul #(.W(W)) u_mul_b (
    .clk(clk), .rst(rst), .start(b_start), .a(b_opa), .b(b_opb), .n(n_q),
    .p(b_p), .done(b_done), .busy(b_busy)
  );

  // Modular doubling for R^2 mod N: x < N, so 2x < 2N needs one subtraction.
  assign dbl  = {x_q, 1'b0};
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      m_q <= '0;  e_q <= '0;  n_q <= '0;
      x_q <= '0;  y_q <= '0;  z_q <= '0;
      cnt <= '0;
      c   <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          m_q   <= m;
          e_q   <= e;
          n_q   <= n;
          x_q   <= W'(1);
          cnt   <= '0;
          state <= S_R2;
        end
        S_R2: begin
          x_q <= (dbl >= {1'b0, n_q}) ? W'(dbl - {1'b0, n_q}) : dbl[W-1:0];
          cnt <= cnt + 1'b1;
          if (cnt == CW'(2 * W - 1)) state <= S_CONV_GO;
        end
        S_CONV_GO: state <= S_CONV_WAIT;
        S_CONV_WAIT: if (a_done) begin
          z_q   <= a_p;
          y_q   <= b_p;
          cnt   <= '0;
          state <= S_LOOP_GO;
        end
        S_LOOP_GO: state <= S_LOOP_WAIT;
        S_LOOP_WAIT: if (a_done) begin
          z_q <= a_p;
          if (e_q[0]) y_q <= b_p;
          e_q <= e_q >> 1;
          cnt <= cnt + 1'b1;
          state <= (cnt == CW'(W - 1)) ? S_OUT_GO : S_LOOP_GO;
        end
        S_OUT_GO: state <= S_OUT_WAIT;
        S_OUT_WAIT: if (b_done) begin
          c     <= b_p;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Both multipliers have the same fixed latency, so B never outlasts A.
  assert property (@(posedge clk) disable iff (rst)
                   (state == S_LOOP_WAIT && a_done) |-> !a_busy && !b_busy);

endmodule
