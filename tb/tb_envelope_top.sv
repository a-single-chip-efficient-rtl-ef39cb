// tb_envelope_top: end-to-end test of the digital envelope chip at its
// default size (64-bit RSA).
// Sender side: for several (session key, data block) pairs the chip builds
// the envelope; ct must equal the DES ciphertext (reference values from an
// independent software model of the standard) and the bytes on Output must
// form key^E mod N (computed here with wide integers).
// Receiver side: the chip is used with its ciphers separately. First, with the
// private exponent D loaded and y' on `key`, it recovers the session key on
// Output; then, with that key and Encrypt = 0, it decrypts ct back to the data.
// The test counts each mechanism of the design and fails if one never
// happened: DES encryption and decryption, single- and double-place key
// rotations, exponent steps with and without the multiplication, the final
// Montgomery subtraction, a Start ignored while busy and a Reset in the middle
// of an envelope. It also checks the Start-to-Done time (4568 cycles) and
// the byte timing of Output.
module tb_envelope_top;
  localparam int unsigned RSA_W = 64;
  localparam int NB = RSA_W / 8;
  localparam int LATENCY = 2 * NB + (2 * RSA_W + 1 + (RSA_W + 2) * (RSA_W + 3)) + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        Reset, Start, Encrypt, Done;
  logic [7:0]  Bus_Bits, Output;
  logic [63:0] key, pt, ct;

  envelope_top dut (.*);

  localparam logic [63:0] N64 = 64'hE7251A1279738A8F;
  localparam logic [63:0] E64 = 64'h10001;
  localparam logic [63:0] D64 = 64'h8D289C5558A20D49;

  typedef struct packed {
    logic [63:0] key;
    logic [63:0] pt;
    logic [63:0] ct;
  } vec_t;
  // The last vector is the key and data block of the published simulation run.
  localparam int NV = 4;
  vec_t vecs [NV] = '{
    '{64'h6b0d549b6f03675a, 64'h3d9c172411e20b8f, 64'haa9cf76be8f6be89},
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h0fd630f1f29d0da9, 64'h95e60af593bd04cf, 64'h14873d74e81095eb},
    '{64'h0000000029CCC9D3, 64'hAB08C02401EF0335, 64'hB6941F66F373114F}
  };

  // Mechanism counters.
  int n_des_enc = 0, n_des_dec = 0, n_rot1 = 0, n_rot2 = 0;
  int n_mul_step = 0, n_sq_step = 0, n_final_sub = 0, n_ignored_start = 0, n_reset_mid = 0;

  always @(posedge clk) if (!Reset) begin
    if (dut.u_des.accept) begin
      if (Encrypt) n_des_enc++;
      else n_des_dec++;
    end
    if (dut.u_des.advance && dut.u_des.round != 4'd15) begin
      if (dut.u_des.u_keys.one_place) n_rot1++;
      else n_rot2++;
    end
    if (dut.u_rsa.state == dut.u_rsa.S_LOOP_GO) begin
      if (dut.u_rsa.e_q[0]) n_mul_step++;
      else n_sq_step++;
    end
    if (dut.u_rsa.u_mul_a.state == dut.u_rsa.u_mul_a.S_FIX &&
        dut.u_rsa.u_mul_a.s_q >= {1'b0, dut.u_rsa.u_mul_a.n_q}) n_final_sub++;
    if (Start && dut.state != dut.S_IDLE) n_ignored_start++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] ref_pow(input logic [63:0] bm, input logic [63:0] be,
                                          input logic [63:0] bn);
    logic [127:0] acc, base, modn;
    modn = {64'd0, bn};
    base = {64'd0, bm} % modn;
    acc  = 1 % modn;
    for (int i = 63; i >= 0; i--) begin
      acc = (acc * acc) % modn;
      if (be[i]) acc = (acc * base) % modn;
    end
    return acc[63:0];
  endfunction

  // One envelope operation. Optionally pulses Start again while busy.
  task automatic envelope(input logic [63:0] k, input logic [63:0] x, input bit enc,
                          input logic [63:0] nn, input logic [63:0] ee, input bit poke,
                          output logic [63:0] y, output logic [63:0] yk);
    logic [127:0] ne;
    int cyc;
    ne = {ee, nn};
    @(negedge clk);
    key = k; pt = x; Encrypt = enc; Start = 1'b1;
    Bus_Bits = ne[7:0];
    cyc = 0;
    for (int i = 1; i < 2 * NB; i++) begin
      @(negedge clk);
      Start = 1'b0; key = ~k; pt = ~x;   // captured at Start
      Bus_Bits = ne[8*i +: 8];
      cyc++;
    end
    @(negedge clk);
    Bus_Bits = 8'hA5;
    cyc++;
    while (!Done) begin
      if (poke && cyc == 500) Start = 1'b1;
      else Start = 1'b0;
      @(negedge clk);
      cyc++;
    end
    Start = 1'b0;
    check(cyc == LATENCY, $sformatf("Start to Done %0d cycles, expected %0d", cyc, LATENCY));
    y = ct;
    for (int i = 0; i < NB; i++) begin
      yk[8*i +: 8] = Output;
      @(negedge clk);
    end
    check(Output == 8'h00, "Output not back to 0 after the last byte");
    check(Done, "Done must stay high");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] y, yk, kr, yr, dummy;
    Reset = 1'b1; Start = 1'b0; Encrypt = 1'b1; Bus_Bits = '0; key = '0; pt = '0;
    repeat (3) @(negedge clk);
    Reset = 1'b0;
    check(!Done && Output == 8'h00, "outputs idle after reset");

    // Reset in the middle of an envelope, then carry on normally.
    @(negedge clk);
    key = vecs[0].key; pt = vecs[0].pt; Start = 1'b1; Bus_Bits = 8'h8F;
    @(negedge clk);
    Start = 1'b0;
    repeat (300) @(negedge clk);
    Reset = 1'b1;
    n_reset_mid++;
    @(negedge clk);
    Reset = 1'b0;
    check(!Done && dut.state == dut.S_IDLE, "Reset returns the chip to idle");

    for (int v = 0; v < NV; v++) begin
      // Sender.
      envelope(vecs[v].key, vecs[v].pt, 1'b1, N64, E64, v == 0, y, yk);
      check(y == vecs[v].ct, $sformatf("envelope %0d: y = %h, expected %h", v, y, vecs[v].ct));
      check(yk == ref_pow(vecs[v].key, E64, N64),
            $sformatf("envelope %0d: y' = %h, expected %h", v, yk, ref_pow(vecs[v].key, E64, N64)));
      // Receiver: RSA with D recovers the session key ...
      envelope(yk, y, 1'b0, N64, D64, 1'b0, dummy, kr);
      check(kr == vecs[v].key, $sformatf("recovered key %h, expected %h", kr, vecs[v].key));
      // ... and DES decryption with it recovers the data.
      envelope(kr, y, 1'b0, N64, E64, 1'b0, yr, dummy);
      check(yr == vecs[v].pt, $sformatf("recovered data %h, expected %h", yr, vecs[v].pt));
    end

    $display("mechanisms: des_enc=%0d des_dec=%0d rot1=%0d rot2=%0d mul_steps=%0d sq_only_steps=%0d final_sub=%0d ignored_start=%0d reset_mid=%0d",
             n_des_enc, n_des_dec, n_rot1, n_rot2, n_mul_step, n_sq_step, n_final_sub,
             n_ignored_start, n_reset_mid);
    check(n_des_enc > 0, "DES encryption never happened");
    check(n_des_dec > 0, "DES decryption never happened");
    check(n_rot1 > 0, "single-place key rotation never happened");
    check(n_rot2 > 0, "double-place key rotation never happened");
    check(n_mul_step > 0, "exponent step with multiplication never happened");
    check(n_sq_step > 0, "exponent step without multiplication never happened");
    check(n_final_sub > 0, "final Montgomery subtraction never happened");
    check(n_ignored_start > 0, "Start while busy never happened");
    check(n_reset_mid > 0, "Reset during an envelope never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
