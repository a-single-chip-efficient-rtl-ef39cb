// tb_rsa_modexp: checks C = M^E mod N against a left-to-right square and
// multiply computed in the testbench with plain wide integers (a different
// order and no Montgomery arithmetic). Cases: the small textbook key
// (N = 3233, E = 17, D = 2753), a 64-bit key pair whose decryption must undo
// the encryption, and random odd moduli, exponents and messages. Also checks
// the latency 2W + 1 + (W+2)(W+3) cycles and that exponent bits of both
// values occur (multiplier B idle and busy).
module tb_rsa_modexp;
  localparam int unsigned W = 64;   // the module's default width
  localparam int LATENCY = 2 * W + 1 + (W + 2) * (W + 3);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int mult_steps = 0, square_only_steps = 0;

  logic         rst, start, done, busy;
  logic [W-1:0] m, e, n, c;

  rsa_modexp dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0] ref_pow(input logic [W-1:0] bm, input logic [W-1:0] be,
                                           input logic [W-1:0] bn);
    logic [2*W-1:0] acc, base, modn;
    modn = {{W{1'b0}}, bn};
    base = {{W{1'b0}}, bm} % modn;
    acc  = 1 % modn;
    for (int i = W - 1; i >= 0; i--) begin
      acc = (acc * acc) % modn;
      if (be[i]) acc = (acc * base) % modn;
    end
    return acc[W-1:0];
  endfunction

  function automatic logic [W-1:0] rand_w();
    return {$urandom, $urandom};
  endfunction

  task automatic run(input logic [W-1:0] tm, input logic [W-1:0] te, input logic [W-1:0] tn,
                     output logic [W-1:0] res);
    int cyc = 0;
    @(negedge clk);
    m = tm; e = te; n = tn; start = 1'b1;
    @(negedge clk);
    start = 1'b0; m = '0; e = '0; n = '0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    res = c;
    check(res == ref_pow(tm, te, tn), $sformatf("%h^%h mod %h = %h, expected %h",
          tm, te, tn, res, ref_pow(tm, te, tn)));
    check(cyc == LATENCY, $sformatf("latency %0d, expected %0d", cyc, LATENCY));
  endtask

  always @(posedge clk)
    if (dut.state == dut.S_LOOP_GO) begin
      if (dut.e_q[0]) mult_steps++;
      else square_only_steps++;
    end

  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] y, z, tn, tm;
    localparam logic [W-1:0] N64 = 64'hE7251A1279738A8F;
    localparam logic [W-1:0] E64 = 64'h10001;
    localparam logic [W-1:0] D64 = 64'h8D289C5558A20D49;
    rst = 1'b1; start = 1'b0; m = '0; e = '0; n = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(64'd65, 64'd17, 64'd3233, y);
    check(y == 64'd2790, "textbook encryption 65^17 mod 3233 = 2790");
    run(y, 64'd2753, 64'd3233, z);
    check(z == 64'd65, "textbook decryption gives 65");
    for (int i = 0; i < 3; i++) begin
      tm = rand_w() % N64;
      run(tm, E64, N64, y);
      run(y, D64, N64, z);
      check(z == tm, $sformatf("64-bit round trip %h -> %h -> %h", tm, y, z));
    end
    for (int i = 0; i < 4; i++) begin
      tn = rand_w() | 64'h8000_0000_0000_0001;
      run(rand_w(), rand_w(), tn, y);
    end
    run(64'h1234, '0, N64, y);   // E = 0 gives 1
    check(mult_steps > 0 && square_only_steps > 0, "both kinds of exponent step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
