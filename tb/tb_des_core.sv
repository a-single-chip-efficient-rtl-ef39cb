// tb_des_core: encrypts and decrypts DES blocks and compares with ciphertexts
// from an independent software model of the standard (the first vector is
// the standard worked example). Every decryption must give back the
// plaintext. The test also checks the latency (done exactly 33 cycles after
// start), that start is ignored while busy, and that a new block can start
// in the done cycle.
module tb_des_core;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, start, encrypt, done, busy;
  logic [63:0] key, din, dout;

  des_core dut (.*);

  typedef struct packed {
    logic [63:0] key;
    logic [63:0] pt;
    logic [63:0] ct;
  } vec_t;

  localparam int NV = 7;
  localparam int LATENCY = 33;
  vec_t vecs [NV] = '{
    '{64'h133457799BBCDFF1, 64'h0123456789ABCDEF, 64'h85E813540F0AB405},
    '{64'h6b0d549b6f03675a, 64'h3d9c172411e20b8f, 64'haa9cf76be8f6be89},
    '{64'h8d116ece1738f7d9, 64'h0f21ddb66cad4a26, 64'h8845ba680d17d9dc},
    '{64'h90c192cfd3ac94af, 64'hf28c105d1fb17c23, 64'hc53d1d67f09dacba},
    '{64'ha170b33839263059, 64'h953f48f1a09f76b5, 64'h4492073585ded99d},
    '{64'h0fd630f1f29d0da9, 64'h95e60af593bd04cf, 64'h14873d74e81095eb},
    '{64'h0cb1e29c658cda14, 64'h3898d190f9ebdacc, 64'h564f8cf1711c2064}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Start a block at the next negedge and wait for done; returns the cycles.
  task automatic block(input logic [63:0] k, input logic [63:0] x, input bit enc,
                       output logic [63:0] y);
    int cyc = 0;
    @(negedge clk);
    key = k; din = x; encrypt = enc; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    key = '0; din = '0;
    cyc = 1;
    // A start while busy must be ignored.
    start = 1'b1; encrypt = ~enc;
    @(negedge clk);
    start = 1'b0; encrypt = enc;
    cyc++;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    y = dout;
    check(cyc == LATENCY, $sformatf("latency %0d, expected %0d", cyc, LATENCY));
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] y, z;
    rst = 1'b1; start = 1'b0; encrypt = 1'b1; key = '0; din = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < NV; i++) begin
      block(vecs[i].key, vecs[i].pt, 1'b1, y);
      check(y == vecs[i].ct, $sformatf("enc %0d: %h expected %h", i, y, vecs[i].ct));
      block(vecs[i].key, vecs[i].ct, 1'b0, z);
      check(z == vecs[i].pt, $sformatf("dec %0d: %h expected %h", i, z, vecs[i].pt));
    end
    // Back to back: start again in the done cycle.
    @(negedge clk);
    key = vecs[0].key; din = vecs[0].pt; encrypt = 1'b1; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    key = vecs[1].key; din = vecs[1].pt; start = 1'b1;
    check(dout == vecs[0].ct, "first of back-to-back pair");
    @(negedge clk);
    start = 1'b0;
    check(busy, "start in the done cycle not accepted");
    while (!done) @(negedge clk);
    check(dout == vecs[1].ct, "second of back-to-back pair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
