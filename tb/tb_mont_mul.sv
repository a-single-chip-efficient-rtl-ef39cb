// tb_mont_mul: checks P = A*B*2^-W mod N for random and edge-case operands.
// The product is verified without computing an inverse: P must be below N
// and P * 2^W mod N must equal A*B mod N, both worked out with plain wide
// integer arithmetic in the testbench. done must come W+2 cycles after start.
module tb_mont_mul;
  localparam int unsigned W = 64;   // the module's default width
  localparam int LATENCY = W + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int final_subs = 0;

  logic         rst, start, done, busy;
  logic [W-1:0] a, b, n, p;

  mont_mul dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [W-1:0] rand_w();
    return {$urandom, $urandom};
  endfunction

  task automatic one(input logic [W-1:0] ta, input logic [W-1:0] tb, input logic [W-1:0] tn);
    logic [3*W-1:0] lhs, rhs;
    int cyc = 0;
    @(negedge clk);
    a = ta; b = tb; n = tn; start = 1'b1;
    @(negedge clk);
    start = 1'b0; a = '0; b = '0; n = '0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    lhs = ({{(2*W){1'b0}}, p} << W) % {{(2*W){1'b0}}, tn};
    rhs = ({{(2*W){1'b0}}, ta} * {{(2*W){1'b0}}, tb}) % {{(2*W){1'b0}}, tn};
    check(p < tn, $sformatf("p=%h not below n=%h", p, tn));
    check(lhs == rhs, $sformatf("a=%h b=%h n=%h: p=%h", ta, tb, tn, p));
    check(cyc == LATENCY, $sformatf("latency %0d, expected %0d", cyc, LATENCY));
  endtask

  // Count how often the closing subtraction is needed.
  always @(posedge clk) if (dut.state == dut.S_FIX && dut.s_q >= {1'b0, dut.n_q}) final_subs++;

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] tn;
    rst = 1'b1; start = 1'b0; a = '0; b = '0; n = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    one(64'd65, 64'd17, 64'd3233);
    one('0, 64'd5, 64'd3233);
    one('1, 64'd3232, 64'd3233);
    one('1, 64'hE7251A1279738A8E, 64'hE7251A1279738A8F);
    for (int i = 0; i < 60; i++) begin
      tn = rand_w() | 64'h1;
      if (i % 3 == 0) tn[W-1] = 1'b1;
      one(rand_w(), rand_w() % tn, tn);
    end
    check(final_subs > 0, "final subtraction never exercised");
    $display("final subtractions: %0d", final_subs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
