// tb_des_key_processor: checks the 16 round keys of two DES keys, in forward
// order for encryption and reverse order for decryption, against subkeys
// from an independent software model of the standard (the first key is the
// standard worked example 133457799BBCDFF1). Also checks that the key holds
// while `advance` is low and that `round` counts the steps.
module tb_des_key_processor;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        rst, load, encrypt, advance;
  logic [63:0] key;
  logic [47:0] subkey;
  logic [3:0]  round;

  des_key_processor dut (.*);

  logic [47:0] ks1 [16] = '{
    48'h1b02effc7072, 48'h79aed9dbc9e5, 48'h55fc8a42cf99, 48'h72add6db351d,
    48'h7cec07eb53a8, 48'h63a53e507b2f, 48'hec84b7f618bc, 48'hf78a3ac13bfb,
    48'he0dbebede781, 48'hb1f347ba464f, 48'h215fd3ded386, 48'h7571f59467e9,
    48'h97c5d1faba41, 48'h5f43b7f2e73a, 48'hbf918d3d3f0a, 48'hcb3d8b0e17f5};
  logic [47:0] ks2 [16] = '{
    48'h36146478e1e1, 48'h40bd1176e8fd, 48'h45a473239ddb, 48'he7c4828fb533,
    48'h7a83826f4f64, 48'h38901b58c9de, 48'h25005ec5d49d, 48'h264894cb36e9,
    48'h54554179f633, 48'h43c9453f4c2e, 48'h09e1878c79d6, 48'h3105aba5e2f5,
    48'hf100a1f38ec3, 48'h918a949e871f, 48'h1432961f77c4, 48'h606f044c3ae7};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [63:0] k, input bit enc, input logic [47:0] ks [16]);
    @(negedge clk);
    key = k; encrypt = enc; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    key = ~k;       // the key must have been captured
    for (int i = 0; i < 16; i++) begin
      int idx = enc ? i : 15 - i;
      check(subkey == ks[idx], $sformatf("%s key %h step %0d: %h expected %h",
            enc ? "enc" : "dec", k, i, subkey, ks[idx]));
      check(round == 4'(i), $sformatf("round %0d expected %0d", round, i));
      if (i == 5) begin  // hold for two cycles
        @(negedge clk);
        @(negedge clk);
        check(subkey == ks[idx], "subkey changed without advance");
      end
      advance = 1'b1;
      @(negedge clk);
      advance = 1'b0;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; advance = 1'b0; encrypt = 1'b1; key = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(64'h133457799BBCDFF1, 1'b1, ks1);
    run(64'h133457799BBCDFF1, 1'b0, ks1);
    run(64'h0E329232EA6D0D73, 1'b0, ks2);
    run(64'h0E329232EA6D0D73, 1'b1, ks2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
