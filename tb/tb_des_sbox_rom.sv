// tb_des_sbox_rom: checks the eight S-box ROMs.
// Every row of every DES S-box is a permutation of 0..15; the test reads all
// 512 entries and checks that property, plus two complete rows and several
// single entries copied from the published standard (S1 row 0, S8 row 3).
// It also checks the one-cycle read latency: data appears the cycle after
// its address.
module tb_des_sbox_rom;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [5:0] addr;
  logic [3:0] dout [8];

  for (genvar g = 0; g < 8; g++) begin : g_rom
    des_sbox_rom #(.BOX(g + 1)) dut (.clk(clk), .addr(addr), .dout(dout[g]));
  end

  // Address of row r, column c: outer bits b5,b0 = row, inner b4..b1 = column.
  function automatic logic [5:0] rc(input int r, input int c);
    return {1'(r >> 1), 4'(c), 1'(r)};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int s1_row0 [16] = '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7};
  int s8_row3 [16] = '{2, 1, 14, 7, 4, 10, 8, 13, 15, 12, 9, 0, 3, 5, 6, 11};

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen [8];
    addr = '0;
    @(negedge clk);
    for (int r = 0; r < 4; r++) begin
      for (int b = 0; b < 8; b++) seen[b] = '0;
      for (int c = 0; c < 16; c++) begin
        addr = rc(r, c);
        @(negedge clk);
        for (int b = 0; b < 8; b++) seen[b][dout[b]] = 1'b1;
        if (r == 0) check(dout[0] == 4'(s1_row0[c]), $sformatf("S1 row0 col%0d = %0d", c, dout[0]));
        if (r == 3) check(dout[7] == 4'(s8_row3[c]), $sformatf("S8 row3 col%0d = %0d", c, dout[7]));
      end
      for (int b = 0; b < 8; b++)
        check(seen[b] == 16'hFFFF, $sformatf("S%0d row %0d not a permutation", b + 1, r));
    end
    // Single entries from the standard.
    addr = rc(2, 5);  @(negedge clk); check(dout[4] == 4'd13, "S5 row2 col5");
    addr = rc(1, 0);  @(negedge clk); check(dout[2] == 4'd13, "S3 row1 col0");
    addr = rc(3, 15); @(negedge clk); check(dout[5] == 4'd13, "S6 row3 col15");
    addr = rc(0, 15); @(negedge clk); check(dout[1] == 4'd10, "S2 row0 col15");
    // Latency: change the address just after a rising edge; the output must
    // not follow until the next one.
    addr = rc(0, 0);  @(negedge clk);
    @(posedge clk); #1 addr = rc(0, 1);
    #2 check(dout[0] == 4'd14, "output changed before the clock edge");
    @(posedge clk); #1 check(dout[0] == 4'd4, "output one cycle after address");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
