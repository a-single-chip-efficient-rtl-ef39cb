// tb_des_f: checks the DES round function F against reference values.
// The first two vectors are rounds 1 and 2 of the well-known worked example
// (key 133457799BBCDFF1, plaintext 0123456789ABCDEF); the rest are random
// (R, K) pairs whose F values were computed with an independent software
// model of the standard. F must be valid one cycle after R and K.
module tb_des_f;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] r, f;
  logic [47:0] k;

  des_f dut (.clk(clk), .r(r), .k(k), .f(f));

  typedef struct packed {
    logic [31:0] r;
    logic [47:0] k;
    logic [31:0] f;
  } vec_t;

  localparam int NV = 8;
  vec_t vecs [NV] = '{
    '{32'hF0AAF0AA, 48'h1B02EFFC7072, 32'h234AA9BB},
    '{32'hEF4A6544, 48'h79AED9DBC9E5, 32'h3CAB87A3},
    '{32'h52E6B438, 48'h269EF2A74DE4, 32'h60C2FECB},
    '{32'h6513270E, 48'h0C5CA6A3A450, 32'hED4A1C9B},
    '{32'h128B2F33, 48'h892FD23F0824, 32'h21FEB651},
    '{32'h1818E811, 48'h95315D9DC9F8, 32'hA279118F},
    '{32'h0ED90475, 48'h81E7E8E25D94, 32'h3D2C7158},
    '{32'h36F675CC, 48'h1600099950D8, 32'h0BB88BAA}
  };

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r = '0;
    k = '0;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      r = vecs[i].r;
      k = vecs[i].k;
      @(posedge clk);  // ROMs capture here
      #1;
      checks++;
      if (f !== vecs[i].f) begin
        failures++;
        $display("FAIL: F(%h,%h) = %h, expected %h", vecs[i].r, vecs[i].k, f, vecs[i].f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
