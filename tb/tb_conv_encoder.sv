// tb_conv_encoder: checks the K = 7, rate 1/2 encoder against a reference that
// keeps its own history of input bits and applies the tap lists of 133 and 171
// (octal) bit by bit. Random bits with random gaps between them.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0, vin = 0, din = 0;
  logic a, b, vout;
  int checks = 0, failures = 0;
  conv_encoder dut (.*);
  always #5 clk = ~clk;

  // taps of x[t-d], d = 0..6, for 133 = 1 011 011 and 171 = 1 111 001
  localparam int T0 [7] = '{1, 0, 1, 1, 0, 1, 1};
  localparam int T1 [7] = '{1, 1, 1, 1, 0, 0, 1};
  int hist [7] = '{0, 0, 0, 0, 0, 0, 0};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int ea, eb;
      @(negedge clk);
      vin = 1; din = 1'($urandom);
      for (int d = 6; d > 0; d--) hist[d] = hist[d-1];
      hist[0] = int'(din);
      ea = 0; eb = 0;
      for (int d = 0; d < 7; d++) begin ea ^= hist[d] & T0[d]; eb ^= hist[d] & T1[d]; end
      @(negedge clk);
      vin = 0;
      checks++;
      if (!vout || a != 1'(ea) || b != 1'(eb)) begin
        failures++;
        if (failures < 5) $display("bit %0d: got %b%b v=%b exp %0d%0d", i, a, b, vout, ea, eb);
      end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
