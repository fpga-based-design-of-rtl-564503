// tb_viterbi_decoder: encodes random bits with a reference K = 7 encoder
// (generators 133, 171 written out as tap lists), sends the coded bits serially
// with isolated bit errors (one flipped bit in every 40 coded bits), and checks
// that the decoder returns the data bits, TB_DEPTH-1 pairs later.
module tb_viterbi_decoder;
  localparam int NB = 600, D = 36;
  logic clk = 0, rst_n = 0, vin = 0, din = 0;
  logic dout, vout;
  int checks = 0, failures = 0, nout = 0;
  viterbi_decoder #(.TB_DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  localparam int T0 [7] = '{1, 0, 1, 1, 0, 1, 1};
  localparam int T1 [7] = '{1, 1, 1, 1, 0, 0, 1};
  int hist [7] = '{0, 0, 0, 0, 0, 0, 0};
  logic data [NB + D];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NB + D; i++) begin
      int c0, c1;
      data[i] = (i < NB) ? 1'($urandom) : 1'b0;
      for (int d = 6; d > 0; d--) hist[d] = hist[d-1];
      hist[0] = int'(data[i]);
      c0 = 0; c1 = 0;
      for (int d = 0; d < 7; d++) begin c0 ^= hist[d] & T0[d]; c1 ^= hist[d] & T1[d]; end
      if (i % 20 == 7)  c0 ^= 1;
      if (i % 20 == 17) c1 ^= 1;
      @(negedge clk); vin = 1; din = 1'(c0);
      @(negedge clk); vin = 1; din = 1'(c1);
      @(negedge clk); vin = 0;
      repeat ($urandom % 2) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (vout) begin
    if (nout >= D - 1 && nout - (D - 1) < NB) begin
      checks++;
      if (dout != data[nout - (D - 1)]) begin
        failures++;
        if (failures < 5) $display("bit %0d got %b exp %b", nout - (D - 1), dout, data[nout - (D - 1)]);
      end
    end
    nout++;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
