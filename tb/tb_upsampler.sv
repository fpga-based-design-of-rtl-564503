// tb_upsampler: bursts of samples, each held for 4 clocks as the slow-rate input;
// checks that the output, one clock later, is the sample followed by three zeros,
// that vout is vin delayed by one clock and that the output rate is 4x the input
// rate (4 output samples per input sample).
module tb_upsampler;
  localparam int W = 20;
  logic clk = 0, rst_n = 0, vin = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0, out_re, out_im;
  logic vout;
  int checks = 0, failures = 0, n_in = 0, n_out = 0;
  upsampler #(.W(W), .UP(4)) dut (.*);
  always #5 clk = ~clk;
  int q_re [$], q_im [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int burst = 0; burst < 6; burst++) begin
      for (int s = 0; s < 20; s++) begin
        int r, m;
        r = int'($urandom % 1000) - 500; m = int'($urandom % 1000) - 500;
        n_in++;
        q_re.push_back(r); q_re.push_back(0); q_re.push_back(0); q_re.push_back(0);
        q_im.push_back(m); q_im.push_back(0); q_im.push_back(0); q_im.push_back(0);
        for (int c = 0; c < 4; c++) begin
          @(negedge clk); vin = 1; in_re = W'(r); in_im = W'(m);
        end
      end
      @(negedge clk); vin = 0; in_re = 7; in_im = 7;
      repeat (burst) @(negedge clk);
    end
    repeat (4) @(negedge clk);
    checks++; if (n_out != 4 * n_in || q_re.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic vin_d = 0;
  always @(posedge clk) vin_d <= vin;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (vout != vin_d) failures++;
    if (vout) begin
      int er, ei;
      n_out++;
      er = q_re.pop_front(); ei = q_im.pop_front();
      checks++;
      if (int'(out_re) != er || int'(out_im) != ei) begin
        failures++;
        if (failures < 5) $display("got %0d %0d exp %0d %0d", out_re, out_im, er, ei);
      end
    end else begin
      checks++;
      if (out_re != 0 || out_im != 0) failures++;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
