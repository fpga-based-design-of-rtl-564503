// tb_mrc_combiner: random complex branch values Y_p and channel estimates h_p;
// checks each output against sum conj(h_p) Y_p / sum |h_p|^2 computed in real
// arithmetic (h in Fix_8_6), within 1.5 LSB, and the latency of 1 + 19 clocks.
module tb_mrc_combiner;
  localparam int W = 20, HW = 8, HF = 6;
  logic clk = 0, rst_n = 0, vin = 0;
  logic signed [W-1:0] y_re [4], y_im [4], out_re, out_im;
  logic signed [HW-1:0] h_re [4], h_im [4];
  logic vout;
  int checks = 0, failures = 0, nout = 0, cyc = 0;
  mrc_combiner #(.W(W), .HW(HW), .HF(HF)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  real er [$], ei [$];
  int et [$];

  initial begin
    for (int p = 0; p < 4; p++) begin y_re[p] = 0; y_im[p] = 0; h_re[p] = 64; h_im[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      real nr, ni, pw;
      @(negedge clk);
      vin = 1;
      nr = 0; ni = 0; pw = 0;
      for (int p = 0; p < 4; p++) begin
        real hr, hi, yr, yi;
        y_re[p] = W'(int'($urandom % 40000) - 20000);
        y_im[p] = W'(int'($urandom % 40000) - 20000);
        h_re[p] = HW'(int'($urandom % 256) - 128);
        h_im[p] = HW'(int'($urandom % 256) - 128);
        hr = real'(h_re[p]) / 64.0; hi = real'(h_im[p]) / 64.0;
        yr = real'(y_re[p]); yi = real'(y_im[p]);
        nr += hr * yr + hi * yi;
        ni += hr * yi - hi * yr;
        pw += hr * hr + hi * hi;
      end
      er.push_back(nr / pw); ei.push_back(ni / pw); et.push_back(cyc + 1 + W - 1);
      if (i % 4 == 3) begin @(negedge clk); vin = 0; end
    end
    @(negedge clk); vin = 0;
  end

  always @(negedge clk) if (vout) begin
    real a, b;
    int t;
    a = er.pop_front(); b = ei.pop_front(); t = et.pop_front();
    checks++;
    if (real'(out_re) - a > 1.5 || a - real'(out_re) > 1.5 || real'(out_im) - b > 1.5 || b - real'(out_im) > 1.5 || cyc != t) begin
      failures++;
      if (failures < 5) $display("got %0d %0d exp %f %f", out_re, out_im, a, b);
    end
    nout++;
  end

  initial begin
    wait (nout == 300);
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
