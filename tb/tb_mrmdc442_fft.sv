// tb_mrmdc442_fft: checks the 32-point MRMDC FFT against a floating-point DFT.
//
// Frames of random samples (QPSK values +-1 at the transmitter wordlengths) are fed
// as 8 groups of 4 with a clock enable every 4 clocks, back to back and after idle
// gaps. Each digit-reversed output is mapped back to its tone and compared with
// the DFT to within 0.05. The latency from a frame's first group to its first
// result group is checked: it appears one clock after the tenth enable, counting the
// enable that took the first group.
module tb_mrmdc442_fft;
  localparam int IN_W = 2, OUT_W = 19, CW = 12, CFRAC = 10, DFRAC = 11;
  localparam int NFR = 12;

  logic clk = 0, rst_n = 0, ce = 0, vin = 0, sof = 0;
  logic signed [IN_W-1:0]  in_re [4], in_im [4];
  logic signed [OUT_W-1:0] out_re [4], out_im [4];
  logic vout;
  logic [2:0] out_grp;
  int checks = 0, failures = 0;

  mrmdc442_fft #(.IN_W(IN_W), .OUT_W(OUT_W), .CW(CW), .CFRAC(CFRAC), .DFRAC(DFRAC)) dut (.*);

  always #5 clk = ~clk;

  int xr [NFR][32], xi [NFR][32];
  real er [NFR][32], ei [NFR][32];
  int tick = 0, start_tick [NFR], first_out_tick [NFR];
  int out_frame = 0, out_grp_cnt = 0;

  initial begin
    for (int f = 0; f < NFR; f++)
      for (int n = 0; n < 32; n++) begin
        xr[f][n] = 2 * int'($urandom % 2) - 1;
        xi[f][n] = 2 * int'($urandom % 2) - 1;
        if (f == 0) begin xr[f][n] = (n == 3) ? 1 : 0; xi[f][n] = 0; end
      end
    for (int f = 0; f < NFR; f++)
      for (int k = 0; k < 32; k++) begin
        er[f][k] = 0.0; ei[f][k] = 0.0;
        for (int n = 0; n < 32; n++) begin
          real a;
          a = -2.0 * 3.14159265358979 * real'(n * k) / 32.0;
          er[f][k] += real'(xr[f][n]) * $cos(a) - real'(xi[f][n]) * $sin(a);
          ei[f][k] += real'(xr[f][n]) * $sin(a) + real'(xi[f][n]) * $cos(a);
        end
      end
  end

  // stimulus: ce every 4th clock, frames of 8 groups, gaps of 0 or 8 ticks
  initial begin
    for (int l = 0; l < 4; l++) begin in_re[l] = 0; in_im[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      if (f % 3 == 2) repeat (8 * 4) @(posedge clk);
      for (int g = 0; g < 8; g++) begin
        repeat (3) @(posedge clk);
        ce <= 1; vin <= 1; sof <= (g == 0);
        if (g == 0) start_tick[f] = tick;
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= IN_W'(xr[f][8*l+g]);
          in_im[l] <= IN_W'(xi[f][8*l+g]);
        end
        @(posedge clk);
        ce <= 0; vin <= 0; sof <= 0;
      end
    end
    forever begin
      repeat (3) @(posedge clk);
      ce <= 1; @(posedge clk); ce <= 0;
    end
  end

  always @(posedge clk) if (ce) tick <= tick + 1;

  // checker
  always @(posedge clk) if (rst_n && vout && out_frame < NFR) begin
    if (out_grp_cnt == 0) begin
      checks++;
      if (out_grp != 0) begin failures++; $display("frame %0d first group %0d", out_frame, out_grp); end
      first_out_tick[out_frame] = tick;
      if (tick - start_tick[out_frame] != 10) begin
        failures++; $display("frame %0d latency %0d", out_frame, tick - start_tick[out_frame]);
      end
    end
    for (int l = 0; l < 4; l++) begin
      int k;
      real gr, gi;
      k  = int'(pofdm_pkg::fft_out_index(out_grp, 2'(l)));
      gr = real'(out_re[l]) / real'(1 << DFRAC);
      gi = real'(out_im[l]) / real'(1 << DFRAC);
      checks++;
      if ((gr - er[out_frame][k]) > 0.05 || (er[out_frame][k] - gr) > 0.05 ||
          (gi - ei[out_frame][k]) > 0.05 || (ei[out_frame][k] - gi) > 0.05) begin
        failures++;
        if (failures < 10) $display("frame %0d k=%0d got %f %f exp %f %f", out_frame, k, gr, gi, er[out_frame][k], ei[out_frame][k]);
      end
    end
    if (out_grp_cnt == 7) begin out_grp_cnt = 0; out_frame++; end
    else out_grp_cnt++;
  end

  initial begin
    wait (out_frame == NFR);
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: %0d frames seen", out_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
