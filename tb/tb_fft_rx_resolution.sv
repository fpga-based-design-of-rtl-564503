// tb_fft_rx_resolution: measures the numerical resolution of the FFT at the
// receiver wordlengths (6-bit inputs, Fix_13_11 coefficients, 8 fractional data
// bits, 20-bit results).
//
// Frames of random full-range 6-bit complex samples run back to back through
// mrmdc442_fft, as the receiver input buffer feeds it (one group of 4 per `ce`,
// `ce` every 4 clocks). Every result is compared with a double-precision DFT. Two
// checks per frame: each result must be within 0.1 of the DFT, and the frame's
// RMS error relative to its RMS output must be below 2^-9, i.e. 9 bits of
// resolution, the target quoted for these coefficient wordlengths. The best
// resolution over all frames is printed in bits.
module tb_fft_rx_resolution;
  localparam int IN_W = 6, OUT_W = 20, CW = 13, CFRAC = 11, DFRAC = 8;
  localparam int NFR = 40;

  logic clk = 0, rst_n = 0, ce = 0, vin = 0, sof = 0;
  logic signed [IN_W-1:0]  in_re [4], in_im [4];
  logic signed [OUT_W-1:0] out_re [4], out_im [4];
  logic vout;
  logic [2:0] out_grp;
  int checks = 0, failures = 0;

  mrmdc442_fft #(.IN_W(IN_W), .OUT_W(OUT_W), .CW(CW), .CFRAC(CFRAC), .DFRAC(DFRAC)) dut (.*);

  always #5 clk = ~clk;

  int  xr [NFR][32], xi [NFR][32];
  real er [NFR][32], ei [NFR][32];
  real err2 [NFR], sig2 [NFR];
  int  out_frame = 0, out_grp_cnt = 0;
  real worst_bits = 100.0;

  initial begin
    for (int f = 0; f < NFR; f++) begin
      err2[f] = 0.0; sig2[f] = 0.0;
      for (int n = 0; n < 32; n++) begin
        xr[f][n] = int'($urandom % 63) - 31;
        xi[f][n] = int'($urandom % 63) - 31;
      end
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
  end

  // stimulus: frames of 8 groups back to back, `ce` every 4th clock
  initial begin
    for (int l = 0; l < 4; l++) begin in_re[l] = 0; in_im[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++)
      for (int g = 0; g < 8; g++) begin
        repeat (3) @(posedge clk);
        ce <= 1; vin <= 1; sof <= (g == 0);
        for (int l = 0; l < 4; l++) begin
          in_re[l] <= IN_W'(xr[f][8*l+g]);
          in_im[l] <= IN_W'(xi[f][8*l+g]);
        end
        @(posedge clk);
        ce <= 0; vin <= 0; sof <= 0;
      end
    forever begin
      repeat (3) @(posedge clk);
      ce <= 1; @(posedge clk); ce <= 0;
    end
  end

  always @(posedge clk) if (rst_n && vout && out_frame < NFR) begin
    for (int l = 0; l < 4; l++) begin
      int k;
      real dr, di;
      k  = int'(pofdm_pkg::fft_out_index(out_grp, 2'(l)));
      dr = real'(out_re[l]) / real'(1 << DFRAC) - er[out_frame][k];
      di = real'(out_im[l]) / real'(1 << DFRAC) - ei[out_frame][k];
      err2[out_frame] += dr * dr + di * di;
      sig2[out_frame] += er[out_frame][k] * er[out_frame][k] + ei[out_frame][k] * ei[out_frame][k];
      checks++;
      if (dr > 0.1 || dr < -0.1 || di > 0.1 || di < -0.1) begin
        failures++;
        if (failures < 10) $display("frame %0d tone %0d error %f %f", out_frame, k, dr, di);
      end
    end
    if (out_grp_cnt == 7) begin
      real bits;
      bits = -0.5 * $ln(err2[out_frame] / sig2[out_frame]) / $ln(2.0);
      if (bits < worst_bits) worst_bits = bits;
      checks++;
      if (bits < 9.0) begin
        failures++;
        $display("frame %0d resolution %f bits", out_frame, bits);
      end
      out_grp_cnt = 0;
      out_frame++;
    end else out_grp_cnt++;
  end

  initial begin
    wait (out_frame == NFR);
    $display("worst frame resolution %0.2f bits", worst_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: %0d frames seen", out_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
