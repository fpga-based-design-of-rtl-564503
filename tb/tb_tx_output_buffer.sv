// tb_tx_output_buffer: presents frames of FFT results as 8 digit-reversed groups
// (group g lane l = tone k1 + 4*l + 16*k3, k1 = g/2, k3 = g%2, computed here from
// that formula) and checks that the tones come out in order 0..31, each held for
// 4 clocks with vout high, frames back to back without a gap.
module tb_tx_output_buffer;
  localparam int W = 19, NFR = 6;
  logic clk = 0, rst_n = 0, vin = 0;
  logic [2:0] grp = 0;
  logic signed [W-1:0] a_re [4], a_im [4], out_re, out_im;
  logic vout;
  int checks = 0, failures = 0;
  tx_output_buffer #(.W(W), .READ_STRIDE(4)) dut (.*);
  always #5 clk = ~clk;

  int xr [NFR][32], xi [NFR][32];
  int nout = 0, hold = 0, prev_v = 0, started = 0;

  initial begin
    for (int f = 0; f < NFR; f++) for (int k = 0; k < 32; k++) begin
      xr[f][k] = int'($urandom % 400000) - 200000; xi[f][k] = int'($urandom % 400000) - 200000;
    end
    for (int l = 0; l < 4; l++) begin a_re[l] = 0; a_im[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      for (int g = 0; g < 8; g++) begin
        @(negedge clk);
        vin = 1; grp = 3'(g);
        for (int l = 0; l < 4; l++) begin
          a_re[l] = W'(xr[f][g/2 + 4*l + 16*(g%2)]);
          a_im[l] = W'(xi[f][g/2 + 4*l + 16*(g%2)]);
        end
        @(negedge clk); vin = 0;
        repeat (2) @(negedge clk);
      end
      repeat (128 - 32) @(negedge clk);
    end
  end

  always @(negedge clk) if (rst_n) begin
    if (vout) begin
      int f, k;
      f = nout / 128; k = (nout % 128) / 4;
      started = 1;
      checks++;
      if (int'(out_re) != xr[f][k] || int'(out_im) != xi[f][k]) begin
        failures++;
        if (failures < 5) $display("sample %0d tone %0d got %0d exp %0d", nout, k, out_re, xr[f][k]);
      end
      nout++;
    end else if (started != 0 && nout < NFR * 128) begin
      checks++; failures++;    // a gap inside the stream
      if (failures < 5) $display("gap at %0d", nout);
    end
  end

  initial begin
    wait (nout == NFR * 128);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
