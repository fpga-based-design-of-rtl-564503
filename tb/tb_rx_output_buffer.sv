// tb_rx_output_buffer: presents symbols of 4 branch frames, each 8 digit-reversed
// groups one every 4 clocks, and checks that the buffer returns the tones in order
// 0..31 with the 4 branches side by side, one tone per 4 clocks.
module tb_rx_output_buffer;
  localparam int W = 20, NSYM = 4;
  logic clk = 0, rst_n = 0, vin = 0;
  logic [2:0] grp = 0;
  logic signed [W-1:0] a_re [4], a_im [4], ch_re [4], ch_im [4];
  logic vout;
  int checks = 0, failures = 0;
  rx_output_buffer #(.W(W), .READ_STRIDE(4)) dut (.*);
  always #5 clk = ~clk;

  int xr [NSYM][4][32], xi [NSYM][4][32];
  int nout = 0, last_t = -1, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int s = 0; s < NSYM; s++) for (int p = 0; p < 4; p++) for (int k = 0; k < 32; k++) begin
      xr[s][p][k] = int'($urandom % 400000) - 200000; xi[s][p][k] = int'($urandom % 400000) - 200000;
    end
    for (int l = 0; l < 4; l++) begin a_re[l] = 0; a_im[l] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSYM; s++)
      for (int p = 0; p < 4; p++)
        for (int g = 0; g < 8; g++) begin
          @(negedge clk);
          vin = 1; grp = 3'(g);
          for (int l = 0; l < 4; l++) begin
            a_re[l] = W'(xr[s][p][g/2 + 4*l + 16*(g%2)]);
            a_im[l] = W'(xi[s][p][g/2 + 4*l + 16*(g%2)]);
          end
          @(negedge clk); vin = 0;
          repeat (2) @(negedge clk);
        end
  end

  always @(negedge clk) if (vout && nout < NSYM * 32) begin
    int s, k;
    s = nout / 32; k = nout % 32;
    for (int p = 0; p < 4; p++) begin
      checks++;
      if (int'(ch_re[p]) != xr[s][p][k] || int'(ch_im[p]) != xi[s][p][k]) begin
        failures++;
        if (failures < 5) $display("sym %0d tone %0d branch %0d", s, k, p);
      end
    end
    if (k > 0) begin checks++; if (cyc - last_t != 4) failures++; end
    last_t = cyc;
    nout++;
  end

  initial begin
    wait (nout == NSYM * 32);
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
