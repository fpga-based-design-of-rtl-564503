// tb_rx_input_buffer: streams symbols of 128 random 6-bit samples, one per clock,
// with an idle gap before one symbol, and checks that each symbol comes out as 4
// frames (branch p = samples 4n+p) of 8 groups (group m = branch values m, m+8,
// m+16, m+24), with the branch number, vout2 on each frame's first group, and
// frames only on frame boundaries of the enable count.
module tb_rx_input_buffer;
  localparam int W = 6, NSYM = 5;
  logic clk = 0, rst_n = 0, vin = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic ce, vout1, vout2;
  logic [1:0] ch;
  logic signed [W-1:0] a_re [4], a_im [4];
  int checks = 0, failures = 0;
  rx_input_buffer #(.W(W), .GROUP_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;

  int sr [NSYM][128], si [NSYM][128];
  int os = 0, og = 0, ce_cnt = 0, first_ce = -1;

  initial begin
    for (int s = 0; s < NSYM; s++) for (int n = 0; n < 128; n++) begin
      sr[s][n] = int'($urandom % 64) - 32; si[s][n] = int'($urandom % 64) - 32;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      if (s == 3) repeat (57) @(negedge clk);
      for (int n = 0; n < 128; n++) begin
        @(negedge clk); vin = 1; in_re = W'(sr[s][n]); in_im = W'(si[s][n]);
      end
      @(negedge clk); vin = 0;
    end
  end

  always @(posedge clk) if (rst_n && ce) begin
    ce_cnt <= ce_cnt + 1;
    if (vout1 && os < NSYM) begin
      int p, m;
      p = og / 8; m = og % 8;
      checks++;
      if (vout2 != (m == 0) || int'(ch) != p) failures++;
      if (og % 8 == 0) begin
        if (first_ce < 0) first_ce = ce_cnt;
        checks++;
        if ((ce_cnt - first_ce) % 8 != 0) failures++;
      end
      for (int l = 0; l < 4; l++) begin
        checks++;
        if (int'(a_re[l]) != sr[os][4*(8*l+m)+p] || int'(a_im[l]) != si[os][4*(8*l+m)+p]) begin
          failures++;
          if (failures < 5) $display("sym %0d grp %0d lane %0d", os, og, l);
        end
      end
      if (og == 31) begin og = 0; os++; end else og++;
    end
  end

  initial begin
    wait (os == NSYM);
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
