// tb_tx_input_buffer: writes frames of 32 random QPSK symbols, one every 4 clocks,
// and checks that each frame comes out as 8 groups (group m = symbols m, m+8,
// m+16, m+24), with `ce` one clock in four, `vout2` on the first group, and every
// frame starting on a frame boundary (a multiple of 8 enables after the first).
module tb_tx_input_buffer;
  localparam int NFR = 8;
  logic clk = 0, rst_n = 0, vin = 0;
  logic signed [1:0] in_re = 0, in_im = 0;
  logic ce, vout1, vout2;
  logic signed [1:0] a_re [4], a_im [4];
  int checks = 0, failures = 0;
  tx_input_buffer #(.W(2), .GROUP_CYCLES(4)) dut (.*);
  always #5 clk = ~clk;

  int sr [NFR][32], si [NFR][32];
  int of = 0, og = 0, ce_cnt = 0, first_ce = -1;

  initial begin
    for (int f = 0; f < NFR; f++) for (int n = 0; n < 32; n++) begin
      sr[f][n] = 2 * int'($urandom % 2) - 1; si[f][n] = 2 * int'($urandom % 2) - 1;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      for (int n = 0; n < 32; n++) begin
        @(negedge clk); vin = 1; in_re = 2'(sr[f][n]); in_im = 2'(si[f][n]);
        @(negedge clk); vin = 0;
        repeat (2 + (f == 3 ? 5 : 0)) @(negedge clk);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ce) begin
      ce_cnt <= ce_cnt + 1;
      if (vout1 && of < NFR) begin
        checks++;
        if (vout2 != (og == 0)) failures++;
        if (og == 0) begin
          if (first_ce < 0) first_ce = ce_cnt;
          checks++;
          if ((ce_cnt - first_ce) % 8 != 0) failures++;
        end
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (int'(a_re[l]) != sr[of][8*l+og] || int'(a_im[l]) != si[of][8*l+og]) begin
            failures++;
            if (failures < 5) $display("frame %0d grp %0d lane %0d", of, og, l);
          end
        end
        if (og == 7) begin og = 0; of++; end else og++;
      end
    end
  end

  // ce is exactly one clock in four
  int since = 0;
  always @(posedge clk) if (rst_n) begin
    if (ce) begin
      if (since != 3 && ce_cnt > 0) begin failures++; end
      since <= 0;
    end else since <= since + 1;
  end

  initial begin
    wait (of == NFR);
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
