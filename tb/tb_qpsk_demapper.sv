// tb_qpsk_demapper: random combined values (including zero); checks that the
// real decision (1 when positive) and then the imaginary decision leave serially
// on the two clocks after each symbol.
module tb_qpsk_demapper;
  localparam int W = 20;
  logic clk = 0, rst_n = 0, vin = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic dout, vout;
  int checks = 0, failures = 0;
  qpsk_demapper #(.W(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int r, m;
      r = (i % 17 == 0) ? 0 : int'($urandom % 200000) - 100000;
      m = (i % 13 == 0) ? 0 : int'($urandom % 200000) - 100000;
      @(negedge clk); vin = 1; in_re = W'(r); in_im = W'(m);
      @(negedge clk); vin = 0;
      checks++; if (!vout || dout != (r > 0)) failures++;
      @(negedge clk);
      checks++; if (!vout || dout != (m > 0)) failures++;
      repeat ($urandom % 2) begin @(negedge clk); checks++; if (vout) failures++; end
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
