// tb_p2s: random coded pairs, two to four clocks apart; checks that a and then b
// leave on the next two clocks and that nothing is valid otherwise.
module tb_p2s;
  logic clk = 0, rst_n = 0, vin = 0, a = 0, b = 0;
  logic dout, vout;
  int checks = 0, failures = 0;
  p2s dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic ea, eb;
      int gap;
      @(negedge clk);
      vin = 1; a = 1'($urandom); b = 1'($urandom); ea = a; eb = b;
      @(negedge clk);
      vin = 0;
      checks++; if (!vout || dout != ea) failures++;
      @(negedge clk);
      checks++; if (!vout || dout != eb) failures++;
      gap = $urandom % 3;
      repeat (gap) begin
        @(negedge clk);
        checks++; if (vout) failures++;
      end
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
