// tb_qpsk_mapper: random bit pairs; checks each QPSK* symbol: real = +1 when the
// first bit is 1 (else -1), imaginary = -1 when the second bit is 1 (else +1), the
// conjugate of plain QPSK. Also checks the three-clock latency and that the
// outputs are zero while no symbol is valid.
module tb_qpsk_mapper;
  logic clk = 0, rst_n = 0, vin = 0, din = 0;
  logic signed [1:0] out_re, out_im;
  logic vout;
  int checks = 0, failures = 0;
  qpsk_mapper dut (.*);
  always #5 clk = ~clk;
  int exp_re [$], exp_im [$], exp_t [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      logic b1, b0;
      b1 = 1'($urandom); b0 = 1'($urandom);
      @(negedge clk); vin = 1; din = b1;
      @(negedge clk); vin = 1; din = b0;
      exp_re.push_back(b1 ? 1 : -1);
      exp_im.push_back(b0 ? -1 : 1);
      exp_t.push_back(cyc + 3);
      @(negedge clk); vin = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    repeat (6) @(negedge clk);
    checks++; if (exp_re.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (vout) begin
      checks++;
      if (exp_re.size() == 0) failures++;
      else begin
        int er, ei, et;
        er = exp_re.pop_front(); ei = exp_im.pop_front(); et = exp_t.pop_front();
        if (int'(out_re) != er || int'(out_im) != ei || cyc != et) begin
          failures++;
          if (failures < 5) $display("got %0d %0d at %0d exp %0d %0d at %0d", out_re, out_im, cyc, er, ei, et);
        end
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
