// tb_cordic_divider: random numerators and positive denominators, one division
// per clock; checks each quotient against num*2^QF/den computed in real arithmetic
// (within one LSB when in range) and the latency of QW-1 clocks.
module tb_cordic_divider;
  localparam int NW = 30, DW = 18, QW = 20, QF = 6;
  logic clk = 0, rst_n = 0, vin = 0;
  logic signed [NW-1:0] num = 0;
  logic [DW-1:0] den = 1;
  logic signed [QW-1:0] q;
  logic vout;
  int checks = 0, failures = 0, nin = 0, nout = 0, cyc = 0;
  cordic_divider #(.NW(NW), .DW(DW), .QW(QW), .QF(QF)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  real expq [$];
  int  expt [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      longint n, d;
      d = longint'($urandom % 32'(1 << DW - 1)) + 1;
      n = longint'($urandom % 32'(1 << 24)) - (1 << 23);
      if (i % 5 == 0) n = n * 16;
      @(negedge clk);
      vin = 1; num = NW'(n); den = DW'(d);
      expq.push_back(real'(n) * real'(1 << QF) / real'(d));
      expt.push_back(cyc + QW - 1);
      if (i % 7 == 6) begin @(negedge clk); vin = 0; end
    end
    @(negedge clk); vin = 0;
  end

  always @(negedge clk) if (vout) begin
    real e, lim;
    int t;
    e = expq.pop_front(); t = expt.pop_front();
    lim = real'((1 << (QW - 1)) - 1);
    if (e > lim) e = lim;
    if (e < -lim) e = -lim;
    checks++;
    if (real'(q) - e > 1.01 || e - real'(q) > 1.01 || cyc != t) begin
      failures++;
      if (failures < 5) $display("got %0d exp %f (t %0d vs %0d)", q, e, cyc, t);
    end
    nout++;
  end

  initial begin
    wait (nout == 500);
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
