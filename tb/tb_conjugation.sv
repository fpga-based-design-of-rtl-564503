// tb_conjugation: random values including the extremes; checks that the real part
// passes unchanged and the imaginary part is negated without overflow.
module tb_conjugation;
  localparam int W = 19;
  logic signed [W-1:0] in_re, in_im;
  logic signed [W:0] out_re, out_im;
  logic vin, vout;
  int checks = 0, failures = 0;
  conjugation #(.W(W)) dut (.*);
  initial begin
    for (int i = 0; i < 500; i++) begin
      int r, m;
      r = (i == 0) ? -(1 << (W-1)) : (i == 1) ? (1 << (W-1)) - 1 : int'($urandom % (1 << W)) - (1 << (W-1));
      m = (i == 2) ? -(1 << (W-1)) : (i == 3) ? (1 << (W-1)) - 1 : int'($urandom % (1 << W)) - (1 << (W-1));
      in_re = W'(r); in_im = W'(m); vin = 1'(i);
      #1;
      checks++;
      if (int'(out_re) != r || int'(out_im) != -m || vout != 1'(i)) begin
        failures++;
        if (failures < 5) $display("in %0d %0d out %0d %0d", r, m, out_re, out_im);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
