// tb_interleaver_deinterleaver: two instances of the combined block, one in
// transmitter mode (opmode = 0) and one in receiver mode (opmode = 1), in series.
// Checks the transmitter output bit by bit against the inter- then inner-
// interleaving formulas applied to the input stream, and that the receiver
// instance returns the original stream.
module tb_interleaver_deinterleaver;
  localparam int NBITS = 900;   // 6 inter blocks of 150 = 18 inner blocks of 50
  logic clk = 0, rst_n = 0, vin = 0, din = 0;
  logic t_d, t_v1, t_v2, r_d, r_v1, r_v2;
  int checks = 0, failures = 0;
  interleaver_deinterleaver u_tx (.clk, .rst_n, .opmode(1'b0), .vin, .din, .dout(t_d), .vout1(t_v1), .vout2(t_v2));
  interleaver_deinterleaver u_rx (.clk, .rst_n, .opmode(1'b1), .vin(t_v1), .din(t_d), .dout(r_d), .vout1(r_v1), .vout2(r_v2));
  always #5 clk = ~clk;

  logic src [NBITS], mid [NBITS];
  int nt = 0, nr = 0;

  initial begin
    for (int i = 0; i < NBITS; i++) src[i] = 1'($urandom);
    // expected transmitter stream: inter (NA 50, NB 3) then inner (NA 5, NB 10)
    for (int b = 0; b < NBITS / 150; b++)
      for (int i = 0; i < 150; i++) mid[150*b + i] = src[150*b + i/50 + 3*(i%50)];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NBITS; i++) begin
      @(negedge clk); vin = 1; din = src[i];
      @(negedge clk); vin = 0;
    end
  end

  always @(negedge clk) begin
    if (t_v1 && nt < NBITS) begin
      int b, i;
      b = nt / 50; i = nt % 50;
      checks++;
      if (t_d != mid[50*b + i/5 + 10*(i%5)] || t_v2 != (i == 0)) failures++;
      nt++;
    end
    if (r_v1 && nr < NBITS) begin
      checks++;
      if (r_d != src[nr] || r_v2 != (nr % 150 == 0)) begin
        failures++;
        if (failures < 5) $display("rx bit %0d got %b exp %b", nr, r_d, src[nr]);
      end
      nr++;
    end
  end

  initial begin
    wait (nr == NBITS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("nt=%0d nr=%0d", nt, nr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
