// tb_rect_interleaver: feeds random blocks of 150 bits (NA = 50, NB = 3), one bit
// every two clocks, first in interleave mode and then in de-interleave mode.
// Checks every output bit against the permutation formula (out[i] =
// in[i/NA + NB*(i%NA)], and its inverse), the block-start flag, and that the
// output rate is one bit per READ_STRIDE = 2 clocks.
module tb_rect_interleaver;
  localparam int NA = 50, NB = 3, N = NA * NB, NBLK = 6;
  logic clk = 0, rst_n = 0, mode = 0, vin = 0, din = 0;
  logic dout, vout1, vout2;
  int checks = 0, failures = 0;
  rect_interleaver #(.NA(NA), .NB(NB), .READ_STRIDE(2)) dut (.*);
  always #5 clk = ~clk;

  logic blk [NBLK][N];
  int ob = 0, oi = 0, last_t = -1, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int b = 0; b < NBLK; b++) for (int i = 0; i < N; i++) blk[b][i] = 1'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      if (b == NBLK / 2) begin
        wait (ob == NBLK / 2);
        mode = 1;
      end
      for (int i = 0; i < N; i++) begin
        @(negedge clk); vin = 1; din = blk[b][i];
        @(negedge clk); vin = 0;
      end
    end
  end

  always @(negedge clk) if (vout1 && ob < NBLK) begin
    int src;
    if (ob < NBLK / 2) src = oi / NA + NB * (oi % NA);
    else               src = (oi % NB) * NA + oi / NB;
    checks++;
    if (dout != blk[ob][src] || vout2 != (oi == 0)) begin
      failures++;
      if (failures < 5) $display("blk %0d bit %0d got %b exp %b", ob, oi, dout, blk[ob][src]);
    end
    if (oi > 0) begin checks++; if (cyc - last_t != 2) failures++; end
    last_t = cyc;
    if (oi == N - 1) begin oi = 0; ob++; end else oi++;
  end

  initial begin
    wait (ob == NBLK);
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
