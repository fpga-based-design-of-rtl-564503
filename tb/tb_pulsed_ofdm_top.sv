// tb_pulsed_ofdm_top: end-to-end loopback of the Pulsed-OFDM baseband.
//
// Random data bits enter the transmitter at one bit per 4 clocks. Its upsampled
// output goes through a 4-tap multipath channel at the upsampled rate (taps
// 1, 0.5, -0.75, 0.25), so the 4 polyphase branches see the symbol scaled by
// different gains, then an ADC model (scale 1/2, uniform noise of +-NOISE LSB,
// rounding, 6-bit saturation) and into the receiver, which is given the tap
// values as its channel estimates. The decoded bits must equal the data bits.
// The testbench also counts the design's mechanisms and fails if one never
// happens: zero insertion by the upsampler, interleaving (opmode 0) and
// de-interleaving (opmode 1) blocks, bank swaps of the buffers, all four branches
// through the shared receiver FFT, MRC divisions, and coded-bit errors corrected
// by the Viterbi decoder. The design runs at its default parameters.
module tb_pulsed_ofdm_top;
  localparam int NBITS = 3000;         // data bits checked
  localparam int NOISE = 3;
  localparam int D     = 36;           // Viterbi TB_DEPTH (design default)
  localparam real TAPS [4] = '{1.0, 0.5, -0.75, 0.25};

  logic clk = 0, rst_n = 0, tx_vin = 0, tx_din = 0;
  logic signed [19:0] tx_out_re, tx_out_im;
  logic tx_vout;
  logic rx_vin = 0;
  logic signed [5:0] rx_in_re = 0, rx_in_im = 0;
  logic signed [7:0] h_re [4], h_im [4];
  logic rx_dout, rx_vout;
  int checks = 0, failures = 0;

  pulsed_ofdm_top dut (.*);
  always #5 clk = ~clk;

  logic data [$];
  int nsent = 0, ndec = 0, nerr = 0;

  // ---------------- transmitter stimulus: one bit per 4 clocks, zeros after the data
  initial begin
    for (int p = 0; p < 4; p++) begin h_re[p] = 8'(int'(TAPS[p] * 64.0)); h_im[p] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      @(negedge clk);
      tx_vin = 1;
      tx_din = (nsent < NBITS) ? 1'($urandom) : 1'b0;
      data.push_back(tx_din);
      nsent++;
      @(negedge clk); tx_vin = 0;
      repeat (2) @(negedge clk);
    end
  end

  // ---------------- channel and ADC model, on the stream of valid samples
  real hist_re [4] = '{0.0, 0.0, 0.0, 0.0}, hist_im [4] = '{0.0, 0.0, 0.0, 0.0};
  function automatic logic signed [5:0] adc(input real v);
    int r;
    r = $rtoi(v / 2.0 + ((v >= 0.0) ? 0.5 : -0.5)) + int'($urandom % (2 * NOISE + 1)) - NOISE;
    if (r > 31) r = 31;
    if (r < -32) r = -32;
    return 6'(r);
  endfunction

  always @(posedge clk) begin
    rx_vin <= 1'b0;
    if (tx_vout) begin
      real yr, yi;
      for (int l = 3; l > 0; l--) begin hist_re[l] = hist_re[l-1]; hist_im[l] = hist_im[l-1]; end
      hist_re[0] = real'(tx_out_re) / 2048.0;
      hist_im[0] = real'(tx_out_im) / 2048.0;
      yr = 0.0; yi = 0.0;
      for (int l = 0; l < 4; l++) begin yr += TAPS[l] * hist_re[l]; yi += TAPS[l] * hist_im[l]; end
      rx_in_re <= adc(yr);
      rx_in_im <= adc(yi);
      rx_vin   <= 1'b1;
    end
  end

  // ---------------- output check
  always @(negedge clk) if (rx_vout) begin
    if (ndec >= D - 1 && ndec - (D - 1) < NBITS) begin
      checks++;
      if (rx_dout != data[ndec - (D - 1)]) begin
        failures++;
        if (failures < 5) $display("decoded bit %0d wrong", ndec - (D - 1));
      end
    end
    ndec++;
  end

  // ---------------- mechanism counters
  int n_zero_ins = 0, n_il_blk = 0, n_dil_blk = 0, n_tx_frames = 0, n_swaps = 0, n_div = 0;
  int n_branch [4] = '{0, 0, 0, 0};
  logic coded_tx [$];
  int n_coded_rx = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.tx_vout && dut.u_up.cnt != 0) n_zero_ins++;
    if (dut.u_tx_il.vout1 && dut.u_tx_il.vout2) n_il_blk++;
    if (dut.u_rx_il.vout1 && dut.u_rx_il.vout2) n_dil_blk++;
    if (dut.tfft_v && dut.tfft_grp == 0) n_tx_frames++;
    if (dut.rib_ce && dut.rib_v1 && dut.rib_v2) n_branch[dut.rib_ch]++;
    if (dut.u_rob.rd_done || dut.u_tob.rd_done) n_swaps++;
    if (dut.mrc_v) n_div++;
    if (dut.ser_v) coded_tx.push_back(dut.ser_d);
    if (dut.dil_v1) begin
      if (coded_tx.size() > 0 && coded_tx.pop_front() != dut.dil_d) nerr++;
      n_coded_rx++;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    else $display("%-34s %0d", what, n);
  endtask

  initial begin
    wait (ndec >= NBITS + D);
    need("upsampler zero insertions", n_zero_ins);
    need("interleaved blocks (opmode 0)", n_il_blk);
    need("de-interleaved blocks (opmode 1)", n_dil_blk);
    need("transmitter FFT frames", n_tx_frames);
    for (int p = 0; p < 4; p++) need($sformatf("receiver FFT frames, branch %0d", p), n_branch[p]);
    need("output buffer bank swaps", n_swaps);
    need("MRC divisions", n_div);
    need("coded-bit errors corrected", nerr);
    $display("coded bits compared %0d", n_coded_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: %0d bits decoded", ndec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
