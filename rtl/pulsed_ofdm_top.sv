// pulsed_ofdm_top: digital baseband of a Pulsed-OFDM transceiver.
//
// Transmitter: data bits -> rate 1/2 convolutional encoder -> parallel to serial
// -> inter- then inner-interleaver -> QPSK* mapper -> FFT input buffer -> 32-point
// MRMDC442 FFT -> FFT output buffer -> conjugation (together an IFFT) -> upsampler
// by 4 -> tx_out (to the DAC and the analog mixer, which are outside this design).
// Receiver: rx_in (from the ADCs of the analog front end) -> receiver input buffer
// (splits each 128-sample symbol into 4 polyphase branches) -> the same kind of
// MRMDC442 FFT, used sequentially for the 4 branches -> receiver output buffer ->
// maximal ratio combiner (channel estimates h on ports) -> QPSK de-mapper ->
// de-inner- then de-inter-interleaver -> Viterbi decoder -> rx_dout.
//
// Timing: one clock is one sample of the upsampled stream. The transmitter takes
// one data bit per 4 clocks on average (64 coded bits per 128-clock symbol) and
// sends 128 samples per symbol, `tx_vout` high for each; the receiver takes one
// sample per clock and delivers one decoded bit per 4 clocks on average. Transmit
// and receive paths are independent and can run at the same time. Cyclic prefix,
// pilots, synchronisation and channel estimation are not part of this design:
// every FFT frame carries 32 consecutive QPSK symbols and the receiver counts 128
// valid samples per symbol from reset.
//
// Lint note: Verilator reports rst_n as flopped both synchronously and
// asynchronously (SYNCASYNCNET) here because the sub-blocks' run-time assertions
// use it as their disable condition; every register uses it only as an
// asynchronous reset. The block-start outputs (vout2) of both interleaver
// instances are not needed here and are left unconnected (PINCONNECTEMPTY).
// rib_ch, the branch of the receiver FFT frame, drives no logic (the branch order
// is implied by the buffers' counters); it is kept as a named probe point for
// simulation, so Verilator reports it as unused (UNUSEDSIGNAL).
module pulsed_ofdm_top #(
  parameter int TX_FFT_W = 19,
  parameter int RX_IN_W  = 6,
  parameter int RX_FFT_W = 20,
  parameter int H_W      = 8,
  parameter int H_F      = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // transmitter
  input  logic                       tx_vin,
  input  logic                       tx_din,
  output logic signed [TX_FFT_W:0]   tx_out_re,
  output logic signed [TX_FFT_W:0]   tx_out_im,
  output logic                       tx_vout,
  // receiver
  input  logic                       rx_vin,
  input  logic signed [RX_IN_W-1:0]  rx_in_re,
  input  logic signed [RX_IN_W-1:0]  rx_in_im,
  input  logic signed [H_W-1:0]      h_re [4],
  input  logic signed [H_W-1:0]      h_im [4],
  output logic                       rx_dout,
  output logic                       rx_vout
);
  // ------------------------------------------------------------------ transmitter
  logic enc_a, enc_b, enc_v, ser_d, ser_v, il_d, il_v1;
  logic signed [1:0] map_re, map_im;
  logic map_v;
  logic tib_ce, tib_v1, tib_v2;
  logic signed [1:0] tib_re [4], tib_im [4];
  logic signed [TX_FFT_W-1:0] tfft_re [4], tfft_im [4];
  logic tfft_v;
  logic [2:0] tfft_grp;
  logic signed [TX_FFT_W-1:0] tob_re, tob_im;
  logic tob_v;
  logic signed [TX_FFT_W:0] cj_re, cj_im;
  logic cj_v;

  conv_encoder u_enc (.clk, .rst_n, .vin(tx_vin), .din(tx_din), .a(enc_a), .b(enc_b), .vout(enc_v));
  p2s u_p2s (.clk, .rst_n, .vin(enc_v), .a(enc_a), .b(enc_b), .dout(ser_d), .vout(ser_v));
  interleaver_deinterleaver u_tx_il (.clk, .rst_n, .opmode(1'b0), .vin(ser_v), .din(ser_d),
    .dout(il_d), .vout1(il_v1), .vout2());
  qpsk_mapper u_map (.clk, .rst_n, .vin(il_v1), .din(il_d), .out_re(map_re), .out_im(map_im), .vout(map_v));
  tx_input_buffer #(.W(2)) u_tib (.clk, .rst_n, .vin(map_v), .in_re(map_re), .in_im(map_im),
    .ce(tib_ce), .a_re(tib_re), .a_im(tib_im), .vout1(tib_v1), .vout2(tib_v2));
  mrmdc442_fft #(.IN_W(2), .OUT_W(TX_FFT_W), .CW(12), .CFRAC(10), .DFRAC(11)) u_tx_fft (
    .clk, .rst_n, .ce(tib_ce), .vin(tib_v1), .sof(tib_v1 & tib_v2), .in_re(tib_re), .in_im(tib_im),
    .out_re(tfft_re), .out_im(tfft_im), .vout(tfft_v), .out_grp(tfft_grp));
  tx_output_buffer #(.W(TX_FFT_W)) u_tob (.clk, .rst_n, .vin(tfft_v), .grp(tfft_grp),
    .a_re(tfft_re), .a_im(tfft_im), .out_re(tob_re), .out_im(tob_im), .vout(tob_v));
  conjugation #(.W(TX_FFT_W)) u_conj (.in_re(tob_re), .in_im(tob_im), .vin(tob_v),
    .out_re(cj_re), .out_im(cj_im), .vout(cj_v));
  upsampler #(.W(TX_FFT_W + 1), .UP(4)) u_up (.clk, .rst_n, .vin(cj_v), .in_re(cj_re), .in_im(cj_im),
    .out_re(tx_out_re), .out_im(tx_out_im), .vout(tx_vout));

  // ------------------------------------------------------------------ receiver
  logic rib_ce, rib_v1, rib_v2;
  logic signed [RX_IN_W-1:0] rib_re [4], rib_im [4];
  logic signed [RX_FFT_W-1:0] rfft_re [4], rfft_im [4];
  logic rfft_v;
  logic [2:0] rfft_grp;
  logic signed [RX_FFT_W-1:0] rob_re [4], rob_im [4];
  logic rob_v;
  logic signed [RX_FFT_W-1:0] mrc_re, mrc_im;
  logic [1:0] rib_ch;   // branch of the current receiver FFT frame (observed by the testbench)
  logic mrc_v, dm_d, dm_v, dil_d, dil_v1;

  rx_input_buffer #(.W(RX_IN_W)) u_rib (.clk, .rst_n, .vin(rx_vin), .in_re(rx_in_re), .in_im(rx_in_im),
    .ce(rib_ce), .a_re(rib_re), .a_im(rib_im), .vout1(rib_v1), .vout2(rib_v2), .ch(rib_ch));
  mrmdc442_fft #(.IN_W(RX_IN_W), .OUT_W(RX_FFT_W), .CW(13), .CFRAC(11), .DFRAC(8)) u_rx_fft (
    .clk, .rst_n, .ce(rib_ce), .vin(rib_v1), .sof(rib_v1 & rib_v2), .in_re(rib_re), .in_im(rib_im),
    .out_re(rfft_re), .out_im(rfft_im), .vout(rfft_v), .out_grp(rfft_grp));
  rx_output_buffer #(.W(RX_FFT_W)) u_rob (.clk, .rst_n, .vin(rfft_v), .grp(rfft_grp),
    .a_re(rfft_re), .a_im(rfft_im), .ch_re(rob_re), .ch_im(rob_im), .vout(rob_v));
  mrc_combiner #(.W(RX_FFT_W), .HW(H_W), .HF(H_F)) u_mrc (.clk, .rst_n, .vin(rob_v),
    .y_re(rob_re), .y_im(rob_im), .h_re, .h_im, .out_re(mrc_re), .out_im(mrc_im), .vout(mrc_v));
  qpsk_demapper #(.W(RX_FFT_W)) u_dm (.clk, .rst_n, .vin(mrc_v), .in_re(mrc_re), .in_im(mrc_im),
    .dout(dm_d), .vout(dm_v));
  interleaver_deinterleaver u_rx_il (.clk, .rst_n, .opmode(1'b1), .vin(dm_v), .din(dm_d),
    .dout(dil_d), .vout1(dil_v1), .vout2());
  viterbi_decoder u_vit (.clk, .rst_n, .vin(dil_v1), .din(dil_d), .dout(rx_dout), .vout(rx_vout));
endmodule
