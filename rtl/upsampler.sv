// upsampler: upsamples the transmitter samples by UP (4), inserting UP-1 zeros
// after every sample, so that the spectrum of the 32-sample OFDM symbol repeats
// UP times across the band (the Pulsed-OFDM spreading).
//
// As in the document, a small counter marks the first clock of each input sample
// period; a multiplexer passes the input there and a constant zero otherwise,
// into output registers that are held at zero while `vin` is low. The input is a
// slow-rate stream held for UP clocks per sample with `vin` high for the whole
// burst; the output changes every clock, one clock behind the input (the
// document's internal delay of one cycle), with `vout` a delayed `vin`.
module upsampler #(
  parameter int W  = 20,
  parameter int UP = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                vin,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                vout
);
  logic [$clog2(UP)-1:0] cnt;
  logic                  first;

  assign first = (cnt == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)   cnt <= '0;
    else if (!vin) cnt <= '0;
    else          cnt <= (int'(cnt) == UP - 1) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_re <= '0; out_im <= '0; vout <= 1'b0;
    end else begin
      vout   <= vin;
      out_re <= (vin && first) ? in_re : '0;
      out_im <= (vin && first) ? in_im : '0;
    end
endmodule
