// qpsk_demapper: hard-decision QPSK de-mapper.
//
// Two comparators take the signs of the combined real and imaginary values
// (bit = 1 for a positive value, the inverse of the transmitter mapping, where
// address bit 1 sets the real and bit 0 the imaginary sign); a parallel to serial
// converter then sends the real bit and then the imaginary bit. Interface: one
// symbol per `vin` pulse, pulses at least two clocks apart; the two bits leave on
// the next two clocks with `vout`.
module qpsk_demapper #(
  parameter int W = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                vin,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                dout,
  output logic                vout
);
  logic second_q, im_bit_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      second_q <= 1'b0; im_bit_q <= 1'b0; dout <= 1'b0; vout <= 1'b0;
    end else if (vin) begin
      dout     <= (in_re > 0);
      im_bit_q <= (in_im > 0);
      vout     <= 1'b1;
      second_q <= 1'b1;
    end else if (second_q) begin
      dout     <= im_bit_q;
      vout     <= 1'b1;
      second_q <= 1'b0;
    end else begin
      vout     <= 1'b0;
    end
endmodule
