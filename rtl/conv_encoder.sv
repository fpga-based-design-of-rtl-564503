// conv_encoder: rate 1/2 convolutional encoder, constraint length 7.
//
// Each valid input bit is shifted into a 6-bit state register; the two coded bits
// are the parities of the 7-bit window under generators 133 and 171 (octal). The
// document names a rate 1/2 encoder; the generators are this design's choice (the
// usual pair for a K = 7 code). Interface: one bit per `vin`; `a`/`b` (g0/g1 bits)
// are registered and valid with `vout` one clock later. Reset clears the state.
module conv_encoder
  import pofdm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic vin,
  input  logic din,
  output logic a,
  output logic b,
  output logic vout
);
  logic [5:0] st;
  logic [6:0] win;

  assign win = {din, st};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      st <= '0; a <= 1'b0; b <= 1'b0; vout <= 1'b0;
    end else begin
      vout <= vin;
      if (vin) begin
        st <= win[6:1];
        a  <= ^(win & CC_G0);
        b  <= ^(win & CC_G1);
      end
    end
endmodule
