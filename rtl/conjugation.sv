// conjugation: completes the transmitter IFFT by negating the imaginary part of
// the FFT output (IFFT{X} = conj(FFT{conj X}), the input conjugate being taken by
// the QPSK* mapper). Combinational, as in the document (no flip-flops); the output
// is one bit wider so that negating the most negative input cannot overflow.
// The real part (sign-extended) and the valid pass straight through; only the
// imaginary part is computed.
module conjugation #(
  parameter int W = 19
) (
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic                vin,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im,
  output logic                vout
);
  assign out_re = (W+1)'(in_re);
  assign out_im = -((W+1)'(in_im));
  assign vout   = vin;
endmodule
