// interleaver_deinterleaver: the combined interleaver / de-interleaver.
//
// Two rectangular interleavers, the inter-interleaver (150 bits over the
// sub-bands) and the inner interleaver (50 bits over the tones of one symbol), are
// joined by multiplexers on their inputs and on the outputs so one block serves
// both directions, as in the document. With opmode = 0 (transmitter) the input
// is inter-interleaved and then inner-interleaved; with opmode = 1 (receiver) it
// is de-inner-interleaved and then de-inter-interleaved, each interleaver applying
// its inverse permutation. `vout1` marks each output bit, `vout2` the first bit of
// a block of the second stage. Change opmode only while the block is empty.
//
// Lint note: Verilator reports rst_n as flopped both synchronously and
// asynchronously (SYNCASYNCNET) here because the sub-blocks' run-time assertions
// use it as their disable condition; every register uses it only as an
// asynchronous reset.
module interleaver_deinterleaver #(
  parameter int INTER_NA    = 50,
  parameter int INTER_NB    = 3,
  parameter int INNER_NA    = 5,
  parameter int INNER_NB    = 10,
  parameter int READ_STRIDE = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic opmode,
  input  logic vin,
  input  logic din,
  output logic dout,
  output logic vout1,
  output logic vout2
);
  logic inter_vin, inter_din, inter_dout, inter_v1, inter_v2;
  logic inner_vin, inner_din, inner_dout, inner_v1, inner_v2;

  assign inter_vin = opmode ? inner_v1   : vin;
  assign inter_din = opmode ? inner_dout : din;
  assign inner_vin = opmode ? vin        : inter_v1;
  assign inner_din = opmode ? din        : inter_dout;

  rect_interleaver #(.NA(INTER_NA), .NB(INTER_NB), .READ_STRIDE(READ_STRIDE)) u_inter (
    .clk, .rst_n, .mode(opmode), .vin(inter_vin), .din(inter_din),
    .dout(inter_dout), .vout1(inter_v1), .vout2(inter_v2));

  rect_interleaver #(.NA(INNER_NA), .NB(INNER_NB), .READ_STRIDE(READ_STRIDE)) u_inner (
    .clk, .rst_n, .mode(opmode), .vin(inner_vin), .din(inner_din),
    .dout(inner_dout), .vout1(inner_v1), .vout2(inner_v2));

  assign dout  = opmode ? inter_dout : inner_dout;
  assign vout1 = opmode ? inter_v1   : inner_v1;
  assign vout2 = opmode ? inter_v2   : inner_v2;
endmodule
