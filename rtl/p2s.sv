// p2s: two-bit parallel to serial converter behind the convolutional encoder.
//
// A valid coded pair (a, b) is captured and sent out as two serial bits on
// consecutive clocks, a first. The code is used at its mother rate 1/2, so no bit
// is punctured. Interface: `vin` pulses must be at least two clocks apart; `dout`
// is valid while `vout` is high, one and two clocks after `vin`.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// disable condition of this block's run-time assertion, so Verilator reports it as
// flopped both synchronously and asynchronously (SYNCASYNCNET). The assertion is
// a simulation check only; no register samples rst_n synchronously.
module p2s (
  input  logic clk,
  input  logic rst_n,
  input  logic vin,
  input  logic a,
  input  logic b,
  output logic dout,
  output logic vout
);
  logic second_q, b_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      second_q <= 1'b0; b_q <= 1'b0; dout <= 1'b0; vout <= 1'b0;
    end else begin
      if (vin) begin
        dout     <= a;
        b_q      <= b;
        vout     <= 1'b1;
        second_q <= 1'b1;
      end else if (second_q) begin
        dout     <= b_q;
        vout     <= 1'b1;
        second_q <= 1'b0;
      end else begin
        vout     <= 1'b0;
      end
    end

  a_pair_spacing: assert property (@(posedge clk) disable iff (!rst_n) !(vin && second_q))
    else $error("p2s: pair arrived before the previous one was sent");
endmodule
