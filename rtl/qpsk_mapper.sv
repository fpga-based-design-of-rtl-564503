// qpsk_mapper: QPSK* mapper, the conjugate of QPSK, so that the following FFT
// computes an IFFT once the imaginary part is negated at its output.
//
// A serial-to-parallel register pairs the incoming bits (first bit = address MSB);
// the pair addresses a 4-entry ROM holding 1101, 1111, 0101, 0111 (addresses 0..3,
// as given by the document). The two upper ROM bits are the real and the two lower
// bits the imaginary output, each a two's complement value +1 or -1. The output
// register is cleared while the delayed input valid is low, as in the document.
// Interface: bits arrive with `vin` pulses; after every second bit the symbol
// appears three clocks later for one clock, with `vout`; otherwise the outputs are 0.
module qpsk_mapper
  import pofdm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              vin,
  input  logic              din,
  output logic signed [1:0] out_re,
  output logic signed [1:0] out_im,
  output logic              vout
);
  logic       first_q, msb_q;   // serial to parallel
  logic [1:0] addr_q;
  logic       en_q, rst_q;      // delayed valids: ROM enable, register clear
  logic [3:0] rom_q, reg_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      first_q <= 1'b0; msb_q <= 1'b0; addr_q <= '0; en_q <= 1'b0;
    end else begin
      en_q <= 1'b0;
      if (vin) begin
        if (!first_q) begin
          msb_q   <= din;
          first_q <= 1'b1;
        end else begin
          addr_q  <= {msb_q, din};
          first_q <= 1'b0;
          en_q    <= 1'b1;
        end
      end
    end

  // ROM read, registered
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rom_q <= '0; rst_q <= 1'b0;
    end else begin
      rst_q <= en_q;
      if (en_q) rom_q <= QPSK_CONJ_ROM[addr_q];
    end

  // output register, cleared when the delayed valid is low
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      reg_q <= '0; vout <= 1'b0;
    end else begin
      reg_q <= rst_q ? rom_q : 4'b0000;
      vout  <= rst_q;
    end

  assign out_re = reg_q[3:2];
  assign out_im = reg_q[1:0];
endmodule
