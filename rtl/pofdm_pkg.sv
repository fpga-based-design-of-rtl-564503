// pofdm_pkg: constants and helper functions shared by the Pulsed-OFDM baseband.
//
// Holds the convolutional code generators, the QPSK constellation tables and the
// 32-point FFT twiddle factors. Twiddles are derived from a 17-bit quarter-wave
// cosine table, cos(pi*k/16) scaled by 2^16 (k = 0..8), rounded here to whatever
// coefficient wordlength a FFT instance asks for. Code generators 133/171 (octal,
// constraint length 7) are this design's choice; the document only says "rate 1/2".
// Lint note: when the package is checked on its own, the constants used only by
// the encoder, decoder and mapper are reported as unused parameters.
package pofdm_pkg;

  // Constraint length 7, rate 1/2 code; MSB of each mask taps the newest input bit.
  localparam int unsigned CC_K = 7;
  localparam logic [6:0]  CC_G0 = 7'o133;
  localparam logic [6:0]  CC_G1 = 7'o171;

  // QPSK* ROM of the mapper: {re[1:0], im[1:0]}, two's complement, +1 = 2'b01, -1 = 2'b11.
  localparam logic [3:0] QPSK_CONJ_ROM [4] = '{4'b1101, 4'b1111, 4'b0101, 4'b0111};

  // round(cos(pi*k/16) * 2^16), k = 0..8
  localparam int COS_Q16 [9] = '{65536, 64277, 60547, 54491, 46341, 36410, 25080, 12785, 0};

  // cos(2*pi*e/32) * 2^16 for any e (quarter-wave symmetry).
  function automatic int cos32_q16(input int e);
    int r;
    r = e & 31;
    if (r <= 8)       return  COS_Q16[r];
    else if (r <= 16) return -COS_Q16[16 - r];
    else if (r <= 24) return -COS_Q16[r - 16];
    else              return  COS_Q16[32 - r];
  endfunction

  // Round a 2^16-scaled value to FRAC fractional bits (FRAC <= 16).
  function automatic int round_q16(input int v, input int frac);
    int sh;
    sh = 16 - frac;
    if (sh == 0) return v;
    return (v + (1 <<< (sh - 1))) >>> sh;
  endfunction

  // W32^e = cos(2*pi*e/32) - j*sin(2*pi*e/32), real and imaginary parts at FRAC bits.
  function automatic int tw_re(input int e, input int frac);
    return round_q16(cos32_q16(e), frac);
  endfunction

  function automatic int tw_im(input int e, input int frac);
    return -round_q16(cos32_q16(e - 8), frac);
  endfunction

  // Bit position of output lane/group in the MRMDC442 digit-reversed output:
  // group g (0..7) on lane l (0..3) carries tone k1 + 4*k2 + 16*k3 with k1 = g/2,
  // k3 = g%2, k2 = l.
  function automatic logic [4:0] fft_out_index(input logic [2:0] g, input logic [1:0] l);
    return {g[0], l, g[2:1]};
  endfunction

endpackage
