// viterbi_decoder: hard-decision Viterbi decoder for the rate 1/2, K = 7 code
// (generators 133, 171 octal) of conv_encoder.
//
// Coded bits arrive serially, g0 bit first; each pair drives one trellis step.
// For each of the 64 states an add-compare-select unit adds the Hamming distance
// between the received pair and the branch's expected pair to the metrics of the
// two predecessor states and keeps the smaller. Path metrics are 8-bit and
// compared modulo 256 (their spread stays far below 128, so no normalisation is
// needed). Survivors are kept by register exchange, TB_DEPTH decoded bits per
// state; after each step the oldest bit of the best state's survivor is output.
// The document names the decoder only; the hard-decision metric, the register
// exchange and the depth are this design's choices.
//
// Interface: coded bits with `vin` pulses, the first bit after reset being the g0
// bit of the first pair. Each pair yields one `vout` pulse two clocks after its
// second bit, carrying the decoded bit of the pair TB_DEPTH-1 pairs earlier; the
// first TB_DEPTH-1 outputs are start-up fill.
module viterbi_decoder
  import pofdm_pkg::*;
#(
  parameter int TB_DEPTH = 36
) (
  input  logic clk,
  input  logic rst_n,
  input  logic vin,
  input  logic din,
  output logic dout,
  output logic vout
);
  localparam int NS = 64;

  logic          have_first, first_bit;
  logic [1:0]    pair;
  logic          step;
  logic [7:0]    pm     [NS];
  logic [7:0]    pm_nx  [NS];
  logic [TB_DEPTH-1:0] surv    [NS];
  logic [TB_DEPTH-1:0] surv_nx [NS];

  // pair the serial bits
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      have_first <= 1'b0; first_bit <= 1'b0; pair <= '0; step <= 1'b0;
    end else begin
      step <= 1'b0;
      if (vin) begin
        if (!have_first) begin
          first_bit  <= din;
          have_first <= 1'b1;
        end else begin
          pair       <= {first_bit, din};
          have_first <= 1'b0;
          step       <= 1'b1;
        end
      end
    end

  function automatic logic [1:0] hdist(input logic [1:0] a, input logic [1:0] b);
    return {1'b0, a[1] ^ b[1]} + {1'b0, a[0] ^ b[0]};
  endfunction

  // add-compare-select: state n = {u, s[5:1]} is reached from p = {n[4:0], b}
  always_comb
    for (int n = 0; n < NS; n++) begin
      logic [5:0] p0, p1;
      logic [6:0] w0, w1;
      logic [7:0] m0, m1;
      p0 = {n[4:0], 1'b0};
      p1 = {n[4:0], 1'b1};
      w0 = {n[5], p0};
      w1 = {n[5], p1};
      m0 = pm[p0] + 8'(hdist(pair, {^(w0 & CC_G0), ^(w0 & CC_G1)}));
      m1 = pm[p1] + 8'(hdist(pair, {^(w1 & CC_G0), ^(w1 & CC_G1)}));
      if ($signed(m1 - m0) < 0) begin
        pm_nx[n]   = m1;
        surv_nx[n] = {surv[p1][TB_DEPTH-2:0], n[5]};
      end else begin
        pm_nx[n]   = m0;
        surv_nx[n] = {surv[p0][TB_DEPTH-2:0], n[5]};
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int n = 0; n < NS; n++) begin
        pm[n]   <= (n == 0) ? 8'd0 : 8'd32;   // encoder starts in state 0
        surv[n] <= '0;
      end
    end else if (step) begin
      pm   <= pm_nx;
      surv <= surv_nx;
    end

  // best state: comparison tree over the 64 metrics
  logic [7:0] tm [2*NS-1];
  logic [5:0] ts [2*NS-1];
  always_comb begin
    for (int n = 0; n < NS; n++) begin
      tm[NS-1+n] = pm[n];
      ts[NS-1+n] = 6'(n);
    end
    for (int i = NS - 2; i >= 0; i--) begin
      if ($signed(tm[2*i+2] - tm[2*i+1]) < 0) begin
        tm[i] = tm[2*i+2]; ts[i] = ts[2*i+2];
      end else begin
        tm[i] = tm[2*i+1]; ts[i] = ts[2*i+1];
      end
    end
  end

  logic step_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      step_q <= 1'b0; dout <= 1'b0; vout <= 1'b0;
    end else begin
      step_q <= step;
      vout   <= step_q;
      if (step_q) dout <= surv[ts[0]][TB_DEPTH-1];
    end
endmodule
