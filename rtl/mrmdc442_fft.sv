// mrmdc442_fft: 32-point pipelined mixed-radix (4-4-2) multi-path delay commutator FFT.
//
// Decimation in frequency with n = 8*n1 + 2*n2 + n3 and k = k1 + 4*k2 + 16*k3.
// A frame is 8 groups of 4 samples; group m (0..7) carries x[m], x[m+8], x[m+16],
// x[m+24] on lanes 0..3. Stage 1 is a radix-4 butterfly across the lanes followed by
// the twiddle W32^(m*k1). A delay commutator (lane delays 0/2/4/6, a rotating switch,
// then delays 6/4/2/0) regroups the data so that stage 2, another radix-4 butterfly,
// sees the four n2 values on its lanes; its twiddle is W32^(4*n3*k2). Stage 3 is a
// radix-2 butterfly between consecutive groups of the same lane.
//
// Interface: the datapath advances only on `ce`, one group per `ce`. `sof` marks the
// first group of a frame; frames must start a multiple of 8 `ce` pulses apart while
// earlier frames are still in the pipeline (the input buffers guarantee this).
// Outputs change one clock after a `ce`; `vout` is a one-clock pulse at that moment.
// Results leave in digit-reversed order: group `out_grp` lane l holds tone
// pofdm_pkg::fft_out_index(out_grp, l). The first result group of a frame appears one clock after the
// tenth `ce`, counting the `ce` that took the frame's first group.
//
// Wordlengths: the document gives the coefficient format (Fix_12_10 in the
// transmitter, Fix_13_11 in the receiver) and, through its buffer sizes, 19-bit
// (transmitter) and 20-bit (receiver) results. This design keeps DFRAC fractional
// bits internally without scaling, so OUT_W >= IN_W + 6 + DFRAC never overflows.
module mrmdc442_fft
  import pofdm_pkg::*;
#(
  parameter int IN_W  = 2,
  parameter int OUT_W = 19,
  parameter int CW    = 12,
  parameter int CFRAC = 10,
  parameter int DFRAC = 11
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ce,
  input  logic                    vin,
  input  logic                    sof,
  input  logic signed [IN_W-1:0]  in_re  [4],
  input  logic signed [IN_W-1:0]  in_im  [4],
  output logic signed [OUT_W-1:0] out_re [4],
  output logic signed [OUT_W-1:0] out_im [4],
  output logic                    vout,
  output logic [2:0]              out_grp
);
  localparam int W  = OUT_W;
  localparam int PW = W + CW + 1;
  typedef logic signed [W-1:0] d_t;

  // ---------------------------------------------------------------- helpers
  // (ar + j ai) * W32^e, rounded back to DFRAC fractional bits
  function automatic d_t mul_re(input d_t ar, input d_t ai, input int e);
    logic signed [PW-1:0] p;
    logic signed [CW-1:0] wr, wi;
    wr = CW'(tw_re(e, CFRAC));
    wi = CW'(tw_im(e, CFRAC));
    p  = PW'(ar) * PW'(wr) - PW'(ai) * PW'(wi) + (PW'(1) <<< (CFRAC - 1));
    return d_t'(p >>> CFRAC);
  endfunction

  function automatic d_t mul_im(input d_t ar, input d_t ai, input int e);
    logic signed [PW-1:0] p;
    logic signed [CW-1:0] wr, wi;
    wr = CW'(tw_re(e, CFRAC));
    wi = CW'(tw_im(e, CFRAC));
    p  = PW'(ar) * PW'(wi) + PW'(ai) * PW'(wr) + (PW'(1) <<< (CFRAC - 1));
    return d_t'(p >>> CFRAC);
  endfunction

  // radix-4 butterfly, output k = sum_n x[n] * (-j)^(n*k)
  function automatic void bf4(input d_t xr [4], input d_t xi [4], output d_t yr [4], output d_t yi [4]);
    yr[0] = xr[0] + xr[1] + xr[2] + xr[3];
    yi[0] = xi[0] + xi[1] + xi[2] + xi[3];
    yr[1] = xr[0] + xi[1] - xr[2] - xi[3];
    yi[1] = xi[0] - xr[1] - xi[2] + xr[3];
    yr[2] = xr[0] - xr[1] + xr[2] - xr[3];
    yi[2] = xi[0] - xi[1] + xi[2] - xi[3];
    yr[3] = xr[0] - xi[1] - xr[2] + xi[3];
    yi[3] = xi[0] + xr[1] - xi[2] - xr[3];
  endfunction

  // ---------------------------------------------------------------- frame phase
  logic [2:0] ph_cnt, ph0;
  assign ph0 = sof ? 3'd0 : ph_cnt;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  ph_cnt <= '0;
    else if (ce) ph_cnt <= ph0 + 3'd1;

  // ---------------------------------------------------------------- stage 1
  d_t x_r [4], x_i [4], y1_r [4], y1_i [4];
  d_t s1_r [4], s1_i [4];
  logic [2:0] s1_ph;
  logic       s1_v;

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      x_r[l] = d_t'(in_re[l]) <<< DFRAC;
      x_i[l] = d_t'(in_im[l]) <<< DFRAC;
    end
    bf4(x_r, x_i, y1_r, y1_i);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_v  <= 1'b0;
      s1_ph <= '0;
      for (int l = 0; l < 4; l++) begin s1_r[l] <= '0; s1_i[l] <= '0; end
    end else if (ce) begin
      s1_v  <= vin;
      s1_ph <= ph0;
      for (int l = 0; l < 4; l++) begin
        s1_r[l] <= mul_re(y1_r[l], y1_i[l], int'(ph0) * l);
        s1_i[l] <= mul_im(y1_r[l], y1_i[l], int'(ph0) * l);
      end
    end

  // ---------------------------------------------------------------- delay commutator (L = 2)
  // lane a is delayed 2a before the switch and 6-2b after it (b = output lane)
  d_t dl_r [4][6], dl_i [4][6];   // input-side delay lines
  d_t dr_r [4][6], dr_i [4][6];   // output-side delay lines
  d_t sw_in_r [4], sw_in_i [4], sw_r [4], sw_i [4], c1_r [4], c1_i [4];
  logic [5:0] c1_vsr;
  logic       c1_v;
  logic [2:0] c1_ph;
  logic [1:0] rot;

  assign rot = s1_ph[2:1];
  always_comb begin
    for (int a = 0; a < 4; a++) begin
      sw_in_r[a] = (a == 0) ? s1_r[a] : dl_r[a][2*a-1];
      sw_in_i[a] = (a == 0) ? s1_i[a] : dl_i[a][2*a-1];
    end
    for (int b = 0; b < 4; b++) begin
      sw_r[b] = sw_in_r[2'(rot - 2'(b))];
      sw_i[b] = sw_in_i[2'(rot - 2'(b))];
    end
    for (int b = 0; b < 4; b++) begin
      c1_r[b] = (b == 3) ? sw_r[b] : dr_r[b][5-2*b];
      c1_i[b] = (b == 3) ? sw_i[b] : dr_i[b][5-2*b];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      c1_vsr <= '0;
      for (int l = 0; l < 4; l++)
        for (int t = 0; t < 6; t++) begin
          dl_r[l][t] <= '0; dl_i[l][t] <= '0; dr_r[l][t] <= '0; dr_i[l][t] <= '0;
        end
    end else if (ce) begin
      c1_vsr <= {c1_vsr[4:0], s1_v};
      for (int l = 0; l < 4; l++) begin
        dl_r[l][0] <= s1_r[l];  dl_i[l][0] <= s1_i[l];
        dr_r[l][0] <= sw_r[l];  dr_i[l][0] <= sw_i[l];
        for (int t = 1; t < 6; t++) begin
          dl_r[l][t] <= dl_r[l][t-1];  dl_i[l][t] <= dl_i[l][t-1];
          dr_r[l][t] <= dr_r[l][t-1];  dr_i[l][t] <= dr_i[l][t-1];
        end
      end
    end

  assign c1_v  = c1_vsr[5];
  assign c1_ph = s1_ph + 3'd2;    // element leaving now entered 6 ticks ago

  // ---------------------------------------------------------------- stage 2
  d_t y2_r [4], y2_i [4], s2_r [4], s2_i [4];
  logic [2:0] s2_ph;
  logic       s2_v;

  always_comb bf4(c1_r, c1_i, y2_r, y2_i);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s2_v  <= 1'b0;
      s2_ph <= '0;
      for (int l = 0; l < 4; l++) begin s2_r[l] <= '0; s2_i[l] <= '0; end
    end else if (ce) begin
      s2_v  <= c1_v;
      s2_ph <= c1_ph;
      for (int l = 0; l < 4; l++) begin
        s2_r[l] <= mul_re(y2_r[l], y2_i[l], 4 * int'(c1_ph[0]) * l);
        s2_i[l] <= mul_im(y2_r[l], y2_i[l], 4 * int'(c1_ph[0]) * l);
      end
    end

  // ---------------------------------------------------------------- stage 3 (radix 2)
  d_t hold_r [4], hold_i [4], pend_r [4], pend_i [4];
  logic pend_v, out_v, new_q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pend_v  <= 1'b0;
      out_v   <= 1'b0;
      out_grp <= '0;
      for (int l = 0; l < 4; l++) begin
        hold_r[l] <= '0; hold_i[l] <= '0; pend_r[l] <= '0; pend_i[l] <= '0;
        out_re[l] <= '0; out_im[l] <= '0;
      end
    end else if (ce) begin
      out_grp <= s2_ph - 3'd1;
      if (!s2_ph[0]) begin
        out_v <= pend_v;
        for (int l = 0; l < 4; l++) begin
          hold_r[l] <= s2_r[l];  hold_i[l] <= s2_i[l];
          out_re[l] <= pend_r[l]; out_im[l] <= pend_i[l];
        end
      end else begin
        out_v  <= s2_v;
        pend_v <= s2_v;
        for (int l = 0; l < 4; l++) begin
          out_re[l] <= hold_r[l] + s2_r[l];  out_im[l] <= hold_i[l] + s2_i[l];
          pend_r[l] <= hold_r[l] - s2_r[l];  pend_i[l] <= hold_i[l] - s2_i[l];
        end
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) new_q <= 1'b0;
    else        new_q <= ce;

  assign vout = new_q & out_v;

endmodule
