// mrc_combiner: maximal ratio combining of the K = 4 diversity branches.
//
// For each tone, the FFT outputs Y_p of the four branches are weighted by the
// conjugates of the branch channel estimates h_p and summed; the sum is divided
// by the total branch power:  Z = sum_p conj(h_p) * Y_p / sum_p |h_p|^2.
// Complex multipliers and an adder tree form the numerator and the power sum in a
// registered stage; two CORDIC dividers (real and imaginary) follow, as in the
// document. The result has the format of the inputs Y (HF = fractional bits of h
// is the divider pre-scale). Latency: 1 + (W - 1) clocks, one tone per clock
// possible; `vout` follows `vin`. Channel estimation itself is outside this block.
//
// Lint note: the valid output of the imaginary-part divider equals that of the
// real-part divider and is left unconnected (PINCONNECTEMPTY).
module mrc_combiner #(
  parameter int W  = 20,   // branch FFT output width
  parameter int HW = 8,    // channel estimate width
  parameter int HF = 6     // channel estimate fractional bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vin,
  input  logic signed [W-1:0]  y_re [4],
  input  logic signed [W-1:0]  y_im [4],
  input  logic signed [HW-1:0] h_re [4],
  input  logic signed [HW-1:0] h_im [4],
  output logic signed [W-1:0]  out_re,
  output logic signed [W-1:0]  out_im,
  output logic                 vout
);
  localparam int NW = W + HW + 3;
  localparam int DW = 2 * HW + 2;

  logic signed [NW-1:0] num_re, num_im, num_re_q, num_im_q;
  logic        [DW-1:0] pwr, pwr_q;
  logic                 v_q;

  always_comb begin
    num_re = '0; num_im = '0; pwr = '0;
    for (int p = 0; p < 4; p++) begin
      // conj(h) * y = (hr*yr + hi*yi) + j(hr*yi - hi*yr)
      num_re += NW'(h_re[p]) * NW'(y_re[p]) + NW'(h_im[p]) * NW'(y_im[p]);
      num_im += NW'(h_re[p]) * NW'(y_im[p]) - NW'(h_im[p]) * NW'(y_re[p]);
      pwr    += DW'(NW'(h_re[p]) * NW'(h_re[p]) + NW'(h_im[p]) * NW'(h_im[p]));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      num_re_q <= '0; num_im_q <= '0; pwr_q <= '0; v_q <= 1'b0;
    end else begin
      num_re_q <= num_re; num_im_q <= num_im; pwr_q <= pwr; v_q <= vin;
    end

  cordic_divider #(.NW(NW), .DW(DW), .QW(W), .QF(HF)) u_div_re (
    .clk, .rst_n, .vin(v_q), .num(num_re_q), .den(pwr_q), .q(out_re), .vout(vout));
  cordic_divider #(.NW(NW), .DW(DW), .QW(W), .QF(HF)) u_div_im (
    .clk, .rst_n, .vin(v_q), .num(num_im_q), .den(pwr_q), .q(out_im), .vout());
endmodule
