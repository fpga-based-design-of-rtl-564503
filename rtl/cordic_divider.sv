// cordic_divider: pipelined linear-mode CORDIC divider, q = num * 2^QF / den.
//
// Linear CORDIC drives y towards zero: at iteration i (weight 2^i, from
// 2^(QW-2) down to 1, in units of the quotient LSB) it subtracts den*2^i from y
// and adds 2^i to q when y is non-negative, and does the opposite otherwise. After
// QW-1 iterations |y| < den and q is within one LSB of num*2^QF/den for any
// quotient inside the QW-bit range; larger quotients saturate near the range
// limits. One iteration per pipeline stage: a new division can start every clock
// and its result appears QW-1 clocks later with `vout`. `den` must be positive.
// The document names a CORDIC divider; its iteration count and widths are this
// design's choices.
module cordic_divider #(
  parameter int NW = 30,   // numerator width (signed)
  parameter int DW = 18,   // denominator width (unsigned, > 0)
  parameter int QW = 20,   // quotient width (signed)
  parameter int QF = 6     // numerator pre-scale 2^QF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vin,
  input  logic signed [NW-1:0] num,
  input  logic        [DW-1:0] den,
  output logic signed [QW-1:0] q,
  output logic                 vout
);
  localparam int NS = QW - 1;
  localparam int YW = ((NW + QF) > (DW + QW) ? (NW + QF) : (DW + QW)) + 2;

  logic signed [YW-1:0] y [NS+1];
  logic        [DW-1:0] d [NS+1];
  logic signed [QW-1:0] z [NS+1];
  logic                 v [NS+1];

  always_comb begin
    y[0] = YW'(num) <<< QF;
    d[0] = den;
    z[0] = '0;
    v[0] = vin;
  end

  for (genvar s = 0; s < NS; s++) begin : g_stage
    localparam int SH = NS - 1 - s;     // weight 2^SH
    logic signed [YW-1:0] dsh;
    assign dsh = YW'({1'b0, d[s]}) <<< SH;
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin
        y[s+1] <= '0; d[s+1] <= '0; z[s+1] <= '0; v[s+1] <= 1'b0;
      end else begin
        v[s+1] <= v[s];
        d[s+1] <= d[s];
        if (y[s] >= 0) begin
          y[s+1] <= y[s] - dsh;
          z[s+1] <= z[s] + (QW'(1) <<< SH);
        end else begin
          y[s+1] <= y[s] + dsh;
          z[s+1] <= z[s] - (QW'(1) <<< SH);
        end
      end
  end

  assign q    = z[NS];
  assign vout = v[NS];
endmodule
