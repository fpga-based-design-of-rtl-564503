// tx_output_buffer: output buffer of the transmitter FFT.
//
// The FFT delivers each frame as 8 groups of 4 results in digit-reversed order.
// A group is captured, and a path-select counter writes its four lanes one per
// clock through a 4:1 multiplexer into the bank being filled, at the tone index
// computed by the digit-reversed address unit (pofdm_pkg::fft_out_index). Real and
// imaginary parts each have two 32-deep banks (ping-pong, RAM0/RAM1). A full bank
// is read in tone order, one sample every READ_STRIDE clocks, each sample held on
// the output for READ_STRIDE clocks with `vout` high; consecutive full banks are
// read without a break.
//
// Interface: `vin` is the FFT's one-clock output pulse with `grp` its group index;
// pulses must be at least 4 clocks apart. The bank structure and the mux follow
// the document; READ_STRIDE = 4 (the upsampling factor) is this design's choice.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// disable condition of this block's run-time assertion, so Verilator reports it as
// flopped both synchronously and asynchronously (SYNCASYNCNET). The assertion is
// a simulation check only; no register samples rst_n synchronously.
module tx_output_buffer #(
  parameter int W           = 19,
  parameter int READ_STRIDE = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                vin,
  input  logic [2:0]          grp,
  input  logic signed [W-1:0] a_re [4],
  input  logic signed [W-1:0] a_im [4],
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                vout
);
  import pofdm_pkg::*;

  logic signed [W-1:0] ram_re [2][32];
  logic signed [W-1:0] ram_im [2][32];

  // ---------------- write side
  logic signed [W-1:0] cap_re [4], cap_im [4];
  logic [2:0] cap_grp;
  logic [1:0] path_sel;
  logic       wr_busy, wr_bank;
  logic [1:0] full;
  logic [4:0] wr_idx;
  logic       rd_done;

  assign wr_idx = fft_out_index(cap_grp, path_sel);

  always_ff @(posedge clk)
    if (wr_busy) begin
      ram_re[wr_bank][wr_idx] <= cap_re[path_sel];
      ram_im[wr_bank][wr_idx] <= cap_im[path_sel];
    end

  // ---------------- read side
  localparam int SW = (READ_STRIDE > 1) ? $clog2(READ_STRIDE) : 1;
  logic [SW-1:0] stride;
  logic [5:0]    rd_addr;   // next address to load; 32 = bank finished
  logic          rd_bank, rd_active;

  assign rd_done = rd_active && int'(stride) == READ_STRIDE - 1 && rd_addr == 6'd32;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      path_sel <= '0; wr_busy <= 1'b0; wr_bank <= 1'b0; full <= '0; cap_grp <= '0;
      for (int l = 0; l < 4; l++) begin cap_re[l] <= '0; cap_im[l] <= '0; end
    end else begin
      if (vin) begin
        cap_re   <= a_re;
        cap_im   <= a_im;
        cap_grp  <= grp;
        wr_busy  <= 1'b1;
        path_sel <= '0;
      end else if (wr_busy) begin
        path_sel <= path_sel + 2'd1;
        if (path_sel == 2'd3) wr_busy <= 1'b0;
      end
      if (wr_busy && path_sel == 2'd3 && cap_grp == 3'd7) wr_bank <= ~wr_bank;
      for (int b = 0; b < 2; b++) begin
        if (wr_busy && path_sel == 2'd3 && cap_grp == 3'd7 && wr_bank == b[0]) full[b] <= 1'b1;
        else if (rd_done && rd_bank == b[0])                                 full[b] <= 1'b0;
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      stride <= '0; rd_addr <= '0; rd_bank <= 1'b0; rd_active <= 1'b0;
      out_re <= '0; out_im <= '0; vout <= 1'b0;
    end else begin
      if (rd_active) begin
        stride <= (int'(stride) == READ_STRIDE - 1) ? '0 : stride + 1'b1;
        if (int'(stride) == READ_STRIDE - 1) begin
          rd_addr <= rd_addr + 6'd1;
          if (rd_addr == 6'd32) begin
            rd_bank   <= ~rd_bank;
            rd_active <= 1'b0;
          end
        end
      end
      // start (or continue with) a full bank at the start of a sample period
      if ((!rd_active || rd_done) && full[rd_done ? ~rd_bank : rd_bank]) begin
        rd_active <= 1'b1;
        stride    <= '0;
        rd_addr   <= 6'd1;
        out_re    <= ram_re[rd_done ? ~rd_bank : rd_bank][0];
        out_im    <= ram_im[rd_done ? ~rd_bank : rd_bank][0];
        vout      <= 1'b1;
      end else if (rd_active && !rd_done) begin
        if (int'(stride) == READ_STRIDE - 1) begin
          out_re <= ram_re[rd_bank][rd_addr[4:0]];
          out_im <= ram_im[rd_bank][rd_addr[4:0]];
        end
        vout <= 1'b1;
      end else begin
        out_re <= '0; out_im <= '0; vout <= 1'b0;
      end
    end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_busy && path_sel == 2'd0 && cap_grp == 3'd0 && full[wr_bank]))
    else $error("tx_output_buffer: bank overwritten before it was read");
endmodule
