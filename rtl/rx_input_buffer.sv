// rx_input_buffer: receiver input buffer, which lets one FFT serve the K = 4
// diversity branches of the Pulsed-OFDM receiver in sequence.
//
// An OFDM symbol arrives as 128 samples (32 samples upsampled by 4). Sample
// r = 4n + p belongs to branch p (polyphase component p) as its n-th value. Each
// of the real and imaginary parts has two banks (ping-pong, RAM0/RAM1) of four
// 32-deep RAMs, one per FFT lane: sample (p, n) is written to lane n/8 at address
// 8p + n%8. A full bank is read as 32 groups, branch after branch, each branch a
// complete FFT frame of 8 groups. Reads are paced by a free-running counter in the
// control unit, a group every GROUP_CYCLES clocks, and a bank is started only at
// a frame boundary of that counter, so FFT frames are always a multiple of 8
// groups apart; with GROUP_CYCLES = 4 the read rate equals the sample rate, and
// a bank is read out fast enough to be refilled while its last branch is read.
//
// Interface: one sample per clock at most, with `vin`. Outputs as for the
// transmitter input buffer, plus `ch`, the branch of the current frame. The
// structure follows the document; the order of branches in a bank and the
// alignment rule are this design's choices.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// disable condition of this block's run-time assertion, so Verilator reports it as
// flopped both synchronously and asynchronously (SYNCASYNCNET). The assertion is
// a simulation check only; no register samples rst_n synchronously.
module rx_input_buffer #(
  parameter int W            = 6,
  parameter int GROUP_CYCLES = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                vin,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                ce,
  output logic signed [W-1:0] a_re [4],
  output logic signed [W-1:0] a_im [4],
  output logic                vout1,
  output logic                vout2,
  output logic [1:0]          ch
);
  localparam int CW = $clog2(GROUP_CYCLES);

  logic signed [W-1:0] ram_re [2][4][32];
  logic signed [W-1:0] ram_im [2][4][32];

  logic       wr_bank;
  logic [6:0] wr_cnt;          // {n[4:0], p[1:0]}
  logic [1:0] full;
  logic       rd_done;
  logic [4:0] wr_addr;

  logic [CW-1:0] cyc;
  logic [2:0]    fgrp;         // group within the free-running frame
  logic [4:0]    rd_grp;       // {branch, group}
  logic          rd_bank, rd_active, tick;

  assign tick    = (cyc == '0);
  assign wr_addr = {wr_cnt[1:0], wr_cnt[4:2]};

  always_ff @(posedge clk)
    if (vin) begin
      ram_re[wr_bank][wr_cnt[6:5]][wr_addr] <= in_re;
      ram_im[wr_bank][wr_cnt[6:5]][wr_addr] <= in_im;
    end

  assign rd_done = tick && rd_active && rd_grp == 5'd31;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_bank <= 1'b0; wr_cnt <= '0; full <= '0;
    end else begin
      if (vin) begin
        wr_cnt <= wr_cnt + 7'd1;
        if (wr_cnt == 7'd127) wr_bank <= ~wr_bank;
      end
      for (int b = 0; b < 2; b++) begin
        if (vin && wr_cnt == 7'd127 && wr_bank == b[0]) full[b] <= 1'b1;
        else if (rd_done && rd_bank == b[0])            full[b] <= 1'b0;
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cyc <= '0; fgrp <= '0; rd_grp <= '0; rd_bank <= 1'b0; rd_active <= 1'b0;
      ce <= 1'b0; vout1 <= 1'b0; vout2 <= 1'b0; ch <= '0;
      for (int l = 0; l < 4; l++) begin a_re[l] <= '0; a_im[l] <= '0; end
    end else begin
      cyc <= (int'(cyc) == GROUP_CYCLES - 1) ? '0 : cyc + 1'b1;
      ce  <= tick;
      if (tick) begin
        fgrp <= fgrp + 3'd1;
        if (rd_active || (fgrp == 3'd0 && full[rd_bank])) begin
          vout1 <= 1'b1;
          vout2 <= (rd_grp[2:0] == 3'd0);
          ch    <= rd_grp[4:3];
          for (int l = 0; l < 4; l++) begin
            a_re[l] <= ram_re[rd_bank][l][rd_grp];
            a_im[l] <= ram_im[rd_bank][l][rd_grp];
          end
          rd_grp    <= rd_grp + 5'd1;
          rd_active <= (rd_grp != 5'd31);
          if (rd_grp == 5'd31) rd_bank <= ~rd_bank;
        end else begin
          vout1 <= 1'b0;
          vout2 <= 1'b0;
        end
      end
    end

  // A bank may be rewritten while its last frames are still being read: a read
  // started at most 31 clocks after the bank filled stays ahead of the writer.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(vin && wr_cnt == 7'd0 && full[wr_bank] && !(rd_active && rd_bank == wr_bank)))
    else $error("rx_input_buffer: bank overwritten before it was read");
endmodule
