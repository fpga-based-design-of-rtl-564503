// tx_input_buffer: input buffer of the transmitter FFT.
//
// Collects the 32 QPSK* symbols of an OFDM symbol and hands them to the FFT as 8
// groups of 4, group m holding symbols m, m+8, m+16, m+24. Real and imaginary parts
// each sit in two banks (ping-pong, RAM0/RAM1) of four 8-deep RAMs, one per FFT
// lane: symbol n is written to lane n/8 at address n%8 of the bank being filled,
// while the other bank is read. A free-running counter in the control unit paces
// the reads: a group every GROUP_CYCLES clocks, and a frame starts only when the
// counter is at a frame boundary, so frames always begin a multiple of 8 groups
// apart as the pipelined FFT requires.
//
// Interface: symbols arrive with `vin` pulses. `ce` is the FFT clock enable, high
// one clock in every GROUP_CYCLES; with it, `vout1` marks a valid group on `a_re`/
// `a_im` and `vout2` the first group of a frame. The document gives the RAM layout
// and names vout1/vout2; their meaning, and a 5-bit counter where it gives a 6-bit
// one, are this design's choices.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// disable condition of this block's run-time assertion, so Verilator reports it as
// flopped both synchronously and asynchronously (SYNCASYNCNET). The assertion is
// a simulation check only; no register samples rst_n synchronously.
module tx_input_buffer #(
  parameter int W            = 2,
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
  output logic                vout2
);
  localparam int CW = $clog2(GROUP_CYCLES);

  logic signed [W-1:0] ram_re [2][4][8];
  logic signed [W-1:0] ram_im [2][4][8];

  // ---------------- write side
  logic       wr_bank;
  logic [4:0] wr_addr;
  logic [1:0] full;
  logic       rd_done;

  // ---------------- read side (control unit)
  logic [CW-1:0] cyc;
  logic [2:0]    grp;
  logic          rd_bank, rd_active, tick;

  assign tick = (cyc == '0);

  always_ff @(posedge clk) begin
    if (vin) begin
      ram_re[wr_bank][wr_addr[4:3]][wr_addr[2:0]] <= in_re;
      ram_im[wr_bank][wr_addr[4:3]][wr_addr[2:0]] <= in_im;
    end
  end

  assign rd_done = tick && rd_active && grp == 3'd7;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_bank <= 1'b0; wr_addr <= '0; full <= '0;
    end else begin
      if (vin) begin
        wr_addr <= wr_addr + 5'd1;
        if (wr_addr == 5'd31) wr_bank <= ~wr_bank;
      end
      for (int b = 0; b < 2; b++) begin
        if (vin && wr_addr == 5'd31 && wr_bank == b[0]) full[b] <= 1'b1;
        else if (rd_done && rd_bank == b[0])          full[b] <= 1'b0;
      end
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cyc <= '0; grp <= '0; rd_bank <= 1'b0; rd_active <= 1'b0;
      ce <= 1'b0; vout1 <= 1'b0; vout2 <= 1'b0;
      for (int l = 0; l < 4; l++) begin a_re[l] <= '0; a_im[l] <= '0; end
    end else begin
      cyc <= (int'(cyc) == GROUP_CYCLES - 1) ? '0 : cyc + 1'b1;
      ce  <= tick;
      if (tick) begin
        grp <= grp + 3'd1;
        if (rd_active || (grp == 3'd0 && full[rd_bank])) begin
          vout1 <= 1'b1;
          vout2 <= (grp == 3'd0);
          for (int l = 0; l < 4; l++) begin
            a_re[l] <= ram_re[rd_bank][l][grp];
            a_im[l] <= ram_im[rd_bank][l][grp];
          end
          rd_active <= (grp != 3'd7);
          if (grp == 3'd7) rd_bank <= ~rd_bank;
        end else begin
          vout1 <= 1'b0;
          vout2 <= 1'b0;
        end
      end
    end

  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(vin && wr_addr == 5'd0 && full[wr_bank]))
    else $error("tx_input_buffer: bank overwritten before it was read");
endmodule
