// rx_output_buffer: receiver output buffer.
//
// Stores the FFT results of the four diversity branches of an OFDM symbol and
// then delivers them in tone order, the four branches side by side, to the
// diversity combiner. Each FFT group is captured and a path-select counter writes
// its four lanes, one per clock through a 4:1 multiplexer, into the 32-deep RAM of
// the current branch at the digit-reversed tone index. Real and imaginary parts
// each have two banks (ping-pong) of four such RAMs. The branch of each frame is
// counted by the control unit (branches come in order 0..3); an 8-bit counter
// {bank, branch, group, path} is this buffer's control state, as in the document.
// A full bank is read one tone every READ_STRIDE clocks; `vout` is a one-clock
// pulse per tone.
//
// Interface: `vin` is the FFT output pulse with `grp` its group index, pulses at
// least 4 clocks apart. READ_STRIDE = 4 matches the sample rate of the receiver.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// disable condition of this block's run-time assertion, so Verilator reports it as
// flopped both synchronously and asynchronously (SYNCASYNCNET). The assertion is
// a simulation check only; no register samples rst_n synchronously.
module rx_output_buffer #(
  parameter int W           = 20,
  parameter int READ_STRIDE = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                vin,
  input  logic [2:0]          grp,
  input  logic signed [W-1:0] a_re [4],
  input  logic signed [W-1:0] a_im [4],
  output logic signed [W-1:0] ch_re [4],
  output logic signed [W-1:0] ch_im [4],
  output logic                vout
);
  import pofdm_pkg::*;

  logic signed [W-1:0] ram_re [2][4][32];
  logic signed [W-1:0] ram_im [2][4][32];

  logic signed [W-1:0] cap_re [4], cap_im [4];
  logic [7:0] cu;              // {bank, branch[1:0], group[2:0], path[1:0]}
  logic       wr_busy;
  logic [1:0] full;
  logic       rd_done;
  logic [4:0] wr_idx;

  assign wr_idx = fft_out_index(cu[4:2], cu[1:0]);

  always_ff @(posedge clk)
    if (wr_busy) begin
      ram_re[cu[7]][cu[6:5]][wr_idx] <= cap_re[cu[1:0]];
      ram_im[cu[7]][cu[6:5]][wr_idx] <= cap_im[cu[1:0]];
    end

  localparam int SW = (READ_STRIDE > 1) ? $clog2(READ_STRIDE) : 1;
  logic [SW-1:0] stride;
  logic [4:0]    rd_addr;
  logic          rd_bank, rd_active;

  assign rd_done = rd_active && int'(stride) == READ_STRIDE - 1 && rd_addr == 5'd31;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cu <= '0; wr_busy <= 1'b0; full <= '0;
      for (int l = 0; l < 4; l++) begin cap_re[l] <= '0; cap_im[l] <= '0; end
    end else begin
      if (wr_busy && cu[1:0] == 2'd3 && cu[4:2] == 3'd7)
        cu[7:5] <= cu[7:5] + 3'd1;                          // next branch / bank
      if (vin) begin
        cap_re    <= a_re;
        cap_im    <= a_im;
        cu[4:2]   <= grp;
        cu[1:0]   <= '0;
        wr_busy   <= 1'b1;
      end else if (wr_busy) begin
        cu[1:0] <= cu[1:0] + 2'd1;
        if (cu[1:0] == 2'd3) wr_busy <= 1'b0;
      end
      for (int b = 0; b < 2; b++) begin
        if (wr_busy && cu[6:0] == 7'h7F && cu[7] == b[0]) full[b] <= 1'b1;
        else if (rd_done && rd_bank == b[0])              full[b] <= 1'b0;
      end
    end

  // A bank is started one clock after it fills, or straight after the previous
  // bank's last tone, so the read never drifts behind the writer.
  logic start_bank;
  assign start_bank = (!rd_active || rd_done) && full[rd_done ? ~rd_bank : rd_bank];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      stride <= '0; rd_addr <= '0; rd_bank <= 1'b0; rd_active <= 1'b0; vout <= 1'b0;
      for (int c = 0; c < 4; c++) begin ch_re[c] <= '0; ch_im[c] <= '0; end
    end else begin
      vout <= 1'b0;
      if (rd_active) begin
        stride <= (int'(stride) == READ_STRIDE - 1) ? '0 : stride + 1'b1;
        if (stride == '0) begin
          vout <= 1'b1;
          for (int c = 0; c < 4; c++) begin
            ch_re[c] <= ram_re[rd_bank][c][rd_addr];
            ch_im[c] <= ram_im[rd_bank][c][rd_addr];
          end
        end
        if (int'(stride) == READ_STRIDE - 1) rd_addr <= rd_addr + 5'd1;
        if (rd_done) begin
          rd_active <= 1'b0;
          rd_bank   <= ~rd_bank;
        end
      end
      if (start_bank) begin
        rd_active <= 1'b1;
        stride    <= '0;
        rd_addr   <= '0;
      end
    end

  // Refilling may start while the last tones of the bank are still being read:
  // every tone is read within 128 clocks of the bank filling, before it is rewritten.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_busy && cu[6:0] == 7'd0 && full[cu[7]] && !(rd_active && rd_bank == cu[7])))
    else $error("rx_output_buffer: bank overwritten before it was read");
endmodule
