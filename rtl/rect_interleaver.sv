// rect_interleaver: rectangular block interleaver / de-interleaver with its
// control unit, used both as the inter-interleaver (150 bits spread over the
// sub-bands) and as the inner interleaver (50 bits over the tones of one OFDM
// symbol), and in the receiver as the matching de-interleavers.
//
// A block of N = NA*NB bits is written in arrival order into one bank of a
// two-bank (ping-pong) RAM while the other, full, bank is read in permuted order.
// Interleaving (mode = 0) reads output bit i from input bit i/NA + NB*(i%NA):
// the block is written row by row into an NA x NB array and read column by
// column. De-interleaving (mode = 1) applies the inverse permutation, reading
// input bit (j%NB)*NA + j/NB. The read address is generated by two nested
// counters (no division). One bit is read every READ_STRIDE clocks.
//
// Interface: bits arrive with `vin` pulses, at most one per clock. A full bank is
// read immediately; `vout1` marks each output bit and `vout2` the first bit of a
// block. `mode` is sampled when a block's read starts. The document gives the
// block sizes (150 and 50 bits, from its RAM sizes of 300 and 100 bits) and the
// two-bank RAM with a control unit; the permutation (that of the multi-band OFDM
// proposal, here with NB = 3 and NA = 50, and NB = 10 and NA = 5) is this
// design's choice.
//
// Lint note: rst_n is both the asynchronous reset of the registers and the
// disable condition of this block's run-time assertion, so Verilator reports it as
// flopped both synchronously and asynchronously (SYNCASYNCNET). The assertion is
// a simulation check only; no register samples rst_n synchronously.
module rect_interleaver #(
  parameter int NA          = 50,
  parameter int NB          = 3,
  parameter int READ_STRIDE = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mode,
  input  logic vin,
  input  logic din,
  output logic dout,
  output logic vout1,
  output logic vout2
);
  localparam int N  = NA * NB;
  localparam int AW = $clog2(N);
  localparam int SW = (READ_STRIDE > 1) ? $clog2(READ_STRIDE) : 1;
  localparam int LW = $clog2(NA > NB ? NA + 1 : NB + 1);

  logic ram [2][N];

  // ---------------- write side
  logic          wr_bank;
  logic [AW-1:0] wr_addr;
  logic [1:0]    full;
  logic          rd_done;
  logic          rd_bank, rd_active, rd_mode, first;

  always_ff @(posedge clk)
    if (vin) ram[wr_bank][wr_addr] <= din;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_bank <= 1'b0; wr_addr <= '0; full <= '0;
    end else begin
      if (vin) begin
        if (int'(wr_addr) == N - 1) begin
          wr_addr <= '0;
          wr_bank <= ~wr_bank;
        end else begin
          wr_addr <= wr_addr + 1'b1;
        end
      end
      for (int b = 0; b < 2; b++) begin
        if (vin && int'(wr_addr) == N - 1 && wr_bank == b[0]) full[b] <= 1'b1;
        else if (rd_done && rd_bank == b[0])               full[b] <= 1'b0;
      end
    end

  // ---------------- read side: addr = base + k*step, k < len, then base + 1
  // A block is started one clock after its bank fills, or straight after the last
  // read period of the previous block, so the read rate never falls behind.
  logic          last_q;     // last bit of the block has been read
  logic [SW-1:0] stride;
  logic [AW-1:0] rd_addr, rd_base;
  logic [LW-1:0] k;
  logic [AW-1:0] step;
  logic [LW-1:0] len;
  logic          period_end, start_blk, nxt_bank;

  assign step       = rd_mode ? AW'(NA) : AW'(NB);
  assign len        = rd_mode ? LW'(NB) : LW'(NA);
  assign period_end = rd_active && int'(stride) == READ_STRIDE - 1;
  assign rd_done    = period_end && last_q;
  assign nxt_bank   = rd_done ? ~rd_bank : rd_bank;
  assign start_blk  = (!rd_active || rd_done) && full[nxt_bank];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rd_bank <= 1'b0; rd_active <= 1'b0; rd_mode <= 1'b0; first <= 1'b0; last_q <= 1'b0;
      stride <= '0; rd_addr <= '0; rd_base <= '0; k <= '0;
      dout <= 1'b0; vout1 <= 1'b0; vout2 <= 1'b0;
    end else begin
      vout1 <= 1'b0;
      vout2 <= 1'b0;
      if (rd_active) begin
        stride <= (int'(stride) == READ_STRIDE - 1) ? '0 : stride + 1'b1;
        if (int'(stride) == 0 && !last_q) begin
          dout  <= ram[rd_bank][rd_addr];
          vout1 <= 1'b1;
          vout2 <= first;
          first <= 1'b0;
          if (k == len - 1'b1) begin
            k       <= '0;
            rd_base <= rd_base + 1'b1;
            rd_addr <= rd_base + 1'b1;
            if (int'(rd_base) == N / int'(len) - 1) last_q <= 1'b1;
          end else begin
            k       <= k + 1'b1;
            rd_addr <= rd_addr + step;
          end
        end
        if (rd_done) begin
          rd_active <= 1'b0;
          rd_bank   <= ~rd_bank;
        end
      end
      if (start_blk) begin
        rd_active <= 1'b1;
        rd_mode   <= mode;
        first     <= 1'b1;
        last_q    <= 1'b0;
        stride    <= '0;
        rd_addr   <= '0;
        rd_base   <= '0;
        k         <= '0;
      end
    end

  // A bank may be refilled while the end of its block is still being read: the
  // read, started at most a few clocks after the bank filled, stays ahead.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) !(vin && wr_addr == '0 && full[wr_bank] && !(rd_active && rd_bank == wr_bank)))
    else $error("rect_interleaver: bank overwritten before it was read");
endmodule
