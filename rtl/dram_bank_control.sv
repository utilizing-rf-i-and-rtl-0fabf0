// dram_bank_control: DRAM-side bank control for per-bank logical channels.
//
// In a conventional DRAM all banks share one command/address/data path and
// the bank address picks which bank a command drives. Here every bank has
// its own logical channel, so this block decodes NB command streams at once
// and drives each bank's row decoder, row buffer and column mux
// independently in the same cycle. The data I/O mux between banks is gone:
// each bank's read data returns on that bank's own channel.
//
// Per bank b and cycle, from the received word chan_rx[b]:
//   ACT -> bk_act[b], bk_row[b]  (row decoder opens the page into the row buffer)
//   RD  -> bk_rd[b],  bk_col[b]  (column mux selects a word; bk_rdata[b] is
//                                 sampled in the same cycle and returned on
//                                 chan_tx[b] CL clocks after the RD arrived)
//   WR  -> bk_wr[b],  bk_col[b], bk_wdata[b]
//   PRE -> bk_pre[b]             (row buffer written back, bit lines precharged)
// Strobes are combinational from the received word. The block tracks which
// banks are open and raises the sticky protocol_err on a column command to a
// closed bank, an ACT to an open bank, or any command while CKE is low.
//
// Decoding all banks concurrently is what the RF channels require of the
// DRAM chip; the error flag and the CAS latency of 3 are this design's.
module dram_bank_control
  import mc_pkg::*;
#(
  parameter int unsigned NB = NUM_BANKS,
  parameter int unsigned CL = 3
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cke,
  input  chan_word_t        chan_rx   [NB],
  output rd_word_t          chan_tx   [NB],
  output logic [NB-1:0]     bk_act,
  output logic [NB-1:0]     bk_pre,
  output logic [NB-1:0]     bk_rd,
  output logic [NB-1:0]     bk_wr,
  output logic [ROW_W-1:0]  bk_row    [NB],
  output logic [COL_W-1:0]  bk_col    [NB],
  output logic [DATA_W-1:0] bk_wdata  [NB],
  input  logic [DATA_W-1:0] bk_rdata  [NB],
  output logic [NB-1:0]     bank_is_open,
  output logic              protocol_err
);

  logic [NB-1:0] open_q;
  logic [NB-1:0] err_now;
  rd_word_t      pipe_q [NB][CL];

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      bk_act[b]   = cke && chan_rx[b].cmd == CMD_ACT;
      bk_pre[b]   = cke && chan_rx[b].cmd == CMD_PRE;
      bk_rd[b]    = cke && chan_rx[b].cmd == CMD_RD && open_q[b];
      bk_wr[b]    = cke && chan_rx[b].cmd == CMD_WR && open_q[b];
      bk_row[b]   = chan_rx[b].row;
      bk_col[b]   = chan_rx[b].col;
      bk_wdata[b] = chan_rx[b].wdata;
      err_now[b]  = (chan_rx[b].cmd != CMD_NOP && !cke) ||
                    (chan_rx[b].cmd == CMD_ACT && open_q[b]) ||
                    ((chan_rx[b].cmd == CMD_RD || chan_rx[b].cmd == CMD_WR) && !open_q[b]);
      chan_tx[b]  = pipe_q[b][CL-1];
    end
  end

  assign bank_is_open = open_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_q       <= '0;
      protocol_err <= 1'b0;
      for (int b = 0; b < NB; b++)
        for (int s = 0; s < CL; s++) pipe_q[b][s] <= '0;
    end else begin
      if (err_now != '0) protocol_err <= 1'b1;
      for (int b = 0; b < NB; b++) begin
        if (bk_act[b]) open_q[b] <= 1'b1;
        if (bk_pre[b]) open_q[b] <= 1'b0;
        pipe_q[b][0].valid <= bk_rd[b];
        pipe_q[b][0].data  <= bk_rd[b] ? bk_rdata[b] : '0;
        for (int s = 1; s < CL; s++) pipe_q[b][s] <= pipe_q[b][s-1];
      end
    end
  end

endmodule
