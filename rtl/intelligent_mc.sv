// intelligent_mc: GPU-side memory controller with the intelligent scheduler.
//
// A GPU transaction (byte address, read/write, data, tag) is split into
// row, bank and column (low to high: byte offset, column, bank, row, so
// consecutive addresses stay in one page; the bit order is this design's
// choice) and placed in the transaction queue. The burst-group scheduler
// holds the queue until it is full (or `flush` is high), wakes the DRAM,
// and forms one burst group; each bank's command engine then serves its
// burst on its own logical channel, concurrently with the other banks. When
// every bank has precharged, the power controller drops CKE until the next
// group, so the DRAM rests in precharge power-down.
//
// Interface: req_valid/req_ready handshake (ready while a slot is free);
// chan_tx[b]/chan_rx[b] are the command and read-data words of bank b's
// logical channel; resp_*[b] return read data with its tag, in order per
// bank. Latency of a read is dominated by the wait for a full queue.
module intelligent_mc
  import mc_pkg::*;
#(
  parameter int unsigned NB      = NUM_BANKS,
  parameter int unsigned QDEPTH  = 8,
  parameter int unsigned T_RCD   = 3,
  parameter int unsigned T_RP    = 3,
  parameter int unsigned T_RAS   = 8,
  parameter int unsigned T_BURST = 2,
  parameter int unsigned T_WR    = 3,
  parameter int unsigned T_RTP   = 2,
  parameter int unsigned T_XP    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic              req_we,
  input  logic [DATA_W-1:0] req_wdata,
  input  logic [TAG_W-1:0]  req_tag,
  input  logic              flush,
  output chan_word_t        chan_tx    [NB],
  input  rd_word_t          chan_rx    [NB],
  output logic [NB-1:0]     resp_valid,
  output logic [DATA_W-1:0] resp_data  [NB],
  output logic [TAG_W-1:0]  resp_tag   [NB],
  output logic              cke,
  output pwr_state_e        pwr_state,
  output logic              group_active,
  output logic              group_formed,
  output logic              q_full
);

  localparam int unsigned IW = $clog2(QDEPTH);

  txn_t                  in_txn;
  logic [QDEPTH-1:0]     q_valid;
  txn_t                  q_entries [QDEPTH];
  logic [QDEPTH-1:0]     q_older   [QDEPTH];
  logic [QDEPTH-1:0]     free_vec;
  logic [NB-1:0]         eng_idle, eng_open, eng_prech, start, has_next, issue;
  logic [ROW_W-1:0]      start_row [NB];
  logic [IW-1:0]         next_idx  [NB];
  logic                  wake, pwr_ready;

  // Address split.
  always_comb begin
    in_txn.we    = req_we;
    in_txn.col   = req_addr[OFF_W +: COL_W];
    in_txn.bank  = req_addr[OFF_W + COL_W +: BANK_W];
    in_txn.row   = req_addr[OFF_W + COL_W + BANK_W +: ROW_W];
    in_txn.wdata = req_wdata;
    in_txn.tag   = req_tag;
  end

  transaction_queue #(.DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid (req_valid),
    .in_ready (req_ready),
    .in_txn,
    .free_vec,
    .valid    (q_valid),
    .entries  (q_entries),
    .older    (q_older),
    .full     (q_full),
    .count    ()
  );

  burst_group_scheduler #(.DEPTH(QDEPTH), .NB(NB)) u_sched (
    .clk, .rst_n,
    .q_valid, .q_entries, .q_older, .q_full, .flush, .free_vec,
    .eng_idle, .pwr_ready, .wake, .start, .start_row, .has_next, .next_idx,
    .group_active, .group_formed
  );

  always_comb begin
    free_vec = '0;
    for (int b = 0; b < NB; b++)
      if (issue[b]) free_vec[next_idx[b]] = 1'b1;
  end

  for (genvar b = 0; b < NB; b++) begin : g_chan
    bank_cmd_engine #(
      .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_BURST(T_BURST),
      .T_WR(T_WR), .T_RTP(T_RTP)
    ) u_eng (
      .clk, .rst_n,
      .start      (start[b]),
      .start_row  (start_row[b]),
      .has_next   (has_next[b]),
      .next_txn   (q_entries[next_idx[b]]),
      .issue      (issue[b]),
      .tx         (chan_tx[b]),
      .rx         (chan_rx[b]),
      .resp_valid (resp_valid[b]),
      .resp_data  (resp_data[b]),
      .resp_tag   (resp_tag[b]),
      .idle       (eng_idle[b]),
      .bank_open  (eng_open[b]),
      .bank_prech (eng_prech[b])
    );
  end

  power_mode_ctrl #(.NB(NB), .T_XP(T_XP)) u_pwr (
    .clk, .rst_n,
    .bank_open  (eng_open),
    .bank_prech (eng_prech),
    .wake,
    .cke,
    .ready      (pwr_ready),
    .state      (pwr_state)
  );

endmodule
