// rfi_gpu_mem_system: a mobile GPU memory channel with per-bank RF logical
// channels and an intelligent, power-aware scheduler.
//
// GPU side: intelligent_mc queues transactions, waits for a full queue,
// schedules burst groups and drives one command stream per bank.
// Link: two mrfi_link models, one per direction, put each bank's stream on
// its own RF band of the same lines (commands down, read data up), so all
// banks are served concurrently over one physical channel.
// DRAM side: dram_bank_control decodes the NB streams at once and drives
// every bank's row decoder, row buffer and column mux; the DRAM cell arrays
// themselves are outside, on the bk_* ports (bk_rdata[b] must present the
// addressed word in the cycle bk_rd[b] is high). CKE is a plain control
// line. Read data returns per bank on resp_*[b] with its tag.
//
// Round trip of a read, once issued: 1 (engine register) + LINK_LAT + CL +
// LINK_LAT + 1 (response register) clocks.
module rfi_gpu_mem_system
  import mc_pkg::*;
#(
  parameter int unsigned NB       = NUM_BANKS,
  parameter int unsigned QDEPTH   = 8,
  parameter int unsigned LINK_LAT = 1,
  parameter int unsigned CL       = 3
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
  output logic [NB-1:0]     resp_valid,
  output logic [DATA_W-1:0] resp_data [NB],
  output logic [TAG_W-1:0]  resp_tag  [NB],
  output logic [NB-1:0]     bk_act,
  output logic [NB-1:0]     bk_pre,
  output logic [NB-1:0]     bk_rd,
  output logic [NB-1:0]     bk_wr,
  output logic [ROW_W-1:0]  bk_row    [NB],
  output logic [COL_W-1:0]  bk_col    [NB],
  output logic [DATA_W-1:0] bk_wdata  [NB],
  input  logic [DATA_W-1:0] bk_rdata  [NB],
  output logic              cke,
  output pwr_state_e        pwr_state,
  output logic              group_active,
  output logic              group_formed,
  output logic              q_full,
  output logic              protocol_err
);

  chan_word_t             mc_tx   [NB];
  chan_word_t             dram_rx [NB];
  rd_word_t               dram_tx [NB];
  rd_word_t               mc_rx   [NB];
  logic [CHAN_WORD_W-1:0] dn_in   [NB], dn_out [NB];
  logic [RD_WORD_W-1:0]   up_in   [NB], up_out [NB];

  intelligent_mc #(.NB(NB), .QDEPTH(QDEPTH)) u_mc (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_addr, .req_we, .req_wdata, .req_tag, .flush,
    .chan_tx (mc_tx),
    .chan_rx (mc_rx),
    .resp_valid, .resp_data, .resp_tag,
    .cke, .pwr_state, .group_active, .group_formed, .q_full
  );

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      dn_in[b]   = mc_tx[b];
      dram_rx[b] = chan_word_t'(dn_out[b]);
      up_in[b]   = dram_tx[b];
      mc_rx[b]   = rd_word_t'(up_out[b]);
    end
  end

  mrfi_link #(.NUM_BANDS(NB), .WORD_W(CHAN_WORD_W), .LATENCY(LINK_LAT)) u_link_down (
    .clk, .rst_n, .tx_word (dn_in), .rx_word (dn_out)
  );

  mrfi_link #(.NUM_BANDS(NB), .WORD_W(RD_WORD_W), .LATENCY(LINK_LAT)) u_link_up (
    .clk, .rst_n, .tx_word (up_in), .rx_word (up_out)
  );

  dram_bank_control #(.NB(NB), .CL(CL)) u_dram_ctl (
    .clk, .rst_n, .cke,
    .chan_rx (dram_rx),
    .chan_tx (dram_tx),
    .bk_act, .bk_pre, .bk_rd, .bk_wr, .bk_row, .bk_col, .bk_wdata, .bk_rdata,
    .bank_is_open (),
    .protocol_err
  );

endmodule
