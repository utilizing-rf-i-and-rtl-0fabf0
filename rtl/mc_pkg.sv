// mc_pkg: types and sizes shared by the RF-interconnect GPU memory system.
//
// The memory is one LPDDR-400 channel with 4 banks of 16384 rows x 1024
// columns and an 8-byte data path. Each bank has its own logical channel
// (one RF band per line), so a command word carries no bank address: the
// band it travels on selects the bank. A transaction moves one burst of
// BURST_LEN beats of 8 bytes, starting at its column. Sizes follow the
// evaluated configuration; the burst length of 4, the tag width and the
// command encoding are this design's own.
package mc_pkg;

  localparam int unsigned NUM_BANKS = 4;
  localparam int unsigned BANK_W    = 2;
  localparam int unsigned ROW_W     = 14;   // 16384 rows
  localparam int unsigned COL_W     = 10;   // 1024 columns
  localparam int unsigned BEAT_W    = 64;   // 8-byte channel
  localparam int unsigned BURST_LEN = 4;    // beats per column command
  localparam int unsigned DATA_W    = BEAT_W * BURST_LEN;  // one burst
  localparam int unsigned OFF_W     = 3;    // byte offset within 8 bytes
  localparam int unsigned ADDR_W    = OFF_W + COL_W + BANK_W + ROW_W;  // 29
  localparam int unsigned TAG_W     = 8;

  // DRAM command on one logical channel.
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_ACT = 3'd1,
    CMD_RD  = 3'd2,
    CMD_WR  = 3'd3,
    CMD_PRE = 3'd4
  } dram_cmd_e;

  // Power states of the DRAM chip, named as in the LPDDR power model.
  typedef enum logic [1:0] {
    P_PRE_PDN  = 2'd0,   // all banks precharged, CKE low
    P_PRE_STBY = 2'd1,   // all banks precharged or precharging, CKE high
    P_ACT_PDN  = 2'd2,   // a bank open, CKE low
    P_ACT_STBY = 2'd3    // a bank open, CKE high
  } pwr_state_e;

  // A queued memory transaction.
  typedef struct packed {
    logic              we;
    logic [BANK_W-1:0] bank;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [DATA_W-1:0] wdata;
    logic [TAG_W-1:0]  tag;
  } txn_t;

  // Controller-to-DRAM word on one logical channel.
  typedef struct packed {
    dram_cmd_e         cmd;
    logic [ROW_W-1:0]  row;
    logic [COL_W-1:0]  col;
    logic [DATA_W-1:0] wdata;
  } chan_word_t;

  // DRAM-to-controller word on one logical channel.
  typedef struct packed {
    logic              valid;
    logic [DATA_W-1:0] data;
  } rd_word_t;

  localparam int unsigned CHAN_WORD_W = $bits(chan_word_t);
  localparam int unsigned RD_WORD_W   = $bits(rd_word_t);

endpackage
