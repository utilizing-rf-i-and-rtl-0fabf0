// bank_cmd_engine: command sequencer for one bank's logical channel.
//
// With one logical channel per bank, every bank has its own command stream,
// so the four engines run side by side with no arbitration between them.
// For each burst the engine issues ACT to the burst's page, then one RD or
// WR per member transaction, and finally PRE, leaving the bank precharged
// when the burst ends:
//
//   IDLE --start--> ACT ... (T_RCD) ... RD/WR every T_BURST ... PRE ... (T_RP) ... IDLE
//
// PRE waits for T_RAS after ACT, T_RTP after the last read and
// T_BURST+T_WR after the last write. Commands leave on `tx` one clock after
// the decision (registered). `issue` is high in the cycle a member is taken,
// combinationally from has_next, so the queue slot is freed on that clock.
// Read tags wait in a small FIFO and are paired, in order, with the data
// words that return on `rx`; responses leave registered on resp_*.
//
// The ACT/column/PRE sequence per burst follows the burst-group schedule;
// the timing values are typical LPDDR-400 figures at a 200 MHz DRAM clock
// (one controller clock = one DRAM clock) and are this design's assumption.
module bank_cmd_engine
  import mc_pkg::*;
#(
  parameter int unsigned T_RCD   = 3,
  parameter int unsigned T_RP    = 3,
  parameter int unsigned T_RAS   = 8,
  parameter int unsigned T_BURST = 2,
  parameter int unsigned T_WR    = 3,
  parameter int unsigned T_RTP   = 2,
  parameter int unsigned TAGQ    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ROW_W-1:0]  start_row,
  input  logic              has_next,
  input  txn_t              next_txn,
  output logic              issue,
  output chan_word_t        tx,
  input  rd_word_t          rx,
  output logic              resp_valid,
  output logic [DATA_W-1:0] resp_data,
  output logic [TAG_W-1:0]  resp_tag,
  output logic              idle,
  output logic              bank_open,
  output logic              bank_prech
);

  typedef enum logic [1:0] {E_IDLE, E_COL, E_PRE, E_PRECH} eng_state_e;

  localparam int unsigned CW = 8;

  eng_state_e   state_q;
  logic [CW-1:0] cnt_q;      // cycles until the next column command / bank idle
  logic [CW-1:0] ras_q;      // cycles until T_RAS is met
  logic [CW-1:0] pre_q;      // cycles until read/write recovery is met
  chan_word_t   tx_q;

  // Read tag FIFO.
  localparam int unsigned PW = $clog2(TAGQ);
  logic [TAG_W-1:0] tagq [TAGQ];
  logic [PW-1:0]    wr_ptr, rd_ptr;
  logic [PW:0]      tag_cnt;

  assign issue      = (state_q == E_COL) && (cnt_q == '0) && has_next;
  assign tx         = tx_q;
  assign idle       = (state_q == E_IDLE);
  assign bank_open  = (state_q == E_COL) || (state_q == E_PRE);
  assign bank_prech = (state_q == E_PRECH);

  function automatic logic [CW-1:0] dec(logic [CW-1:0] v);
    return (v == '0) ? '0 : v - 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= E_IDLE;
      cnt_q   <= '0;
      ras_q   <= '0;
      pre_q   <= '0;
      tx_q    <= '{cmd: CMD_NOP, default: '0};
    end else begin
      tx_q  <= '{cmd: CMD_NOP, default: '0};
      cnt_q <= dec(cnt_q);
      ras_q <= dec(ras_q);
      pre_q <= dec(pre_q);
      unique case (state_q)
        E_IDLE: if (start) begin
          tx_q.cmd <= CMD_ACT;
          tx_q.row <= start_row;
          cnt_q    <= CW'(T_RCD - 1);
          ras_q    <= CW'(T_RAS - 1);
          state_q  <= E_COL;
        end
        E_COL: if (cnt_q == '0) begin
          if (has_next) begin
            tx_q.cmd   <= next_txn.we ? CMD_WR : CMD_RD;
            tx_q.row   <= start_row;
            tx_q.col   <= next_txn.col;
            tx_q.wdata <= next_txn.wdata;
            cnt_q      <= CW'(T_BURST - 1);
            pre_q      <= next_txn.we ? CW'(T_BURST + T_WR - 1) : CW'(T_RTP - 1);
          end else begin
            state_q <= E_PRE;
          end
        end
        E_PRE: if (ras_q == '0 && pre_q == '0) begin
          tx_q.cmd <= CMD_PRE;
          tx_q.row <= start_row;
          cnt_q    <= CW'(T_RP - 1);
          state_q  <= E_PRECH;
        end
        E_PRECH: if (cnt_q == '0) state_q <= E_IDLE;
        default: state_q <= E_IDLE;
      endcase
    end
  end

  // Read tags in, data out in issue order.
  wire push = issue && !next_txn.we;
  wire pop  = rx.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      tag_cnt    <= '0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      resp_tag   <= '0;
    end else begin
      resp_valid <= pop;
      if (pop) begin
        resp_data <= rx.data;
        resp_tag  <= tagq[rd_ptr];
        rd_ptr    <= rd_ptr + 1'b1;
      end
      if (push) wr_ptr <= wr_ptr + 1'b1;
      tag_cnt <= tag_cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) tagq[wr_ptr] <= next_txn.tag;
  end

  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_no_orphan_data: assert (!(pop && tag_cnt == '0))
        else $error("bank_cmd_engine: read data with no pending read");
      a_tag_room: assert (!(push && tag_cnt == (PW+1)'(TAGQ)))
        else $error("bank_cmd_engine: read tag FIFO overflow");
      a_start_idle: assert (!(start && state_q != E_IDLE))
        else $error("bank_cmd_engine: start while busy");
    end
  end

endmodule
