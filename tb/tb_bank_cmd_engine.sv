// tb_bank_cmd_engine: runs bursts through one logical-channel engine and
// checks the command sequence (ACT, one RD/WR per member, PRE) and its
// cycle spacing: first column command T_RCD after ACT, column commands
// T_BURST apart, PRE no earlier than T_RAS after ACT, T_RTP after a read and
// T_BURST+T_WR after a write, and idle T_RP after PRE. Read data is looped
// back after a fixed delay and must return with the right tags in order.
module tb_bank_cmd_engine;
  import mc_pkg::*;

  function automatic logic [DATA_W-1:0] rand_data();
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction
  localparam int T_RCD = 3, T_RP = 3, T_RAS = 8, T_BURST = 2, T_WR = 3, T_RTP = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             start = 1'b0, has_next = 1'b0, issue, resp_valid, idle, bank_open, bank_prech;
  logic [ROW_W-1:0] start_row = '0;
  txn_t             next_txn;
  chan_word_t       tx;
  rd_word_t         rx;
  logic [DATA_W-1:0] resp_data;
  logic [TAG_W-1:0]  resp_tag;

  bank_cmd_engine #(.T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_BURST(T_BURST),
                    .T_WR(T_WR), .T_RTP(T_RTP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Member list for the burst being served.
  txn_t members [$];
  always_comb begin
    has_next = members.size() != 0;
    next_txn = has_next ? members[0] : '0;
  end
  always @(posedge clk) if (issue) void'(members.pop_front());

  // Command log.
  typedef struct { dram_cmd_e cmd; longint t; logic [COL_W-1:0] col; logic [ROW_W-1:0] row; logic [DATA_W-1:0] wd; } ev_t;
  ev_t log_q [$];
  always @(posedge clk) if (tx.cmd != CMD_NOP) log_q.push_back('{tx.cmd, cyc, tx.col, tx.row, tx.wdata});

  // Read loop-back: data = f(col), 4 cycles after RD.
  rd_word_t dly [4] = '{default: '0};
  always @(posedge clk) begin
    dly[0] <= '{valid: tx.cmd == CMD_RD, data: {48'hCAFE_0000_0000, 6'd0, tx.col}};
    for (int i = 1; i < 4; i++) dly[i] <= dly[i-1];
  end
  assign rx = dly[3];

  logic [TAG_W-1:0]  exp_tag [$];
  logic [DATA_W-1:0] exp_dat [$];
  int n_resp = 0;
  always @(posedge clk) if (resp_valid) begin
    n_resp++;
    check(exp_tag.size() != 0, "response expected");
    if (exp_tag.size() != 0) begin
      check(resp_tag == exp_tag.pop_front(), "response tag in order");
      check(resp_data == exp_dat.pop_front(), "response data");
    end
  end

  task automatic burst(logic [ROW_W-1:0] row, int n, int n_wr_last);
    txn_t t;
    log_q.delete();
    for (int i = 0; i < n; i++) begin
      t = '{we: (i >= n - n_wr_last), bank: 2'd0, row: row, col: COL_W'(i * 7 + 1),
            wdata: rand_data(), tag: TAG_W'($urandom)};
      members.push_back(t);
      if (!t.we) begin exp_tag.push_back(t.tag); exp_dat.push_back({48'hCAFE_0000_0000, 6'd0, t.col}); end
    end
    @(negedge clk); start_row = row; start = 1'b1;
    @(negedge clk); start = 1'b0;
    check(!idle && bank_open, "busy and open after start");
    while (!idle) @(negedge clk);
    repeat (8) @(negedge clk);
    // Sequence and spacing.
    check(log_q.size() == n + 2, $sformatf("command count %0d", log_q.size()));
    if (log_q.size() == n + 2) begin
      longint t_act = log_q[0].t, t_last = log_q[n].t, t_pre = log_q[n+1].t, need;
      check(log_q[0].cmd == CMD_ACT && log_q[0].row == row, "ACT first with the row");
      check(log_q[n+1].cmd == CMD_PRE, "PRE last");
      check(log_q[1].t - t_act == T_RCD, "first column command T_RCD after ACT");
      for (int i = 1; i <= n; i++) begin
        check(log_q[i].cmd == ((i > n - n_wr_last) ? CMD_WR : CMD_RD), "RD/WR order");
        check(log_q[i].col == COL_W'((i - 1) * 7 + 1), "column");
        if (i > 1) check(log_q[i].t - log_q[i-1].t == T_BURST, "back-to-back column commands");
      end
      need = t_act + T_RAS;
      if (n_wr_last > 0) need = (t_last + T_BURST + T_WR > need) ? t_last + T_BURST + T_WR : need;
      else               need = (t_last + T_RTP > need) ? t_last + T_RTP : need;
      check(t_pre == need + 1 || t_pre == need, $sformatf("PRE at earliest legal cycle (got %0d need %0d)", t_pre - t_act, need - t_act));
    end
    check(members.size() == 0, "all members consumed");
  endtask

  initial begin

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(idle && !bank_open && !bank_prech, "idle after reset");
    burst(14'd5, 1, 0);     // single read: PRE limited by T_RAS
    burst(14'd9, 6, 0);     // six reads, as bank 0 in the logical-channel example
    burst(14'd3, 4, 2);     // reads then writes: PRE limited by write recovery
    burst(14'd7, 3, 3);     // writes only
    repeat (10) @(negedge clk);
    check(exp_tag.size() == 0, "all reads returned");
    check(n_resp == 1 + 6 + 2, "response count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
