// tb_intelligent_mc: the GPU-side controller against a testbench DRAM that
// answers each logical channel directly. Checks the command protocol per
// bank (ACT only to a closed bank, column commands only to the open row,
// tRCD), no command while the queue fills, CKE low with all banks
// precharged between groups, every read's data and tag, and that more than
// one channel carries column commands in the same cycle.
module tb_intelligent_mc;
  import mc_pkg::*;

  function automatic logic [DATA_W-1:0] rand_data();
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction
  localparam int unsigned NB = NUM_BANKS, CLT = 3, T_RCD = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid = 1'b0, req_ready, req_we = 1'b0, flush = 1'b0;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [DATA_W-1:0] req_wdata = '0;
  logic [TAG_W-1:0]  req_tag = '0;
  chan_word_t        chan_tx [NB];
  rd_word_t          chan_rx [NB];
  logic [NB-1:0]     resp_valid;
  logic [DATA_W-1:0] resp_data [NB];
  logic [TAG_W-1:0]  resp_tag  [NB];
  logic              cke, group_active, group_formed, q_full;
  pwr_state_e        pwr_state;

  intelligent_mc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Testbench DRAM per channel.
  logic [DATA_W-1:0] mem [NB][logic [ROW_W+COL_W-1:0]];
  bit                open_b [NB] = '{default: 0};
  logic [ROW_W-1:0]  orow [NB];
  longint            t_act [NB];
  rd_word_t          pipe [NB][CLT];
  int n_act = 0, n_col = 0, n_conc = 0, n_cmd_hold = 0, n_pdn_idle = 0;

  function automatic logic [DATA_W-1:0] init_word(int b, logic [ROW_W-1:0] r, logic [COL_W-1:0] c);
    return {16'hBEEF, 16'(b), 8'h0, 24'({r, c})};
  endfunction

  always_comb for (int b = 0; b < NB; b++) chan_rx[b] = pipe[b][CLT-1];

  always @(posedge clk) begin
    int ncol;
    ncol = 0;
    for (int b = 0; b < NB; b++) begin
      rd_word_t w;
      w = '0;
      if (rst_n) case (chan_tx[b].cmd)
        CMD_ACT: begin
          n_act++;
          check(cke, "ACT with CKE high");
          check(!open_b[b], "ACT to a closed bank");
          open_b[b] = 1; orow[b] = chan_tx[b].row; t_act[b] = cyc;
        end
        CMD_RD, CMD_WR: begin
          logic [ROW_W+COL_W-1:0] k;
          k = {orow[b], chan_tx[b].col};
          n_col++; ncol++;
          check(open_b[b] && chan_tx[b].row == orow[b], "column command to the open row");
          check(cyc - t_act[b] >= T_RCD, "tRCD");
          if (chan_tx[b].cmd == CMD_WR) mem[b][k] = chan_tx[b].wdata;
          else w = '{valid: 1'b1, data: mem[b].exists(k) ? mem[b][k] : init_word(b, orow[b], chan_tx[b].col)};
        end
        CMD_PRE: begin
          check(open_b[b], "PRE to an open bank");
          open_b[b] = 0;
        end
        default: ;
      endcase
      pipe[b][0] <= w;
      for (int s = 1; s < CLT; s++) pipe[b][s] <= pipe[b][s-1];
    end
    if (ncol >= 2) n_conc++;
    if (rst_n && !group_active && !flush && !q_full && dut.q_valid != '0) begin
      for (int b = 0; b < NB; b++) if (chan_tx[b].cmd inside {CMD_ACT, CMD_RD, CMD_WR}) n_cmd_hold++;
    end
    if (rst_n && !cke && !open_b[0] && !open_b[1] && !open_b[2] && !open_b[3]) n_pdn_idle++;
    if (rst_n && !cke) check(!(open_b[0] || open_b[1] || open_b[2] || open_b[3]), "CKE low only with all banks precharged");
  end

  // Reference memory and responses.
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] exp_data [256];
  bit                pending [256];
  int                outstanding = 0, tagc = 0;

  always @(posedge clk) for (int b = 0; b < NB; b++) if (resp_valid[b]) begin
    check(pending[resp_tag[b]], "response to a pending tag");
    check(resp_data[b] == exp_data[resp_tag[b]], "read data");
    pending[resp_tag[b]] = 0; outstanding--;
  end

  task automatic send(int b, int r, int c, bit we);
    logic [ADDR_W-1:0] a;
    logic [TAG_W-1:0]  t;
    a = '0; a[OFF_W +: COL_W] = COL_W'(c); a[OFF_W+COL_W +: BANK_W] = BANK_W'(b);
    a[OFF_W+COL_W+BANK_W +: ROW_W] = ROW_W'(r);
    t = TAG_W'(tagc); tagc++;
    @(negedge clk);
    req_valid = 1'b1; req_addr = a; req_we = we; req_tag = t; req_wdata = rand_data();
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    if (we) ref_mem[a] = req_wdata;
    else begin
      exp_data[t] = ref_mem.exists(a) ? ref_mem[a] : init_word(b, ROW_W'(r), COL_W'(c));
      pending[t] = 1; outstanding++;
    end
    #1 req_valid = 1'b0;
  endtask

  int pb, pr, pc, act0;
  initial begin
    foreach (open_b[i]) open_b[i] = 0;
    foreach (pending[i]) pending[i] = 0;
    for (int b = 0; b < NB; b++) for (int s = 0; s < CLT; s++) pipe[b][s] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Hold example: 3 activates for the 8 transactions.
    act0 = n_act;
    send(0, 0, 1, 0); send(1, 0, 2, 0); send(1, 0, 3, 0); send(0, 1, 4, 0);
    send(0, 0, 5, 0); send(0, 0, 6, 0); send(0, 0, 7, 0);
    repeat (10) @(negedge clk);
    check(n_act == act0 && !cke, "held and powered down with 7 of 8 queued");
    send(0, 0, 8, 0);
    repeat (40) @(negedge clk);
    check(n_act - act0 == 2, "first group: two pages");
    flush = 1'b1;
    repeat (40) @(negedge clk);
    flush = 1'b0;
    check(n_act - act0 == 3, "three activates in total");
    check(outstanding == 0, "all eight served");
    // Random traffic.
    for (int n = 0; n < 800; n++) begin
      pb = $urandom_range(NB - 1); pr = $urandom_range(3); pc = $urandom_range(31);
      send(pb, pr, pc, $urandom_range(3) == 0);
    end
    flush = 1'b1;
    repeat (200) @(negedge clk);
    check(outstanding == 0, "all reads answered");
    check(n_cmd_hold == 0, "no command while the queue fills");
    check(n_conc > 0, "concurrent column commands on several channels");
    check(n_pdn_idle > 0, "precharge power-down observed");
    $display("acts=%0d cols=%0d concurrent=%0d pdn=%0d", n_act, n_col, n_conc, n_pdn_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
