// tb_dram_bank_control: drives independent command streams on all four
// channels at once and checks the per-bank strobes, the read data returned
// CL clocks later on the issuing bank's own channel, and the protocol error
// on a column command to a closed bank, an ACT to an open bank, or a command
// while CKE is low.
module tb_dram_bank_control;
  import mc_pkg::*;
  localparam int unsigned NB = 4, CL = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cke = 1'b1, protocol_err;
  chan_word_t        chan_rx [NB];
  rd_word_t          chan_tx [NB];
  logic [NB-1:0]     bk_act, bk_pre, bk_rd, bk_wr, bank_is_open;
  logic [ROW_W-1:0]  bk_row   [NB];
  logic [COL_W-1:0]  bk_col   [NB];
  logic [DATA_W-1:0] bk_wdata [NB], bk_rdata [NB];

  dram_bank_control #(.NB(NB), .CL(CL)) dut (.*);

  // Array stand-in: read data is a function of bank and column.
  always_comb for (int b = 0; b < NB; b++) bk_rdata[b] = {32'(b) + 32'h100, 22'd0, bk_col[b]};

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Expected returns: cycle and data per bank.
  longint            exp_t [NB][$];
  logic [DATA_W-1:0] exp_d [NB][$];
  int                n_ret = 0;
  always @(posedge clk) for (int b = 0; b < NB; b++) begin
    if (chan_tx[b].valid) begin
      n_ret++;
      check(exp_t[b].size() != 0, $sformatf("unexpected return bank %0d", b));
      if (exp_t[b].size() != 0) begin
        check(cyc == exp_t[b].pop_front(), $sformatf("CL timing bank %0d", b));
        check(chan_tx[b].data == exp_d[b].pop_front(), $sformatf("return data bank %0d", b));
      end
    end
  end

  task automatic put(int b, dram_cmd_e c, int row, int col);
    chan_rx[b] = '{cmd: c, row: ROW_W'(row), col: COL_W'(col), wdata: {32'hABCD0000 | 32'(b), 32'(col)}};
  endtask
  task automatic nop_all(); for (int b = 0; b < NB; b++) put(b, CMD_NOP, 0, 0); endtask

  initial begin
    nop_all();
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // All four banks activate in the same cycle.
    @(negedge clk);
    for (int b = 0; b < NB; b++) put(b, CMD_ACT, 10 + b, 0);
    #1 check(bk_act == 4'b1111, "concurrent ACT strobes");
    for (int b = 0; b < NB; b++) check(bk_row[b] == ROW_W'(10 + b), "row per bank");
    @(negedge clk);
    check(bank_is_open == 4'b1111, "all banks open");
    // Concurrent reads on banks 0..2, a write on bank 3.
    for (int b = 0; b < 3; b++) begin
      put(b, CMD_RD, 0, 20 + b);
      exp_t[b].push_back(cyc + CL);
      exp_d[b].push_back({32'(b) + 32'h100, 22'd0, 10'(20 + b)});
    end
    put(3, CMD_WR, 0, 33);
    #1 check(bk_rd == 4'b0111 && bk_wr == 4'b1000, "concurrent column strobes");
    check(bk_col[3] == 10'd33 && bk_wdata[3] == {32'hABCD0003, 32'd33}, "write column and data");
    // Back-to-back reads on bank 1 only.
    @(negedge clk); nop_all();
    put(1, CMD_RD, 0, 40); exp_t[1].push_back(cyc + CL); exp_d[1].push_back({32'h101, 22'd0, 10'd40});
    @(negedge clk); nop_all();
    put(1, CMD_RD, 0, 41); exp_t[1].push_back(cyc + CL); exp_d[1].push_back({32'h101, 22'd0, 10'd41});
    @(negedge clk); nop_all();
    for (int b = 0; b < NB; b++) put(b, CMD_PRE, 0, 0);
    #1 check(bk_pre == 4'b1111, "concurrent PRE strobes");
    @(negedge clk); nop_all();
    check(bank_is_open == 4'b0000, "all banks closed");
    repeat (6) @(negedge clk);
    check(n_ret == 5, "five reads returned");
    check(!protocol_err, "no protocol error so far");
    // Read to a closed bank.
    put(2, CMD_RD, 0, 1);
    #1 check(bk_rd == '0, "no read strobe to a closed bank");
    @(negedge clk); nop_all();
    check(protocol_err, "error on read to closed bank");
    // Reset, then ACT twice.
    rst_n = 1'b0; #1; rst_n = 1'b1;
    check(!protocol_err, "error cleared by reset");
    put(0, CMD_ACT, 1, 0); @(negedge clk); put(0, CMD_ACT, 2, 0); @(negedge clk); nop_all();
    check(protocol_err, "error on ACT to an open bank");
    // Reset, then a command with CKE low.
    rst_n = 1'b0; #1; rst_n = 1'b1;
    cke = 1'b0; put(1, CMD_ACT, 1, 0);
    #1 check(bk_act == '0, "no strobe while CKE low");
    @(negedge clk); nop_all(); cke = 1'b1;
    check(protocol_err, "error on command while CKE low");
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
