// tb_rfi_gpu_mem_system: end-to-end test of the whole memory channel at its
// default sizes (4 banks, 8-entry queue, 64-bit data).
//
// Phase A (Fig. 3 pattern): eight transactions - bank0/row0, two bank1/row0,
//   bank0/row1, four bank0/row0 - must be held until the queue is full and
//   then served with exactly 3 activates.
// Phase B (Fig. 4 pattern): six reads to bank 0 and two to bank 1 in one
//   page each; the bank-1 reads must overlap the bank-0 reads on the other
//   logical channel, and the bank-0 reads must run back to back, so the
//   eight reads take 6 column slots instead of 8.
// Phase C: a random stream with page locality and 30 % writes, flushed at
//   the end. Every read is checked against a reference memory updated in
//   request order.
// Mechanisms counted (each must occur): hold while the queue fills, burst
// groups, concurrent column commands on several channels, page hits,
// power-down entries, cycles in precharge power-down, flush drains.
module tb_rfi_gpu_mem_system;
  import mc_pkg::*;

  function automatic logic [DATA_W-1:0] rand_data();
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction

  localparam int unsigned NB = NUM_BANKS;
  localparam int unsigned T_BURST = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              req_valid = 1'b0, req_ready, req_we = 1'b0, flush = 1'b0;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [DATA_W-1:0] req_wdata = '0;
  logic [TAG_W-1:0]  req_tag = '0;
  logic [NB-1:0]     resp_valid, bk_act, bk_pre, bk_rd, bk_wr;
  logic [DATA_W-1:0] resp_data [NB];
  logic [TAG_W-1:0]  resp_tag  [NB];
  logic [ROW_W-1:0]  bk_row    [NB];
  logic [COL_W-1:0]  bk_col    [NB];
  logic [DATA_W-1:0] bk_wdata  [NB], bk_rdata [NB];
  logic              cke, group_active, group_formed, q_full, protocol_err;
  pwr_state_e        pwr_state;

  rfi_gpu_mem_system dut (.*);

  dram_bank_model u_banks (
    .clk, .bk_act, .bk_pre, .bk_rd, .bk_wr, .bk_row, .bk_col, .bk_wdata, .bk_rdata
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Reference memory in request order.
  logic [DATA_W-1:0] ref_mem [logic [ADDR_W-1:0]];
  logic [DATA_W-1:0] exp_data [256];
  bit                pending [256];
  int                outstanding = 0, reads_done = 0;

  function automatic logic [DATA_W-1:0] ref_read(logic [ADDR_W-1:0] a);
    logic [ROW_W-1:0]  r = a[OFF_W+COL_W+BANK_W +: ROW_W];
    logic [COL_W-1:0]  c = a[OFF_W +: COL_W];
    int                b = int'(a[OFF_W+COL_W +: BANK_W]);
    if (ref_mem.exists(a)) return ref_mem[a];
    return {32'hD0A0_0000 | 32'(b), 8'h00, 24'({r, c})} ^ 64'h0123_4567_0000_0000;
  endfunction

  function automatic logic [ADDR_W-1:0] mk_addr(int b, int r, int c);
    logic [ADDR_W-1:0] a = '0;
    a[OFF_W +: COL_W] = COL_W'(c);
    a[OFF_W+COL_W +: BANK_W] = BANK_W'(b);
    a[OFF_W+COL_W+BANK_W +: ROW_W] = ROW_W'(r);
    return a;
  endfunction

  int tagc = 0;
  task automatic send(int b, int r, int c, bit we);
    logic [ADDR_W-1:0] a = mk_addr(b, r, c);
    logic [TAG_W-1:0]  t = TAG_W'(tagc);
    tagc++;
    @(negedge clk);
    req_valid = 1'b1; req_addr = a; req_we = we; req_tag = t;
    req_wdata = rand_data();
    while (!req_ready) @(negedge clk);
    @(posedge clk);
    if (we) ref_mem[a] = req_wdata;
    else begin
      check(!pending[t], "tag reuse while pending");
      exp_data[t] = ref_read(a); pending[t] = 1'b1; outstanding++;
    end
    req_valid <= 1'b0;
  endtask

  // Response checking.
  always @(posedge clk) begin
    for (int b = 0; b < NB; b++) if (resp_valid[b]) begin
      check(pending[resp_tag[b]], "response for a tag that is not pending");
      check(resp_data[b] == exp_data[resp_tag[b]], $sformatf("read data bank %0d tag %0d", b, resp_tag[b]));
      pending[resp_tag[b]] = 1'b0; outstanding--; reads_done++;
    end
  end

  // Mechanism counters.
  int n_hold = 0, n_groups = 0, n_concurrent = 0, n_hits = 0, n_pdn_entry = 0;
  int n_pre_pdn = 0, n_flush_drain = 0, n_cycles = 0;
  logic cke_d = 1'b0;
  int   cols_since_act [NB];
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (!group_active && !q_full && !flush && dut.u_mc.q_valid != '0) n_hold++;
    if (group_formed) n_groups++;
    if ($countones(bk_rd | bk_wr) >= 2) n_concurrent++;
    for (int b = 0; b < NB; b++) begin
      if (bk_act[b]) cols_since_act[b] = 0;
      if (bk_rd[b] || bk_wr[b]) begin
        if (cols_since_act[b] > 0) n_hits++;
        cols_since_act[b]++;
      end
    end
    if (cke_d && !cke) n_pdn_entry++;
    cke_d <= cke;
    if (pwr_state == P_PRE_PDN) n_pre_pdn++;
    if (group_formed && flush && !q_full) n_flush_drain++;
  end

  // Column-command log for the Fig. 4 check.
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint col_t [NB][$];
  bit     log_cols = 0;
  always @(posedge clk) if (log_cols)
    for (int b = 0; b < NB; b++) if (bk_rd[b] || bk_wr[b]) col_t[b].push_back(cyc);

  task automatic drain();
    flush <= 1'b1;
    while (outstanding != 0 || dut.u_mc.q_valid != '0 || group_active) @(posedge clk);
    flush <= 1'b0;
    repeat (12) @(posedge clk);
  endtask

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int act0, pb, pr, pc;
  initial begin
    foreach (pending[i]) pending[i] = 1'b0;
    foreach (cols_since_act[i]) cols_since_act[i] = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (4) @(posedge clk);

    // Phase A: the queue pattern of Fig. 3.
    act0 = u_banks.activates;
    send(0, 0, 1, 0); send(1, 0, 2, 0); send(1, 0, 3, 0); send(0, 1, 4, 0);
    repeat (20) @(posedge clk);
    check(u_banks.activates == act0, "nothing issued before the queue is full");
    check(!cke, "DRAM stays powered down while the queue fills");
    send(0, 0, 5, 0); send(0, 0, 6, 0); send(0, 0, 7, 1); send(0, 0, 8, 0);
    // The first group serves bank0/row0 and bank1/row0; bank0/row1 then
    // waits for a full queue again, so it is released with a flush.
    while (outstanding != 1 || group_active) @(posedge clk);
    repeat (20) @(posedge clk);
    check($countones(dut.u_mc.q_valid) == 1 && !group_active, "bank0/row1 held after the first group");
    check(u_banks.activates - act0 == 2, "first group opened two pages");
    drain();
    check(u_banks.activates - act0 == 3, $sformatf("Fig.3 pattern: 3 activates, saw %0d", u_banks.activates - act0));
    check(!cke && pwr_state == P_PRE_PDN, "precharge power-down after the groups");

    // Phase B: the logical-channel pattern of Fig. 4 (flush at once).
    log_cols = 1;
    send(0, 5, 0, 0); send(1, 5, 0, 0); send(1, 5, 1, 0); send(0, 5, 1, 0);
    send(0, 5, 2, 0); send(0, 5, 3, 0); send(0, 5, 4, 0); send(0, 5, 5, 0);
    drain();
    log_cols = 0;
    check(col_t[0].size() == 6 && col_t[1].size() == 2, "Fig.4 pattern: 6 + 2 column commands");
    if (col_t[0].size() == 6 && col_t[1].size() == 2) begin
      check(col_t[0][5] - col_t[0][0] == 5 * T_BURST, "bank 0 reads back to back (6 slots)");
      check(col_t[1][0] >= col_t[0][0] && col_t[1][1] <= col_t[0][5], "bank 1 reads overlap bank 0 reads");
    end

    // Phase C: random stream with page locality.
    for (int n = 0; n < 600; n++) begin
      pb = $urandom_range(NB - 1);
      pr = $urandom_range(3) + 8 * pb;
      pc = $urandom_range(63);
      send(pb, pr, pc, $urandom_range(9) < 3);
      if ($urandom_range(15) == 0) repeat ($urandom_range(20)) @(posedge clk);
      if (n == 300) drain();
    end
    drain();

    check(outstanding == 0, "all reads answered");
    check(!protocol_err, "no DRAM protocol error");
    check(u_banks.violations == 0, "no DRAM timing violation");
    check(n_hold > 0, "hold-until-full observed");
    check(n_groups > 0, "burst groups formed");
    check(n_concurrent > 0, "concurrent logical channels observed");
    check(n_hits > 0, "page hits observed");
    check(n_pdn_entry > 0, "power-down entries observed");
    check(n_pre_pdn > 0, "time in precharge power-down observed");
    check(n_flush_drain > 0, "flush of a partly filled queue observed");
    $display("reads=%0d groups=%0d activates=%0d column cmds=%0d hit rate=%0d%% pre_pdn=%0d/%0d cycles concurrent=%0d pdn entries=%0d hold=%0d flushes=%0d",
             reads_done, n_groups, u_banks.activates, u_banks.col_cmds,
             100 * (u_banks.col_cmds - u_banks.activates) / u_banks.col_cmds,
             n_pre_pdn, n_cycles, n_concurrent, n_pdn_entry, n_hold, n_flush_drain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
