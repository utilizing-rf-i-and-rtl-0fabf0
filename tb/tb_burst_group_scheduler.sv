// tb_burst_group_scheduler: the scheduler with a real transaction queue; the
// testbench plays the four channel engines and the power controller.
// Checks: nothing starts before the queue is full (or flush); each group
// holds, per bank, exactly the queued transactions to the page of that
// bank's oldest transaction; members are handed out oldest first; the next
// group waits until every engine is idle; wake/ready handshake is obeyed.
module tb_burst_group_scheduler;
  import mc_pkg::*;
  localparam int unsigned DEPTH = 8, NB = 4, IW = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 1'b0, in_ready, q_full, flush = 1'b0, pwr_ready = 1'b0;
  txn_t             in_txn = '0;
  logic [DEPTH-1:0] free_vec, q_valid;
  txn_t             q_entries [DEPTH];
  logic [DEPTH-1:0] q_older   [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] q_count;
  logic [NB-1:0]    eng_idle, start, has_next;
  logic [ROW_W-1:0] start_row [NB];
  logic [IW-1:0]    next_idx  [NB];
  logic             wake, group_active, group_formed;

  transaction_queue #(.DEPTH(DEPTH)) u_q (
    .clk, .rst_n, .in_valid, .in_ready, .in_txn, .free_vec,
    .valid (q_valid), .entries (q_entries), .older (q_older), .full (q_full), .count (q_count));

  burst_group_scheduler #(.DEPTH(DEPTH), .NB(NB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Reference: queued transactions in arrival order (slot, bank, row).
  typedef struct { int slot; int bank; int row; } ref_t;
  ref_t rq [$];
  // Expected members per bank, oldest first (slot numbers).
  int exp_mem [NB][$];
  int exp_row [NB];
  bit exp_has [NB];

  // Engines: busy from start until members are done plus a tail.
  int  tail [NB];
  bit  busy [NB];
  logic [NB-1:0] issue;
  always_comb begin
    free_vec = '0;
    for (int b = 0; b < NB; b++) if (issue[b]) free_vec[next_idx[b]] = 1'b1;
    for (int b = 0; b < NB; b++) eng_idle[b] = !busy[b];
  end

  int n_groups = 0, n_members = 0;
  bit formed_d = 0;
  always @(negedge clk) begin
    for (int b = 0; b < NB; b++) issue[b] = busy[b] && has_next[b] && ($urandom_range(2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    // Group formation: compute expectation from the reference queue.
    if (group_formed) begin
      n_groups++;
      check(q_full || flush, "group only with a full queue or flush");
      check(eng_idle == '1, "group only when all engines idle");
      for (int b = 0; b < NB; b++) begin
        exp_mem[b].delete(); exp_has[b] = 0;
        foreach (rq[i]) if (rq[i].bank == b) begin
          if (!exp_has[b]) begin exp_has[b] = 1; exp_row[b] = rq[i].row; end
          if (rq[i].row == exp_row[b]) exp_mem[b].push_back(rq[i].slot);
        end
      end
    end
    formed_d <= group_formed;
    if (formed_d) for (int b = 0; b < NB; b++) begin
      check(start[b] == exp_has[b], $sformatf("start bank %0d", b));
      if (exp_has[b]) check(start_row[b] == ROW_W'(exp_row[b]), $sformatf("start row bank %0d", b));
    end else check(start == '0, "start only right after formation");
    // Engine model.
    for (int b = 0; b < NB; b++) begin
      if (start[b]) begin busy[b] = 1; tail[b] = 3; end
      if (issue[b]) begin
        n_members++;
        check(exp_mem[b].size() != 0, $sformatf("member available bank %0d", b));
        if (exp_mem[b].size() != 0) check(int'(next_idx[b]) == exp_mem[b].pop_front(),
                                          $sformatf("oldest member first bank %0d", b));
        foreach (rq[i]) if (rq[i].slot == int'(next_idx[b])) begin rq.delete(i); break; end
      end else if (busy[b] && !has_next[b]) begin
        check(exp_mem[b].size() == 0, $sformatf("no member withheld bank %0d", b));
        if (tail[b] == 0) busy[b] = 0; else tail[b]--;
      end
    end
    // Power controller model: ready two cycles after wake.
    pwr_ready <= wake && $past(wake, 2);
    if (!wake && q_valid != '0 && !q_full && !flush) check(start == '0 && !group_active, "hold while filling");
  end

  // Producer.
  task automatic push(int b, int r);
    int slot = -1;
    @(negedge clk);
    in_valid = 1'b1;
    in_txn = '{we: 1'b0, bank: BANK_W'(b), row: ROW_W'(r), col: COL_W'($urandom), wdata: '0, tag: '0};
    while (!in_ready) @(negedge clk);
    for (int i = DEPTH - 1; i >= 0; i--) if (!q_valid[i]) slot = i;
    @(posedge clk);
    rq.push_back('{slot, b, r});
    #1 in_valid = 1'b0;
  endtask

  int pb, pr;
  initial begin
    foreach (busy[i]) begin busy[i] = 0; tail[i] = 0; end
    issue = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Pattern of the hold example: must wait for the 8th entry.
    push(0, 0); push(1, 0); push(1, 0); push(0, 1); push(0, 0); push(0, 0); push(0, 0);
    repeat (20) @(negedge clk);
    check(n_groups == 0 && !wake, "no group with 7 of 8 entries");
    push(0, 0);
    repeat (40) @(negedge clk);
    check(n_groups == 1, "one group after the queue filled");
    check(n_members == 7, "group served 5 + 2 members");
    check(q_count == 1, "bank0/row1 left waiting");
    // Random traffic.
    for (int n = 0; n < 500; n++) begin
      pb = $urandom_range(NB - 1); pr = $urandom_range(2);
      push(pb, pr);
    end
    flush = 1'b1;
    repeat (200) @(negedge clk);
    check(q_count == 0, "queue drained by flush");
    check(n_members == 508, $sformatf("every transaction served once (%0d)", n_members));
    $display("groups=%0d", n_groups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
