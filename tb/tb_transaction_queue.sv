// tb_transaction_queue: checks allocation, full/ready, contents, age order
// and multi-slot free of the transaction queue against a reference model.
module tb_transaction_queue;
  import mc_pkg::*;

  function automatic logic [DATA_W-1:0] rand_data();
    logic [DATA_W-1:0] d;
    for (int i = 0; i < DATA_W / 32; i++) d[32*i +: 32] = $urandom;
    return d;
  endfunction
  localparam int unsigned DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid = 1'b0, in_ready, full;
  txn_t             in_txn;
  logic [DEPTH-1:0] free_vec = '0, valid;
  txn_t             entries [DEPTH];
  logic [DEPTH-1:0] older   [DEPTH];
  logic [$clog2(DEPTH+1)-1:0] count;

  transaction_queue #(.DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Reference: slot contents and arrival stamp.
  bit     m_valid [DEPTH];
  txn_t   m_txn   [DEPTH];
  longint m_stamp [DEPTH];
  longint stamp = 0;

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic compare();
    int n = 0;
    for (int i = 0; i < DEPTH; i++) begin
      check(valid[i] == m_valid[i], $sformatf("valid[%0d]", i));
      if (m_valid[i]) begin
        n++;
        check(entries[i] == m_txn[i], $sformatf("entry %0d", i));
        for (int j = 0; j < DEPTH; j++) if (m_valid[j] && j != i)
          check(older[i][j] == (m_stamp[i] < m_stamp[j]), $sformatf("older[%0d][%0d]", i, j));
      end
    end
    check(count == n, "count");
    check(full == (n == DEPTH), "full");
    check(in_ready == (n != DEPTH), "in_ready");
  endtask

  // One cycle: optional push, optional free set.
  task automatic step(bit push, logic [DEPTH-1:0] fv);
    int slot = -1;
    @(negedge clk);
    in_valid = push;
    in_txn   = '{we: 1'($urandom), bank: 2'($urandom), row: 14'($urandom), col: 10'($urandom),
                 wdata: rand_data(), tag: 8'($urandom)};
    free_vec = fv;
    if (push) for (int i = DEPTH - 1; i >= 0; i--) if (!m_valid[i]) slot = i;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) if (fv[i]) m_valid[i] = 0;
    if (push && slot >= 0) begin
      m_valid[slot] = 1; m_txn[slot] = in_txn; m_stamp[slot] = stamp++;
    end
    #1;
    in_valid = 0; free_vec = '0;
    compare();
  endtask

  logic [DEPTH-1:0] fv;
  initial begin
    foreach (m_valid[i]) m_valid[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1 compare();
    // Fill, then try to overfill.
    for (int k = 0; k < DEPTH + 2; k++) step(1, '0);
    // Free two slots in one cycle, refill them.
    step(0, 8'b0010_0100);
    step(1, '0); step(1, '0);
    // Random traffic.
    for (int k = 0; k < 400; k++) begin
      fv = '0;
      for (int i = 0; i < DEPTH; i++) if (m_valid[i] && $urandom_range(3) == 0) fv[i] = 1;
      step($urandom_range(1), fv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
