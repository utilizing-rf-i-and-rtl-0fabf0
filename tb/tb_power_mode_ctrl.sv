// tb_power_mode_ctrl: checks immediate power-down when all banks are
// precharged, wake-up with the T_XP exit delay, and the power-state report.
module tb_power_mode_ctrl;
  import mc_pkg::*;
  localparam int unsigned NB = 4, T_XP = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NB-1:0] bank_open = '0, bank_prech = '0;
  logic          wake = 1'b0, cke, ready;
  pwr_state_e    state;

  power_mode_ctrl #(.NB(NB), .T_XP(T_XP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1; #1;
    check(!cke && state == P_PRE_PDN, "reset in precharge power-down");
    // Wake: CKE next clock, ready T_XP clocks later.
    wake = 1'b1;
    tick(); check(cke && !ready && state == P_PRE_STBY, "CKE up, not ready");
    for (int k = 0; k < T_XP; k++) begin
      check(!ready, $sformatf("exit delay cycle %0d", k));
      tick();
    end
    check(ready, "ready after T_XP");
    bank_open = 4'b0100; #1;
    check(state == P_ACT_STBY, "active standby");
    // Wake dropped while a bank is open: stay up.
    wake = 1'b0;
    repeat (3) begin tick(); check(cke, "CKE held while a bank is open"); end
    bank_open = '0; bank_prech = 4'b0100; #1;
    check(state == P_PRE_STBY, "precharging counts as precharge standby");
    tick(); check(cke, "CKE held while a bank precharges");
    bank_prech = '0;
    tick(); check(!cke && state == P_PRE_PDN, "power-down once all banks precharged");
    // Wake while CKE still high: ready without a new exit delay.
    wake = 1'b1; tick(); repeat (T_XP) tick();
    check(ready, "ready again");
    // Active power-down state is reported if CKE is low with a bank open.
    wake = 1'b0; tick();
    check(!cke, "down");
    force bank_open = 4'b0001; #1;
    check(state == P_ACT_PDN, "active power-down classification");
    release bank_open; #1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
