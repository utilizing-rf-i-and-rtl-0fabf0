// dram_bank_model: testbench-only behavioural model of the DRAM bank arrays.
//
// Holds the cell contents of NB banks in sparse arrays, keeps each bank's
// open row (the row buffer) and serves the per-bank strobes of the bank
// control logic: bk_rdata[b] shows the addressed word of the open row in the
// same cycle as bk_rd[b]. A word never written reads as init_word(). It also
// checks the DRAM timing rules ACT->column >= T_RCD, ACT->PRE >= T_RAS,
// PRE->ACT >= T_RP, and counts activates, column commands and violations.
module dram_bank_model
  import mc_pkg::*;
#(
  parameter int unsigned NB    = NUM_BANKS,
  parameter int unsigned T_RCD = 3,
  parameter int unsigned T_RP  = 3,
  parameter int unsigned T_RAS = 8
) (
  input  logic              clk,
  input  logic [NB-1:0]     bk_act,
  input  logic [NB-1:0]     bk_pre,
  input  logic [NB-1:0]     bk_rd,
  input  logic [NB-1:0]     bk_wr,
  input  logic [ROW_W-1:0]  bk_row   [NB],
  input  logic [COL_W-1:0]  bk_col   [NB],
  input  logic [DATA_W-1:0] bk_wdata [NB],
  output logic [DATA_W-1:0] bk_rdata [NB]
);
  logic [DATA_W-1:0] mem [NB][logic [ROW_W+COL_W-1:0]];
  logic [ROW_W-1:0]  open_row [NB];
  logic [NB-1:0]     is_open = '0;
  longint            t_act [NB], t_pre [NB];
  longint            cyc = 0;
  int                violations = 0;
  int                activates = 0;
  int                col_cmds = 0;

  initial for (int b = 0; b < NB; b++) begin
    t_act[b] = -1000; t_pre[b] = -1000; open_row[b] = '0;
  end

  function automatic logic [DATA_W-1:0] init_word(int b, logic [ROW_W-1:0] r, logic [COL_W-1:0] c);
    return {32'hD0A0_0000 | 32'(b), 8'h00, 24'({r, c})} ^ 64'h0123_4567_0000_0000;
  endfunction

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      logic [ROW_W+COL_W-1:0] k;
      k = {open_row[b], bk_col[b]};
      bk_rdata[b] = mem[b].exists(k) ? mem[b][k] : init_word(b, open_row[b], bk_col[b]);
    end
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    for (int b = 0; b < NB; b++) begin
      if (bk_act[b]) begin
        activates++;
        if (is_open[b] || cyc - t_pre[b] < T_RP) begin
          violations++; $display("bank model: bad ACT bank %0d at %0d", b, cyc);
        end
        is_open[b] <= 1'b1; open_row[b] <= bk_row[b]; t_act[b] = cyc;
      end
      if (bk_rd[b] || bk_wr[b]) begin
        col_cmds++;
        if (!is_open[b] || cyc - t_act[b] < T_RCD || bk_row[b] != open_row[b]) begin
          violations++; $display("bank model: bad column command bank %0d at %0d", b, cyc);
        end
        if (bk_wr[b]) mem[b][{open_row[b], bk_col[b]}] = bk_wdata[b];
      end
      if (bk_pre[b]) begin
        if (is_open[b] && cyc - t_act[b] < T_RAS) begin
          violations++; $display("bank model: early PRE bank %0d at %0d", b, cyc);
        end
        is_open[b] <= 1'b0; t_pre[b] = cyc;
      end
    end
  end
endmodule
