// power_mode_ctrl: DRAM power-down control and power-state report.
//
// The DRAM is put into power-down (CKE low) as soon as every bank is
// precharged and the scheduler is not asking for it, so the gaps between
// burst groups are spent in precharge power-down, the lowest-power state.
// When `wake` rises, CKE is raised and `ready` follows T_XP clocks later
// (power-down exit time). While `wake` stays high CKE stays high.
//
// `state` classifies the chip as in the LPDDR power model: a bank open means
// an active state, otherwise a precharge state (a bank still precharging
// counts as precharge standby); CKE low means power-down, high standby.
//
// Entering power-down at once is the document's aim of reaching precharge
// power-down whenever possible; T_XP and the reset state (CKE low, all banks
// idle) are this design's choices. CKE and ready are registered.
module power_mode_ctrl
  import mc_pkg::*;
#(
  parameter int unsigned NB   = NUM_BANKS,
  parameter int unsigned T_XP = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NB-1:0] bank_open,
  input  logic [NB-1:0] bank_prech,
  input  logic          wake,
  output logic          cke,
  output logic          ready,
  output pwr_state_e    state
);

  logic       cke_q;
  logic [3:0] xp_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cke_q <= 1'b0;
      xp_q  <= '0;
    end else begin
      if (wake) begin
        cke_q <= 1'b1;
        if (!cke_q) xp_q <= 4'(T_XP);
        else if (xp_q != '0) xp_q <= xp_q - 1'b1;
      end else if (bank_open == '0 && bank_prech == '0) begin
        cke_q <= 1'b0;
      end
    end
  end

  assign cke   = cke_q;
  assign ready = cke_q && (xp_q == '0) && wake;

  always_comb begin
    unique case ({bank_open != '0, cke_q})
      2'b00: state = P_PRE_PDN;
      2'b01: state = P_PRE_STBY;
      2'b10: state = P_ACT_PDN;
      default: state = P_ACT_STBY;
    endcase
  end

endmodule
