// burst_group_scheduler: the intelligent scheduler of the memory controller.
//
// Two policies work together:
//  1. Hold: nothing is issued until the transaction queue is full, so the
//     scheduler sees the widest window of transactions and finds more page
//     hits. A flush input also releases a partly filled queue (end of a
//     stream); that input is this design's addition.
//  2. Burst groups: when released, the scheduler forms one burst group. For
//     each bank it takes the page (row) of that bank's oldest queued
//     transaction; every queued transaction to that bank and page becomes a
//     member. Each bank's logical channel then opens the page, serves its
//     members and precharges. The next group forms only after all channels
//     are idle again, so every gap between groups is a period with all banks
//     precharged, when the DRAM can sit in precharge power-down.
//
// Sequence: COLLECT (wait for full/flush) -> WAKE (raise wake, wait for the
// power controller's ready) -> RUN (start pulses one cycle after forming;
// members are fed to the channels oldest first) -> COLLECT when no member is
// left and every channel reports idle. Membership is fixed when the group
// forms; transactions arriving during a group wait for the next one.
//
// Interface: next_idx[b]/has_next[b] name the oldest remaining member of
// bank b, combinationally from the current queue state; the channel frees it
// through free_vec, which also clears its member bit on the next clock.
module burst_group_scheduler
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  parameter int unsigned NB    = NUM_BANKS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [DEPTH-1:0]         q_valid,
  input  txn_t                     q_entries [DEPTH],
  input  logic [DEPTH-1:0]         q_older   [DEPTH],
  input  logic                     q_full,
  input  logic                     flush,
  input  logic [DEPTH-1:0]         free_vec,
  input  logic [NB-1:0]            eng_idle,
  input  logic                     pwr_ready,
  output logic                     wake,
  output logic [NB-1:0]            start,
  output logic [ROW_W-1:0]         start_row [NB],
  output logic [NB-1:0]            has_next,
  output logic [$clog2(DEPTH)-1:0] next_idx  [NB],
  output logic                     group_active,
  output logic                     group_formed
);

  typedef enum logic [1:0] {S_COLLECT, S_WAKE, S_RUN} sched_state_e;

  sched_state_e         state_q;
  logic [DEPTH-1:0]     member_q;
  logic [NB-1:0]        start_q;
  logic [ROW_W-1:0]     row_q [NB];

  // Oldest entry of each bank among a candidate set.
  logic [NB-1:0]            head_has;
  logic [$clog2(DEPTH)-1:0] head_idx [NB];
  logic [DEPTH-1:0]         member_next;

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      head_has[b] = 1'b0;
      head_idx[b] = '0;
      has_next[b] = 1'b0;
      next_idx[b] = '0;
      for (int i = 0; i < DEPTH; i++) begin
        logic is_head, is_next;
        is_head = q_valid[i] && (int'(q_entries[i].bank) == b);
        is_next = member_q[i] && (int'(q_entries[i].bank) == b);
        for (int j = 0; j < DEPTH; j++) begin
          if (q_valid[j] && int'(q_entries[j].bank) == b && q_older[j][i]) is_head = 1'b0;
          if (member_q[j] && int'(q_entries[j].bank) == b && q_older[j][i]) is_next = 1'b0;
        end
        if (is_head) begin
          head_has[b] = 1'b1;
          head_idx[b] = i[$clog2(DEPTH)-1:0];
        end
        if (is_next) begin
          has_next[b] = 1'b1;
          next_idx[b] = i[$clog2(DEPTH)-1:0];
        end
      end
    end
    // Members: every queued transaction to the page chosen for its bank.
    for (int i = 0; i < DEPTH; i++) begin
      member_next[i] = q_valid[i] &&
                       (q_entries[i].row == q_entries[head_idx[q_entries[i].bank]].row);
    end
  end

  assign wake         = (state_q != S_COLLECT);
  assign start        = start_q;
  assign group_active = (state_q == S_RUN);
  assign group_formed = (state_q == S_WAKE) && pwr_ready;

  always_comb begin
    for (int b = 0; b < NB; b++) start_row[b] = row_q[b];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_COLLECT;
      member_q <= '0;
      start_q  <= '0;
      for (int b = 0; b < NB; b++) row_q[b] <= '0;
    end else begin
      start_q  <= '0;
      member_q <= member_q & ~free_vec;
      unique case (state_q)
        S_COLLECT: if (q_full || (flush && (q_valid != '0))) state_q <= S_WAKE;
        S_WAKE: if (pwr_ready) begin
          member_q <= member_next;
          start_q  <= head_has;
          for (int b = 0; b < NB; b++) row_q[b] <= q_entries[head_idx[b]].row;
          state_q  <= S_RUN;
        end
        S_RUN: if (member_q == '0 && start_q == '0 && (&eng_idle)) state_q <= S_COLLECT;
        default: state_q <= S_COLLECT;
      endcase
    end
  end

  // A member must still be in the queue until its channel frees it.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_member_valid: assert ((member_q & ~q_valid) == '0)
        else $error("burst_group_scheduler: member slot not valid");
    end
  end

endmodule
