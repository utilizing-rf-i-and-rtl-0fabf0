// transaction_queue: the memory controller's fixed-size transaction queue.
//
// DEPTH slots hold queued transactions. A push (in_valid && in_ready) writes
// the lowest free slot; in_ready is low while every slot is valid. Any set of
// slots can be released in one cycle through free_vec (one bit per slot, as
// each per-bank logical channel consumes its own transaction). Arrival order
// is kept in an age matrix: older[i][j] is set when slot i arrived before
// slot j, so the scheduler can find the oldest transaction of a bank without
// a shifting FIFO. A slot freed and pushed in the same cycle is not possible
// because a push only targets slots that are already free.
//
// Timing: the contents and flags are registers; a push or a free becomes
// visible on the next clock. Reset empties the queue.
//
// The queue size is not specified for the evaluated system; the default of 8
// matches the eight-entry example of the "wait until full" policy.
module transaction_queue
  import mc_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  txn_t             in_txn,
  input  logic [DEPTH-1:0] free_vec,
  output logic [DEPTH-1:0] valid,
  output txn_t             entries [DEPTH],
  output logic [DEPTH-1:0] older   [DEPTH],
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  logic [DEPTH-1:0]         valid_q;
  txn_t                     mem_q   [DEPTH];
  logic [DEPTH-1:0]         older_q [DEPTH];
  logic [$clog2(DEPTH)-1:0] alloc_idx;
  logic                     alloc_ok;

  // Lowest free slot.
  always_comb begin
    alloc_idx = '0;
    alloc_ok  = 1'b0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!valid_q[i]) begin
        alloc_idx = i[$clog2(DEPTH)-1:0];
        alloc_ok  = 1'b1;
      end
    end
  end

  assign in_ready = alloc_ok;
  assign full     = &valid_q;
  assign valid    = valid_q;

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count += {{($clog2(DEPTH+1)-1){1'b0}}, valid_q[i]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      for (int i = 0; i < DEPTH; i++) older_q[i] <= '0;
    end else begin
      valid_q <= valid_q & ~free_vec;
      if (in_valid && alloc_ok) begin
        valid_q[alloc_idx] <= 1'b1;
        // Every transaction still queued is older than the new one.
        for (int i = 0; i < DEPTH; i++) begin
          older_q[i][alloc_idx] <= valid_q[i] && !free_vec[i];
        end
        older_q[alloc_idx] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && alloc_ok) mem_q[alloc_idx] <= in_txn;
  end

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      entries[i] = mem_q[i];
      older[i]   = older_q[i];
    end
  end

  // Freeing a slot that holds nothing means the scheduler lost track.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      a_free_valid: assert ((free_vec & ~valid_q) == '0)
        else $error("transaction_queue: free of an empty slot");
    end
  end

endmodule
