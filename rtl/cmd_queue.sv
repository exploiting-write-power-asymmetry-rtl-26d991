// cmd_queue: one rank's command queue (32 entries). Entries are kept in age
// order, slot 0 the oldest, so the scheduler can pick the oldest command that
// is ready. Every slot is visible at once; the scheduler removes any one slot
// per cycle (pop_idx) and the younger entries shift down by one, while a new
// command is appended behind the youngest. Each entry carries the memory
// controller's copy of the line's per-chip modification counters. The depth is
// the document's; the collapsing organisation is this design's choice.
module cmd_queue
  import wpas_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push_valid,
  output logic push_ready,
  input  cmd_t push_cmd,
  input  logic pop_valid,
  input  logic [IW-1:0] pop_idx,
  output logic [DEPTH-1:0] valid,
  output cmd_t [DEPTH-1:0] entries
);

  logic [$clog2(DEPTH+1)-1:0] count;

  assign push_ready = (32'(count) < DEPTH);

  always_comb
    for (int unsigned i = 0; i < DEPTH; i++) valid[i] = (i < 32'(count));

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else count <= count + $bits(count)'(push_valid && push_ready)
                        - $bits(count)'(pop_valid && valid[pop_idx]);
  end

  always_ff @(posedge clk) begin
    logic do_pop;
    logic [$clog2(DEPTH+1)-1:0] tail;
    logic [IW-1:0] slot;
    do_pop = pop_valid && valid[pop_idx];
    for (int unsigned i = 0; i < DEPTH; i++)
      if (do_pop && i >= 32'(pop_idx) && i + 1 < DEPTH) entries[i] <= entries[i+1];
    tail = do_pop ? count - 1'b1 : count;
    if (push_valid && push_ready) begin
      slot = IW'(tail);   // tail < DEPTH whenever push_ready
      entries[slot] <= push_cmd;
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop_valid |-> valid[pop_idx]);

endmodule
