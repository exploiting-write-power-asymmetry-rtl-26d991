// power_pool: the memory controller's per-chip power budget for one rank.
// Each chip's entry holds how many bits that chip can still write, counted in
// SET-equivalent units. Full capacity is POWER_RATIO * CHIP_BUDGET, where
// CHIP_BUDGET is the number of RESETs (zeros) a chip can write at once; with
// POWER_RATIO = 1 the pool degenerates to the content-blind budget that counts
// every modified bit as a zero. The comparator checks, for every queued command,
// that each of its per-chip counters fits in the pool; a write is charged on
// issue (consume) and its charge is returned when it completes (release, one
// port per bank since each bank has at most one write in flight). A saturated
// counter (all ones) is charged the chip's full capacity. Doubling the pool for a
// ratio of 2.0 and the compare/decrease/increase rules follow the document. The
// document says a write issues when each counter is "smaller than" the pool
// entry, and also says a chip "can support" writing a given number of zeros;
// this design allows a counter equal to the entry (need <= available).
// Timing: fits[] is combinational from the registered pool; consume and release
// update the pool on the next clock edge.
module power_pool
  import wpas_pkg::*;
#(
  parameter int unsigned POWER_RATIO = 2,
  parameter int unsigned CHIP_BUDGET = 16,  // zeros a chip can write concurrently
  parameter int unsigned DEPTH       = 32,  // command queue entries checked
  parameter int unsigned NREL        = BANKS,
  localparam int unsigned CAP        = POWER_RATIO * CHIP_BUDGET,
  localparam int unsigned PW         = $clog2(CAP + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  modvec_t [DEPTH-1:0] need,
  output logic    [DEPTH-1:0] fits,
  input  logic                consume_valid,
  input  modvec_t             consume_mods,
  input  logic    [NREL-1:0]  release_valid,
  input  modvec_t [NREL-1:0]  release_mods,
  output logic [CHIPS-1:0][PW-1:0] pool
);

  localparam int unsigned SW = PW + $clog2(NREL + 1) + 1;

  function automatic logic [PW-1:0] cost(modcnt_t c);
    if (c == '1) return PW'(CAP);
    else if (32'(c) > CAP) return PW'(CAP);
    else return PW'(c);
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < DEPTH; i++) begin
      fits[i] = 1'b1;
      for (int unsigned c = 0; c < CHIPS; c++)
        if (cost(need[i][c]) > pool[c]) fits[i] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned c = 0; c < CHIPS; c++) pool[c] <= PW'(CAP);
    end else begin
      for (int unsigned c = 0; c < CHIPS; c++) begin
        logic [SW-1:0] v;
        v = SW'(pool[c]);
        for (int unsigned r = 0; r < NREL; r++)
          if (release_valid[r]) v += SW'(cost(release_mods[r][c]));
        if (consume_valid) v -= SW'(cost(consume_mods[c]));
        pool[c] <= PW'(v);
      end
    end
  end

  // The scheduler only consumes what fits, so the pool never goes below zero
  // and never above its capacity.
  for (genvar c = 0; c < CHIPS; c++) begin : g_chk
    a_cap: assert property (@(posedge clk) disable iff (!rst_n) 32'(pool[c]) <= CAP);
  end

endmodule
