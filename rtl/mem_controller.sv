// mem_controller: the WPAS memory controller of one PCM channel with RANKS (2)
// ranks of eight chips. Transactions from the LLC enter the transaction queue;
// the head is mapped to rank/bank/row/column and moved into its rank's command
// queue together with the line's per-chip modification counters (the
// controller's copy of them). Each rank has its own power pool. The command
// scheduler issues at most one command per cycle to the channel, gating writes
// on the power pool as described in cmd_scheduler. Read data returning from the
// channel is registered once and handed to the LLC with the line address as its
// tag. The structure (transaction queue, command queues, counters, power pool,
// scheduler) is the document's; the one-cycle transfer from transaction queue
// to command queue and the read return path are this design's choices.
// Interface: valid/ready on txn_*, one-cycle pulses on pcm_cmd_* and fill_*.
module mem_controller
  import wpas_pkg::*;
#(
  parameter int unsigned POWER_RATIO = 2,
  parameter int unsigned CHIP_BUDGET = 16,
  parameter int unsigned TQ_DEPTH    = 32,
  parameter int unsigned CQ_DEPTH    = 32,
  parameter int unsigned SCHEME      = 2,
  parameter int unsigned T_BURST = 4,
  parameter int unsigned T_MOD   = 1,
  parameter int unsigned T_AL    = 0,
  parameter int unsigned T_CWD   = 1,
  parameter int unsigned T_WR    = 6,
  parameter int unsigned T_RP    = 60,
  parameter int unsigned T_RCD   = 22,
  parameter int unsigned T_CL    = 5,
  localparam int unsigned PW = $clog2(POWER_RATIO * CHIP_BUDGET + 1)
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the LLC
  input  logic   txn_valid,
  output logic   txn_ready,
  input  txn_t   txn,
  // read data to the LLC
  output logic   fill_valid,
  output laddr_t fill_addr,
  output line_t  fill_data,
  // PCM channel
  output logic   pcm_cmd_valid,
  output cmd_t   pcm_cmd,
  input  logic   pcm_rvalid,
  input  laddr_t pcm_raddr,
  input  line_t  pcm_rdata,
  // observation
  output logic [RANKS-1:0][$clog2(BANKS+1)-1:0] writes_in_flight,
  output logic [RANKS-1:0][CHIPS-1:0][PW-1:0]   pool
);

  localparam int unsigned IW = (CQ_DEPTH > 1) ? $clog2(CQ_DEPTH) : 1;

  logic   tq_valid, tq_ready;
  txn_t   tq_txn;
  maddr_t tq_ma;

  txn_queue #(.DEPTH(TQ_DEPTH)) u_tq (
    .clk, .rst_n,
    .in_valid(txn_valid), .in_ready(txn_ready), .in_txn(txn),
    .out_valid(tq_valid), .out_ready(tq_ready), .out_txn(tq_txn),
    .count()
  );

  addr_map #(.SCHEME(SCHEME)) u_map (.addr(tq_txn.addr), .ma(tq_ma));

  cmd_t new_cmd;
  always_comb begin
    new_cmd.kind = tq_txn.kind;
    new_cmd.ma   = tq_ma;
    new_cmd.addr = tq_txn.addr;
    new_cmd.data = tq_txn.data;
    new_cmd.mods = tq_txn.mods;
  end

  logic [RANKS-1:0]                 cq_push_ready;
  logic [RANKS-1:0][CQ_DEPTH-1:0]   cq_valid;
  cmd_t [RANKS-1:0][CQ_DEPTH-1:0]   cq_entries;
  logic [RANKS-1:0][CQ_DEPTH-1:0]   cq_fits;
  logic [RANKS-1:0]                 pop_valid;
  logic [IW-1:0]                    pop_idx;
  logic [RANKS-1:0]                 consume_valid;
  modvec_t                          consume_mods;
  logic [RANKS-1:0][BANKS-1:0]      release_valid;
  modvec_t [RANKS-1:0][BANKS-1:0]   release_mods;

  assign tq_ready = tq_valid && cq_push_ready[tq_ma.rank];

  for (genvar r = 0; r < RANKS; r++) begin : g_rank
    modvec_t [CQ_DEPTH-1:0] need;
    for (genvar i = 0; i < CQ_DEPTH; i++) begin : g_need
      assign need[i] = cq_entries[r][i].mods;
    end

    cmd_queue #(.DEPTH(CQ_DEPTH)) u_cq (
      .clk, .rst_n,
      .push_valid(tq_valid && tq_ma.rank == RANK_W'(r)),
      .push_ready(cq_push_ready[r]),
      .push_cmd(new_cmd),
      .pop_valid(pop_valid[r]), .pop_idx(pop_idx),
      .valid(cq_valid[r]), .entries(cq_entries[r])
    );

    power_pool #(.POWER_RATIO(POWER_RATIO), .CHIP_BUDGET(CHIP_BUDGET),
                 .DEPTH(CQ_DEPTH), .NREL(BANKS)) u_pool (
      .clk, .rst_n,
      .need(need), .fits(cq_fits[r]),
      .consume_valid(consume_valid[r]), .consume_mods(consume_mods),
      .release_valid(release_valid[r]), .release_mods(release_mods[r]),
      .pool(pool[r])
    );
  end

  cmd_scheduler #(
    .DEPTH(CQ_DEPTH), .T_BURST(T_BURST), .T_MOD(T_MOD), .T_AL(T_AL), .T_CWD(T_CWD),
    .T_WR(T_WR), .T_RP(T_RP), .T_RCD(T_RCD), .T_CL(T_CL)
  ) u_sched (
    .clk, .rst_n,
    .q_valid(cq_valid), .q_entries(cq_entries), .q_fits(cq_fits),
    .pop_valid, .pop_idx,
    .consume_valid, .consume_mods,
    .release_valid, .release_mods,
    .issue_valid(pcm_cmd_valid), .issue_cmd(pcm_cmd),
    .writes_in_flight
  );

  always_ff @(posedge clk) begin
    if (!rst_n) fill_valid <= 1'b0;
    else        fill_valid <= pcm_rvalid;
    if (pcm_rvalid) begin
      fill_addr <= pcm_raddr;
      fill_data <= pcm_rdata;
    end
  end

endmodule
