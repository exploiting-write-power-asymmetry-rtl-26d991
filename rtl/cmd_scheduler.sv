// cmd_scheduler: the WPAS command scheduler of one channel. Each cycle it may
// issue one command from the per-rank command queues. A command is ready when
//   - its bank is idle (close-page: a bank serves one access at a time),
//   - no older command in the same queue targets the same bank (keeps reads and
//     writes to one bank in order),
//   - the channel is free (the previous data burst, and for a write also the one
//     cycle that carries its modification counters, t_MOD, are over), and
//   - for a write, every per-chip counter fits in that rank's power pool.
// Among ready commands the oldest of a rank is chosen; ranks take turns
// (round-robin) when several have one. Writes to different banks thus overlap
// whenever the pool allows it. A write holds its bank and its power charge for
// t_AL + t_CWD + t_WR + t_RP cycles, after which the charge is returned to the
// pool; a read holds its bank for t_RCD + t_CL + t_BURST + t_RP cycles.
// Document: the issue condition, charging on issue, returning on completion,
// t_MOD = 1 cycle, the write occupancy (the span printed in the timing diagram;
// the text's formula also adds t_BURST) and the values t_AL=0, t_CWD=1, t_WR=6,
// t_BURST=4. This design's choices: the oldest-ready/round-robin order, the
// per-bank ordering rule, the read timing, and the cycle counts for t_RCD (55 ns)
// and t_RP (150 ns) at an assumed 2.5 ns memory clock (22 and 60 cycles).
// Interface: issue_valid/issue_cmd is a one-cycle pulse to the PCM channel;
// pop_* removes the issued entry from its queue in the same cycle.
module cmd_scheduler
  import wpas_pkg::*;
#(
  parameter int unsigned DEPTH   = 32,
  parameter int unsigned T_BURST = 4,
  parameter int unsigned T_MOD   = 1,
  parameter int unsigned T_AL    = 0,
  parameter int unsigned T_CWD   = 1,
  parameter int unsigned T_WR    = 6,
  parameter int unsigned T_RP    = 60,
  parameter int unsigned T_RCD   = 22,
  parameter int unsigned T_CL    = 5,
  localparam int unsigned IW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [RANKS-1:0][DEPTH-1:0] q_valid,
  input  cmd_t [RANKS-1:0][DEPTH-1:0] q_entries,
  input  logic [RANKS-1:0][DEPTH-1:0] q_fits,
  output logic [RANKS-1:0]            pop_valid,
  output logic [IW-1:0]               pop_idx,
  output logic [RANKS-1:0]            consume_valid,
  output modvec_t                     consume_mods,
  output logic [RANKS-1:0][BANKS-1:0] release_valid,
  output modvec_t [RANKS-1:0][BANKS-1:0] release_mods,
  output logic                        issue_valid,
  output cmd_t                        issue_cmd,
  output logic [RANKS-1:0][$clog2(BANKS+1)-1:0] writes_in_flight
);

  localparam int unsigned W_OCC = T_AL + T_CWD + T_WR + T_RP;
  localparam int unsigned R_OCC = T_RCD + T_CL + T_BURST + T_RP;
  localparam int unsigned W_GAP = T_BURST + T_MOD;
  localparam int unsigned R_GAP = T_BURST;
  localparam int unsigned TW = $clog2(((W_OCC > R_OCC) ? W_OCC : R_OCC) + 1);
  localparam int unsigned GW = $clog2(((W_GAP > R_GAP) ? W_GAP : R_GAP) + 1);

  initial begin
    if (W_OCC < 2 || R_OCC < 2 || W_GAP < 1 || R_GAP < 1)
      $fatal(1, "cmd_scheduler: timing parameters too small");
  end

  logic [RANKS-1:0][BANKS-1:0][TW-1:0] bank_t;
  logic [RANKS-1:0][BANKS-1:0]         bank_wr;
  modvec_t [RANKS-1:0][BANKS-1:0]      bank_mods;
  logic [GW-1:0]                       bus_t;
  logic [RANK_W-1:0]                   rr;

  // Readiness of each queue slot.
  logic [RANKS-1:0][DEPTH-1:0] ready;
  always_comb begin
    for (int unsigned r = 0; r < RANKS; r++) begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        logic older_same_bank;
        older_same_bank = 1'b0;
        for (int unsigned j = 0; j < i; j++)
          if (q_valid[r][j] && q_entries[r][j].ma.bank == q_entries[r][i].ma.bank)
            older_same_bank = 1'b1;
        ready[r][i] = q_valid[r][i] && !older_same_bank
                   && (bank_t[r][q_entries[r][i].ma.bank] == '0)
                   && (q_entries[r][i].kind == TXN_READ || q_fits[r][i])
                   && (bus_t == '0);
      end
    end
  end

  // Pick: rotate over ranks starting at rr, oldest ready slot within a rank.
  logic               pick_v;
  logic [RANK_W-1:0]  pick_r;
  logic [IW-1:0]      pick_i;
  always_comb begin
    pick_v = 1'b0;
    pick_r = '0;
    pick_i = '0;
    for (int unsigned k = 0; k < RANKS; k++) begin
      logic [RANK_W-1:0] r;
      r = RANK_W'((32'(rr) + k) % RANKS);
      for (int unsigned i = 0; i < DEPTH; i++)
        if (!pick_v && ready[r][i]) begin
          pick_v = 1'b1;
          pick_r = r;
          pick_i = IW'(i);
        end
    end
  end

  cmd_t pick_cmd;
  assign pick_cmd = q_entries[pick_r][pick_i];

  always_comb begin
    pop_valid     = '0;
    consume_valid = '0;
    if (pick_v) begin
      pop_valid[pick_r] = 1'b1;
      if (pick_cmd.kind == TXN_WRITE) consume_valid[pick_r] = 1'b1;
    end
  end
  assign pop_idx      = pick_i;
  assign consume_mods = pick_cmd.mods;
  assign issue_valid  = pick_v;
  assign issue_cmd    = pick_cmd;

  always_comb begin
    for (int unsigned r = 0; r < RANKS; r++) begin
      writes_in_flight[r] = '0;
      for (int unsigned b = 0; b < BANKS; b++) begin
        release_valid[r][b] = bank_wr[r][b] && (bank_t[r][b] == TW'(1));
        release_mods[r][b]  = bank_mods[r][b];
        writes_in_flight[r] += $bits(writes_in_flight[r])'(bank_wr[r][b]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank_t  <= '0;
      bank_wr <= '0;
      bus_t   <= '0;
      rr      <= '0;
    end else begin
      for (int unsigned r = 0; r < RANKS; r++)
        for (int unsigned b = 0; b < BANKS; b++)
          if (bank_t[r][b] != '0) begin
            bank_t[r][b] <= bank_t[r][b] - 1'b1;
            if (bank_t[r][b] == TW'(1)) bank_wr[r][b] <= 1'b0;
          end
      if (bus_t != '0) bus_t <= bus_t - 1'b1;
      if (pick_v) begin
        rr <= RANK_W'((32'(pick_r) + 1) % RANKS);
        if (pick_cmd.kind == TXN_WRITE) begin
          bank_t[pick_r][pick_cmd.ma.bank]    <= TW'(W_OCC - 1);
          bank_wr[pick_r][pick_cmd.ma.bank]   <= 1'b1;
          bank_mods[pick_r][pick_cmd.ma.bank] <= pick_cmd.mods;
          bus_t <= GW'(W_GAP - 1);
        end else begin
          bank_t[pick_r][pick_cmd.ma.bank] <= TW'(R_OCC - 1);
          bus_t <= GW'(R_GAP - 1);
        end
      end
    end
  end

  a_issue_ready: assert property (@(posedge clk) disable iff (!rst_n)
    issue_valid |-> (issue_cmd.kind == TXN_READ || q_fits[pick_r][pick_i]));

endmodule
