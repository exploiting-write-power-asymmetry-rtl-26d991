// tb_cmd_scheduler: checks the command scheduler against a testbench-side
// command queue and power pool.
// Directed, with the timing t_AL=0, t_CWD=1, t_WR=6, t_RP=4, t_BURST=4,
// t_MOD=1 and the four-chip example writes X (bank A) and Y (bank B):
//   - pool of 8 with ratio-2 counts: Y issues 5 cycles after X (burst + t_MOD);
//   - pool of 4 with every modified bit counted as a zero: Y must wait until
//     X has returned its power, 11 cycles after X.
// Random: mixed reads and writes on two ranks; every issue is checked for an
// idle bank, a free channel, power that fits, no older same-bank command, and
// every write's charge must come back exactly W_OCC-1 cycles after its issue.
module tb_cmd_scheduler;
  import wpas_pkg::*;
  localparam int D = 8;
  localparam int T_BURST = 4, T_MOD = 1, T_AL = 0, T_CWD = 1, T_WR = 6, T_RP = 4, T_RCD = 3, T_CL = 2;
  localparam int W_OCC = T_AL + T_CWD + T_WR + T_RP;
  localparam int R_OCC = T_RCD + T_CL + T_BURST + T_RP;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [RANKS-1:0][D-1:0] q_valid, q_fits;
  cmd_t [RANKS-1:0][D-1:0] q_entries;
  logic [RANKS-1:0] pop_valid, consume_valid;
  logic [$clog2(D)-1:0] pop_idx;
  modvec_t consume_mods;
  logic [RANKS-1:0][BANKS-1:0] release_valid;
  modvec_t [RANKS-1:0][BANKS-1:0] release_mods;
  logic issue_valid;
  cmd_t issue_cmd;
  logic [RANKS-1:0][$clog2(BANKS+1)-1:0] wif;

  cmd_scheduler #(.DEPTH(D), .T_BURST(T_BURST), .T_MOD(T_MOD), .T_AL(T_AL), .T_CWD(T_CWD),
    .T_WR(T_WR), .T_RP(T_RP), .T_RCD(T_RCD), .T_CL(T_CL)) dut (
    .clk, .rst_n, .q_valid, .q_entries, .q_fits, .pop_valid, .pop_idx,
    .consume_valid, .consume_mods, .release_valid, .release_mods,
    .issue_valid, .issue_cmd, .writes_in_flight(wif));

  // testbench-side queues and pools
  cmd_t q [RANKS][$];
  int   pool [RANKS][CHIPS];
  int   cap;
  int   cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int cost(modcnt_t c);
    return (c == 4'hF || int'(c) > cap) ? cap : int'(c);
  endfunction

  always_comb begin
    q_valid = '0; q_entries = '0; q_fits = '0;
    for (int r = 0; r < RANKS; r++)
      for (int i = 0; i < D; i++)
        if (i < q[r].size()) begin
          q_valid[r][i] = 1'b1;
          q_entries[r][i] = q[r][i];
          q_fits[r][i] = 1'b1;
          for (int c = 0; c < CHIPS; c++)
            if (cost(q[r][i].mods[c]) > pool[r][c]) q_fits[r][i] = 1'b0;
        end
  end

  // bookkeeping of the model at each edge
  int bank_free_at [RANKS][BANKS];
  int bus_free_at;
  int rel_due [RANKS][BANKS];
  int issues = 0, stalls_power = 0, max_wif = 0;
  int issue_cyc [$];

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < RANKS; r++)
      for (int b = 0; b < BANKS; b++)
        if (release_valid[r][b]) begin
          chk("release on time", rel_due[r][b] == cyc);
          rel_due[r][b] = -1;
          for (int c = 0; c < CHIPS; c++) pool[r][c] += cost(release_mods[r][b][c]);
        end
    for (int r = 0; r < RANKS; r++) if (int'(wif[r]) > max_wif) max_wif = int'(wif[r]);
    if (issue_valid) begin
      int r;
      r = int'(issue_cmd.ma.rank);
      issues++;
      issue_cyc.push_back(cyc);
      chk("pop matches issue rank", pop_valid[r] && $countones(pop_valid) == 1);
      chk("issued entry", q[r][pop_idx] == issue_cmd);
      chk("bank idle", cyc >= bank_free_at[r][issue_cmd.ma.bank]);
      chk("bus free", cyc >= bus_free_at);
      for (int j = 0; j < int'(pop_idx); j++)
        chk("no older same-bank", q[r][j].ma.bank != issue_cmd.ma.bank);
      if (issue_cmd.kind == TXN_WRITE) begin
        chk("consume with write", consume_valid[r] && consume_mods == issue_cmd.mods);
        for (int c = 0; c < CHIPS; c++) begin
          chk("power fits", cost(issue_cmd.mods[c]) <= pool[r][c]);
          pool[r][c] -= cost(issue_cmd.mods[c]);
        end
        bank_free_at[r][issue_cmd.ma.bank] = cyc + W_OCC;
        rel_due[r][issue_cmd.ma.bank] = cyc + W_OCC - 1;
        bus_free_at = cyc + T_BURST + T_MOD;
      end else begin
        chk("no consume with read", consume_valid == '0);
        bank_free_at[r][issue_cmd.ma.bank] = cyc + R_OCC;
        bus_free_at = cyc + T_BURST;
      end
      q[r].delete(int'(pop_idx));
    end else begin
      chk("no pop without issue", pop_valid == '0 && consume_valid == '0);
      for (int r = 0; r < RANKS; r++)
        for (int i = 0; i < q[r].size(); i++)
          if (q[r][i].kind == TXN_WRITE && !q_fits[r][i] && cyc >= bus_free_at) stalls_power++;
    end
  end

  function automatic cmd_t mkcmd(txn_kind_e k, int rank, int bank, modvec_t m);
    cmd_t c = '0;
    c.kind = k; c.ma.rank = RANK_W'(rank); c.ma.bank = BANK_W'(bank);
    c.ma.row = ROW_W'($urandom); c.addr = laddr_t'($urandom); c.mods = m;
    return c;
  endfunction

  function automatic modvec_t mv(int a, int b, int c, int d);
    modvec_t m = '0;
    m[0] = 4'(a); m[1] = 4'(b); m[2] = 4'(c); m[3] = 4'(d);
    return m;
  endfunction

  task automatic reset_all(int new_cap);
    rst_n = 0;
    cap = new_cap;
    for (int r = 0; r < RANKS; r++) begin
      q[r].delete();
      for (int c = 0; c < CHIPS; c++) pool[r][c] = cap;
      for (int b = 0; b < BANKS; b++) begin bank_free_at[r][b] = 0; rel_due[r][b] = -1; end
    end
    bus_free_at = 0;
    issue_cyc.delete();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
  endtask

  initial begin
    // ratio 2: pool 8, counts of X and Y from the example
    reset_all(8);
    q[0].push_back(mkcmd(TXN_WRITE, 0, 0, mv(3, 1, 2, 3)));
    q[0].push_back(mkcmd(TXN_WRITE, 0, 1, mv(3, 2, 3, 2)));
    repeat (20) @(posedge clk);
    chk("wpas: two issues", issue_cyc.size() == 2);
    if (issue_cyc.size() == 2) chk("wpas: Y 5 cycles after X", issue_cyc[1] - issue_cyc[0] == 5);
    // content-blind counting: pool 4, every modified bit a zero
    reset_all(4);
    q[0].push_back(mkcmd(TXN_WRITE, 0, 0, mv(2, 1, 1, 3)));
    q[0].push_back(mkcmd(TXN_WRITE, 0, 1, mv(3, 2, 2, 1)));
    repeat (20) @(posedge clk);
    chk("pt: two issues", issue_cyc.size() == 2);
    if (issue_cyc.size() == 2) chk("pt: Y 11 cycles after X", issue_cyc[1] - issue_cyc[0] == 11);

    // random traffic
    reset_all(16);
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      for (int r = 0; r < RANKS; r++)
        if (q[r].size() < D && $urandom % 4 == 0) begin
          modvec_t m;
          for (int c = 0; c < CHIPS; c++) m[c] = ($urandom % 16 == 0) ? 4'hF : 4'($urandom % 7);
          q[r].push_back(mkcmd(($urandom % 3 == 0) ? TXN_READ : TXN_WRITE, r, $urandom % BANKS, m));
        end
    end
    repeat (400) @(posedge clk);
    chk("drained", q[0].size() == 0 && q[1].size() == 0);
    chk("overlapping writes seen", max_wif >= 2);
    chk("power stalls seen", stalls_power > 0);
    $display("issues=%0d max_writes_in_flight=%0d power_stall_cycles=%0d", issues, max_wif, stalls_power);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
