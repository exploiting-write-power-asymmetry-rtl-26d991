// tb_power_ratio_sweep: the same synthetic workload streams as the workload
// mix testbench, run through four memory controllers side by side to see how
// the gain of power-aware accounting depends on the RESET/SET power ratio:
//   g = 0, 1, 2 - power-aware accounting at ratios 2, 3 and 5 (a zero costs
//                 RATIO units, a one 1 unit, pool RATIO x 16 per chip, 4-bit
//                 counters);
//   g = 3       - content-blind accounting (every modified bit one RESET,
//                 pool 16 per chip, 3-bit counters: a count past 7 is sent as
//                 saturated and charged the whole chip).
// The content-blind controller behaves the same at every ratio, so it is run
// once; its channel model checks it at ratio 5, the strictest case. Each
// power-aware controller's channel model checks it at its own ratio.
// Per workload the testbench prints the completion cycles of each controller
// and the speedup over content-blind accounting. Checks: every read returns the
// latest data, every write finishes, no channel reports a power or bank
// violation, and at each ratio the power-aware controller is faster than the
// content-blind one for the workloads whose modified bits are over 90 % ones.
// A 4-bit counter holds 15 units, i.e. 7 RESETs at ratio 2 but only 3 at
// ratio 5, so at high ratios more counters saturate; the printout shows that
// cost next to the larger pool.
module tb_power_ratio_sweep;
  import wpas_pkg::*;
  localparam int NTXN = 400;
  localparam int T_BURST = 4, T_MOD = 1, T_AL = 0, T_CWD = 1, T_WR = 6, T_RP = 60, T_RCD = 22, T_CL = 5;
  localparam int W_OCC = T_AL + T_CWD + T_WR + T_RP;
  localparam int R_OCC = T_RCD + T_CL + T_BURST + T_RP;
  localparam int NW = 12;
  localparam int NG = 4;
  localparam int RATIO_OF [NG] = '{2, 3, 5, 1};

  string wname [NW] = '{"bzip2_m", "cactusADM_m", "hmmmer_m", "lbm_m", "leslie3d_m", "libquantum_m",
                        "mcf_m", "zeusmp_m", "mix_1", "mix_2", "mix_3", "mix_4"};
  real rw  [NW] = '{2.41, 1.29, 1.03, 1.34, 1.68, 2.64, 4.03, 1.89, 1.66, 1.35, 1.22, 1.42};
  real one [NW] = '{0.60, 0.56, 0.49, 0.96, 0.98, 0.98, 0.55, 0.89, 0.54, 0.66, 0.73, 0.97};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic   txn_valid [NG], txn_ready [NG], fill_valid [NG], cmd_valid [NG], rvalid [NG];
  txn_t   txn [NG];
  laddr_t fill_addr [NG], raddr [NG];
  line_t  fill_data [NG], rdata [NG];
  cmd_t   cmd [NG];
  int     viol [NG], maxw [NG], nwr [NG], nrd [NG];

  for (genvar g = 0; g < NG; g++) begin : g_ctrl
    localparam int R = RATIO_OF[g];
    mem_controller #(.POWER_RATIO(R), .CHIP_BUDGET(16), .T_BURST(T_BURST), .T_MOD(g == NG - 1 ? 0 : T_MOD),
      .T_AL(T_AL), .T_CWD(T_CWD), .T_WR(T_WR), .T_RP(T_RP), .T_RCD(T_RCD), .T_CL(T_CL)) u_mc (
      .clk, .rst_n, .txn_valid(txn_valid[g]), .txn_ready(txn_ready[g]), .txn(txn[g]),
      .fill_valid(fill_valid[g]), .fill_addr(fill_addr[g]), .fill_data(fill_data[g]),
      .pcm_cmd_valid(cmd_valid[g]), .pcm_cmd(cmd[g]), .pcm_rvalid(rvalid[g]), .pcm_raddr(raddr[g]),
      .pcm_rdata(rdata[g]), .writes_in_flight(), .pool());
    pcm_channel_model #(.RATIO(g == NG - 1 ? 5 : R), .CHIP_BUDGET(16), .T_RCD(T_RCD), .T_CL(T_CL),
      .T_BURST(T_BURST), .W_OCC(W_OCC), .R_OCC(R_OCC), .CNT_SCALE(g == NG - 1 ? 5 : 1)) u_pcm (
      .clk, .cmd_valid(cmd_valid[g]), .cmd(cmd[g]), .rvalid(rvalid[g]), .raddr(raddr[g]),
      .rdata(rdata[g]), .violations(viol[g]), .max_writes_in_flight(maxw[g]), .writes(nwr[g]), .reads(nrd[g]));
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  txn_t    stream [NTXN];
  modvec_t mods [NG][NTXN];
  line_t   expect_rd [NTXN];
  int      sent [NG], done_rd [NG], last_fill [NG], last_wr [NG], nreads;
  int      rd_q [NG][laddr_t][$];
  line_t   latest [laddr_t];

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(w) * 32'h85EBCA6B;
    return l;
  endfunction

  // saturating counter value: 4 bits for power-aware, 3 bits for content-blind
  function automatic modcnt_t sat(int v, int lim);
    return (v > lim) ? 4'hF : 4'(v);
  endfunction

  task automatic make_stream(int w);
    nreads = 0;
    for (int i = 0; i < NTXN; i++) begin
      laddr_t a;
      a = laddr_t'(($urandom % 16) | (($urandom % 4) << 11) | ((w + 1) << 20));
      if (!latest.exists(a)) latest[a] = init_line(a);
      stream[i].addr = a;
      if ($urandom % 1000 < int'(1000.0 * rw[w] / (1.0 + rw[w]))) begin
        stream[i].kind = TXN_READ;
        stream[i].data = '0;
        stream[i].mods = '0;
        for (int g = 0; g < NG; g++) mods[g][i] = '0;
        expect_rd[i] = latest[a];
        nreads++;
      end else begin
        line_t nd;
        int zeros [CHIPS], ones [CHIPS];
        nd = latest[a];
        for (int c = 0; c < CHIPS; c++) begin
          int nmod;
          nmod = int'($urandom % 23);          // 0..22, mean 11 of 64 bits
          for (int k = 0; k < nmod; k++) begin
            int bit_i;
            bit_i = int'($urandom % BEATS) * BUS_W + c * CHIP_DQ + int'($urandom % CHIP_DQ);
            nd[bit_i] = ($urandom % 1000 < int'(1000.0 * one[w]));
          end
        end
        for (int c = 0; c < CHIPS; c++) begin zeros[c] = 0; ones[c] = 0; end
        for (int k = 0; k < LINE_BITS; k++)
          if (nd[k] != latest[a][k]) begin
            if (nd[k]) ones[(k % 64) / 8]++; else zeros[(k % 64) / 8]++;
          end
        stream[i].kind = TXN_WRITE;
        stream[i].data = nd;
        stream[i].mods = '0;
        for (int g = 0; g < NG; g++)
          for (int c = 0; c < CHIPS; c++)
            mods[g][i][c] = (g == NG - 1) ? sat(zeros[c] + ones[c], 7)
                                          : sat(RATIO_OF[g] * zeros[c] + ones[c], 14);
        latest[a] = nd;
      end
    end
  endtask

  for (genvar g = 0; g < NG; g++) begin : g_feed
    always_comb begin
      txn_valid[g] = rst_n && sent[g] < NTXN;
      txn[g] = (sent[g] < NTXN) ? stream[sent[g]] : '0;
      if (sent[g] < NTXN) txn[g].mods = mods[g][sent[g]];
    end
    always @(posedge clk) if (rst_n) begin
      if (txn_valid[g] && txn_ready[g]) begin
        if (stream[sent[g]].kind == TXN_READ) rd_q[g][stream[sent[g]].addr].push_back(sent[g]);
        sent[g]++;
      end
      if (fill_valid[g]) begin
        int idx;
        chk("read tag", rd_q[g].exists(fill_addr[g]) && rd_q[g][fill_addr[g]].size() > 0);
        idx = rd_q[g][fill_addr[g]].pop_front();
        chk("read data", fill_data[g] == expect_rd[idx]);
        done_rd[g]++;
        last_fill[g] = cyc;
      end
      if (cmd_valid[g] && cmd[g].kind == TXN_WRITE) last_wr[g] = cyc + W_OCC;
    end
  end

  function automatic bit all_done(int wb [NG]);
    for (int g = 0; g < NG; g++)
      if (sent[g] < NTXN || done_rd[g] < nreads || nwr[g] - wb[g] < NTXN - nreads) return 0;
    return 1;
  endfunction

  initial begin
    for (int w = 0; w < NW; w++) begin
      int t0, vb [NG], wb [NG], end_c [NG];
      string line;
      rst_n = 0;
      make_stream(w);
      for (int g = 0; g < NG; g++) begin
        sent[g] = 0; done_rd[g] = 0; last_fill[g] = 0; last_wr[g] = 0;
        vb[g] = viol[g]; wb[g] = nwr[g];
      end
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst_n = 1;
      t0 = cyc;
      while (!all_done(wb)) @(posedge clk);
      repeat (W_OCC + 2) @(posedge clk);
      for (int g = 0; g < NG; g++) end_c[g] = (last_fill[g] > last_wr[g] ? last_fill[g] : last_wr[g]) - t0;
      line = "";
      for (int g = 0; g < NG - 1; g++)
        line = {line, $sformatf("  ratio %0d: %5d cycles, speedup %5.3f", RATIO_OF[g], end_c[g],
                                real'(end_c[NG-1]) / real'(end_c[g]))};
      $display("%-13s One %4.2f  content-blind %5d cycles%s", wname[w], one[w], end_c[NG-1], line);
      for (int g = 0; g < NG; g++) begin
        chk($sformatf("%s g%0d: no violation", wname[w], g), viol[g] == vb[g]);
        chk($sformatf("%s g%0d: all writes done", wname[w], g), nwr[g] - wb[g] == NTXN - nreads);
        if (g < NG - 1 && one[w] > 0.9)
          chk($sformatf("%s ratio %0d: faster than content-blind", wname[w], RATIO_OF[g]), end_c[g] < end_c[NG-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
