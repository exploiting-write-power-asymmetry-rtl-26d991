// tb_workload_mix: synthetic traffic shaped like each of twelve multiprogrammed
// workloads, run through two memory controllers side by side:
//   wpas - power ratio 2, pool of 2 x 16 units per chip, zeros cost 2, ones 1;
//   blind - every modified bit charged as a zero (ratio 1, pool 16 per chip),
//           with 3-bit counters, the content-blind accounting WPAS is
//           compared with (a counter past 7 is sent as saturated and charged
//           the whole chip, the same rule the power pool applies to 4 bits).
// Per workload, the read share follows its read-to-write ratio and the share of
// ones among modified bits follows its One_ratio; each write changes about
// 17.4 % of the line's bits (11 of each chip's 64 on average). Addresses are
// spread over all banks of both ranks. Both controllers receive the same
// transaction stream; the testbench reports the cycles each needs and the mean
// read latency. Checks: every transaction served, reads return the latest data,
// no violation of the physical power limit (2 units per RESET, 1 per SET, 32
// per chip) or of bank occupancy on either channel, and the power-aware
// controller is never slower than the content-blind one by more than 5 %.
// It also prints, per controller, how often 1, 2, 3 or 4 writes were in flight
// in a rank, and checks that writes overlap more often under power-aware
// accounting for the workloads whose modified bits are over 90 % ones.
module tb_workload_mix;
  import wpas_pkg::*;
  localparam int NTXN = 400;
  localparam int T_BURST = 4, T_MOD = 1, T_AL = 0, T_CWD = 1, T_WR = 6, T_RP = 60, T_RCD = 22, T_CL = 5;
  localparam int W_OCC = T_AL + T_CWD + T_WR + T_RP;
  localparam int R_OCC = T_RCD + T_CL + T_BURST + T_RP;
  localparam int NW = 12;

  string wname [NW] = '{"bzip2_m", "cactusADM_m", "hmmmer_m", "lbm_m", "leslie3d_m", "libquantum_m",
                        "mcf_m", "zeusmp_m", "mix_1", "mix_2", "mix_3", "mix_4"};
  real rw  [NW] = '{2.41, 1.29, 1.03, 1.34, 1.68, 2.64, 4.03, 1.89, 1.66, 1.35, 1.22, 1.42};
  real one [NW] = '{0.60, 0.56, 0.49, 0.96, 0.98, 0.98, 0.55, 0.89, 0.54, 0.66, 0.73, 0.97};

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // 0 = wpas, 1 = blind
  logic   txn_valid [2], txn_ready [2], fill_valid [2], cmd_valid [2], rvalid [2];
  txn_t   txn [2];
  laddr_t fill_addr [2], raddr [2];
  line_t  fill_data [2], rdata [2];
  cmd_t   cmd [2];
  int     viol [2], maxw [2], nwr [2], nrd [2];

  mem_controller #(.POWER_RATIO(2), .CHIP_BUDGET(16), .T_BURST(T_BURST), .T_MOD(T_MOD), .T_AL(T_AL),
    .T_CWD(T_CWD), .T_WR(T_WR), .T_RP(T_RP), .T_RCD(T_RCD), .T_CL(T_CL)) mc_wpas (
    .clk, .rst_n, .txn_valid(txn_valid[0]), .txn_ready(txn_ready[0]), .txn(txn[0]),
    .fill_valid(fill_valid[0]), .fill_addr(fill_addr[0]), .fill_data(fill_data[0]),
    .pcm_cmd_valid(cmd_valid[0]), .pcm_cmd(cmd[0]), .pcm_rvalid(rvalid[0]), .pcm_raddr(raddr[0]),
    .pcm_rdata(rdata[0]), .writes_in_flight(wif[0]), .pool());
  mem_controller #(.POWER_RATIO(1), .CHIP_BUDGET(16), .T_BURST(T_BURST), .T_MOD(0), .T_AL(T_AL),
    .T_CWD(T_CWD), .T_WR(T_WR), .T_RP(T_RP), .T_RCD(T_RCD), .T_CL(T_CL)) mc_blind (
    .clk, .rst_n, .txn_valid(txn_valid[1]), .txn_ready(txn_ready[1]), .txn(txn[1]),
    .fill_valid(fill_valid[1]), .fill_addr(fill_addr[1]), .fill_data(fill_data[1]),
    .pcm_cmd_valid(cmd_valid[1]), .pcm_cmd(cmd[1]), .pcm_rvalid(rvalid[1]), .pcm_raddr(raddr[1]),
    .pcm_rdata(rdata[1]), .writes_in_flight(wif[1]), .pool());

  // how many writes are in flight in a rank, sampled every cycle while one is
  logic [RANKS-1:0][$clog2(BANKS+1)-1:0] wif [2];
  int hist [2][BANKS+1];
  always @(posedge clk) if (rst_n)
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < RANKS; r++)
        if (wif[g][r] != 0) hist[g][wif[g][r]]++;

  for (genvar g = 0; g < 2; g++) begin : g_pcm
    pcm_channel_model #(.RATIO(2), .CHIP_BUDGET(16), .T_RCD(T_RCD), .T_CL(T_CL), .T_BURST(T_BURST),
      .W_OCC(W_OCC), .R_OCC(R_OCC), .CNT_SCALE(g + 1)) u_pcm (
      .clk, .cmd_valid(cmd_valid[g]), .cmd(cmd[g]), .rvalid(rvalid[g]), .raddr(raddr[g]),
      .rdata(rdata[g]), .violations(viol[g]), .max_writes_in_flight(maxw[g]), .writes(nwr[g]), .reads(nrd[g]));
  end

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // the stream of one workload
  txn_t   stream [NTXN];
  modvec_t blind_mods [NTXN];
  line_t  expect_rd [NTXN];
  int     sent [2], done_rd [2], rd_lat_sum [2], last_fill [2], nreads;
  int     send_cyc [2][NTXN];
  int     rd_q [2][laddr_t][$];

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(w) * 32'h85EBCA6B;
    return l;
  endfunction

  line_t latest [laddr_t];

  task automatic make_stream(int w);
    nreads = 0;
    for (int i = 0; i < NTXN; i++) begin
      laddr_t a;
      // four lines per bank and rank, several rows each
      a = laddr_t'(($urandom % 16) | (($urandom % 4) << 11) | ((w + 1) << 20));
      if (!latest.exists(a)) latest[a] = init_line(a);
      stream[i].addr = a;
      if ($urandom % 1000 < int'(1000.0 * rw[w] / (1.0 + rw[w]))) begin
        stream[i].kind = TXN_READ;
        stream[i].data = '0;
        stream[i].mods = '0;
        blind_mods[i] = '0;
        expect_rd[i] = latest[a];
        nreads++;
      end else begin
        line_t nd;
        int c2 [CHIPS], c1 [CHIPS];
        nd = latest[a];
        for (int c = 0; c < CHIPS; c++) begin
          int nmod;
          nmod = int'($urandom % 23);          // 0..22, mean 11 of 64 bits
          for (int k = 0; k < nmod; k++) begin
            int beat, bit_i;
            beat = int'($urandom % BEATS);
            bit_i = beat * BUS_W + c * CHIP_DQ + int'($urandom % CHIP_DQ);
            // the new value is 1 with probability One_ratio
            if ($urandom % 1000 < int'(1000.0 * one[w])) nd[bit_i] = 1'b1; else nd[bit_i] = 1'b0;
          end
        end
        for (int c = 0; c < CHIPS; c++) begin c2[c] = 0; c1[c] = 0; end
        for (int k = 0; k < LINE_BITS; k++)
          if (nd[k] != latest[a][k]) begin
            c2[(k % 64) / 8] += nd[k] ? 1 : 2;
            c1[(k % 64) / 8] += 1;
          end
        stream[i].kind = TXN_WRITE;
        stream[i].data = nd;
        for (int c = 0; c < CHIPS; c++) begin
          stream[i].mods[c] = (c2[c] > 15) ? 4'hF : 4'(c2[c]);
          blind_mods[i][c]  = (c1[c] > 7) ? 4'hF : 4'(c1[c]);   // 3-bit counter
        end
        latest[a] = nd;
      end
    end
  endtask

  // feeders: each controller takes the stream as fast as it accepts it
  for (genvar g = 0; g < 2; g++) begin : g_feed
    always_comb begin
      txn_valid[g] = rst_n && sent[g] < NTXN;
      txn[g] = (sent[g] < NTXN) ? stream[sent[g]] : '0;
      if (g == 1 && sent[g] < NTXN) txn[g].mods = blind_mods[sent[g]];
    end
    always @(posedge clk) if (rst_n) begin
      if (txn_valid[g] && txn_ready[g]) begin
        if (stream[sent[g]].kind == TXN_READ) rd_q[g][stream[sent[g]].addr].push_back(sent[g]);
        send_cyc[g][sent[g]] = cyc;
        sent[g]++;
      end
      if (fill_valid[g]) begin
        int idx;
        chk("read tag", rd_q[g].exists(fill_addr[g]) && rd_q[g][fill_addr[g]].size() > 0);
        idx = rd_q[g][fill_addr[g]].pop_front();
        chk("read data", fill_data[g] == expect_rd[idx]);
        rd_lat_sum[g] += cyc - send_cyc[g][idx];
        done_rd[g]++;
        last_fill[g] = cyc;
      end
    end
  end

  initial begin
    for (int w = 0; w < NW; w++) begin
      int t0, vb [2], wb [2];
      real sp;
      rst_n = 0;
      make_stream(w);
      for (int g = 0; g < 2; g++) begin
        for (int n = 0; n <= BANKS; n++) hist[g][n] = 0;
        sent[g] = 0; done_rd[g] = 0; rd_lat_sum[g] = 0; last_fill[g] = 0;
        vb[g] = viol[g]; wb[g] = nwr[g];
      end
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst_n = 1;
      t0 = cyc;
      while (done_rd[0] < nreads || done_rd[1] < nreads || sent[0] < NTXN || sent[1] < NTXN) @(posedge clk);
      // wait for the last writes to leave the queues and finish
      while (nwr[0] - wb[0] < NTXN - nreads || nwr[1] - wb[1] < NTXN - nreads) @(posedge clk);
      repeat (W_OCC + 2) @(posedge clk);
      begin
        int end_c [2];
        for (int g = 0; g < 2; g++) end_c[g] = (last_fill[g] > g_last_wr[g] ? last_fill[g] : g_last_wr[g]) - t0;
        sp = real'(end_c[1]) / real'(end_c[0]);
        $display("%-13s R/W %4.2f One %4.2f: power-aware %0d cycles, content-blind %0d cycles, speedup %5.3f, mean read latency %0d vs %0d",
          wname[w], rw[w], one[w], end_c[0], end_c[1], sp,
          rd_lat_sum[0] / (nreads > 0 ? nreads : 1), rd_lat_sum[1] / (nreads > 0 ? nreads : 1));
        for (int g = 0; g < 2; g++) begin
          int tot;
          string line;
          tot = 0;
          for (int n = 1; n <= BANKS; n++) tot += hist[g][n];
          line = "";
          for (int n = 1; n <= 4; n++) line = {line, $sformatf(" %0d:%4.1f%%", n, 100.0 * hist[g][n] / (tot > 0 ? tot : 1))};
          $display("    %s concurrent writes per rank (share of busy cycles)%s",
                   g == 0 ? "power-aware  " : "content-blind", line);
        end
        if (one[w] > 0.9) chk($sformatf("%s: more overlap with power-aware accounting", wname[w]),
                              hist[0][2] + hist[0][3] > hist[1][2] + hist[1][3]);
        chk($sformatf("%s: no violation", wname[w]), viol[0] == vb[0] && viol[1] == vb[1]);
        chk($sformatf("%s: all writes done", wname[w]), nwr[0] - wb[0] == NTXN - nreads && nwr[1] - wb[1] == NTXN - nreads);
        chk($sformatf("%s: not slower", wname[w]), real'(end_c[0]) <= 1.05 * real'(end_c[1]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle of the last write command issued on each channel
  int g_last_wr [2];
  always @(posedge clk) for (int g = 0; g < 2; g++) if (cmd_valid[g] && cmd[g].kind == TXN_WRITE) g_last_wr[g] = cyc + W_OCC;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
