// tb_wpas_top: end-to-end run of the WPAS memory subsystem. The testbench acts
// as the upper-level cache (random reads and write-backs with a few changed
// bits, sometimes many) and the channel model plays the PCM ranks. A small LLC
// (8 sets, 2 ways, 4-cycle latency) makes evictions frequent; the memory timing
// uses t_RP = 60 so writes stay in flight long, and a chip budget of 4 zeros
// (8 units at ratio 2) makes the power pool bind. Checks: every read returns
// the latest data; the channel sees no power or bank-busy violation. Each
// mechanism must occur at least once: LLC hit, miss, dirty eviction carrying
// counters, saturated counter, overlapping writes, write held back by power,
// command held back by a busy bank, use of both ranks, and a read served while
// a write was in flight in the same rank.
module tb_wpas_top;
  import wpas_pkg::*;
  localparam int RATIO = 2, BUDGET = 4;
  localparam int T_BURST = 4, T_MOD = 1, T_AL = 0, T_CWD = 1, T_WR = 6, T_RP = 60, T_RCD = 22, T_CL = 5;
  localparam int W_OCC = T_AL + T_CWD + T_WR + T_RP;
  localparam int R_OCC = T_RCD + T_CL + T_BURST + T_RP;
  localparam int NREQ = 2500;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done, req_valid, req_ready, req_write, resp_valid, resp_write;
  laddr_t req_addr, resp_addr, pcm_raddr;
  line_t req_data, resp_data, pcm_rdata;
  logic pcm_cmd_valid, pcm_rvalid, llc_hit, llc_miss, llc_evict;
  cmd_t pcm_cmd;
  logic [RANKS-1:0][$clog2(BANKS+1)-1:0] wif;
  logic [RANKS-1:0][CHIPS-1:0][$clog2(RATIO*BUDGET+1)-1:0] pool;
  int violations, max_wif, writes, reads;

  wpas_top #(.LLC_SETS(8), .LLC_WAYS(2), .LLC_LAT(4), .POWER_RATIO(RATIO), .CHIP_BUDGET(BUDGET),
    .T_BURST(T_BURST), .T_MOD(T_MOD), .T_AL(T_AL), .T_CWD(T_CWD), .T_WR(T_WR), .T_RP(T_RP),
    .T_RCD(T_RCD), .T_CL(T_CL)) dut (
    .clk, .rst_n, .init_done, .req_valid, .req_ready, .req_write, .req_addr, .req_data,
    .resp_valid, .resp_write, .resp_addr, .resp_data, .pcm_cmd_valid, .pcm_cmd,
    .pcm_rvalid, .pcm_raddr, .pcm_rdata, .llc_hit, .llc_miss, .llc_evict,
    .writes_in_flight(wif), .pool);

  pcm_channel_model #(.RATIO(RATIO), .CHIP_BUDGET(BUDGET), .T_RCD(T_RCD), .T_CL(T_CL),
    .T_BURST(T_BURST), .W_OCC(W_OCC), .R_OCC(R_OCC)) u_pcm (
    .clk, .cmd_valid(pcm_cmd_valid), .cmd(pcm_cmd), .rvalid(pcm_rvalid), .raddr(pcm_raddr),
    .rdata(pcm_rdata), .violations, .max_writes_in_flight(max_wif), .writes, .reads);

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(w) * 32'h85EBCA6B;
    return l;
  endfunction

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_evict = 0, n_sat = 0, n_overlap = 0, n_power_stall = 0,
      n_bank_stall = 0, n_rank [RANKS], n_read_during_write = 0;
  always @(posedge clk) if (rst_n) begin
    if (llc_hit) n_hit++;
    if (llc_miss) n_miss++;
    if (llc_evict) n_evict++;
    if (pcm_cmd_valid) begin
      n_rank[pcm_cmd.ma.rank]++;
      if (pcm_cmd.kind == TXN_WRITE) begin
        if (wif[pcm_cmd.ma.rank] >= 1) n_overlap++;
        for (int c = 0; c < CHIPS; c++) if (pcm_cmd.mods[c] == 4'hF) n_sat++;
      end else if (wif[pcm_cmd.ma.rank] >= 1) n_read_during_write++;
    end
    for (int r = 0; r < RANKS; r++)
      for (int i = 0; i < 32; i++)
        if (dut.u_mc.cq_valid[r][i]) begin
          if (dut.u_mc.cq_entries[r][i].kind == TXN_WRITE && !dut.u_mc.cq_fits[r][i]) n_power_stall++;
          if (dut.u_mc.u_sched.bank_t[r][dut.u_mc.cq_entries[r][i].ma.bank] != '0) n_bank_stall++;
        end
  end

  line_t golden [laddr_t];

  initial begin
    n_rank[0] = 0; n_rank[1] = 0;
    req_valid = 0; req_write = 0; req_addr = '0; req_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int t = 0; t < NREQ; t++) begin
      laddr_t a;
      // 48 lines over 8 LLC sets, both ranks and all banks
      a = laddr_t'($urandom % 48);
      if (!golden.exists(a)) golden[a] = init_line(a);
      @(negedge clk);
      req_valid = 1;
      req_addr = a;
      req_write = ($urandom % 3 != 0);
      if (req_write) begin
        line_t nd;
        int nflip;
        nd = golden[a];
        nflip = (t % 25 == 0) ? 40 : 1 + int'($urandom % 4);
        for (int k = 0; k < nflip; k++) begin
          int idx;
          idx = int'($urandom % LINE_BITS);
          nd[idx] = ~nd[idx];
        end
        req_data = nd;
      end
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      @(negedge clk);
      req_valid = 0;
      while (!resp_valid) @(posedge clk);
      chk("resp addr", resp_addr == a);
      if (!req_write) chk($sformatf("read data t=%0d", t), resp_data == golden[a]);
      else golden[a] = req_data;
    end
    repeat (400) @(posedge clk);
    chk("no power or bank violation on the channel", violations == 0);
    chk("LLC hit", n_hit - n_miss > 0);  // every miss ends with one retried hit
    chk("LLC miss", n_miss > 0);
    chk("dirty eviction", n_evict > 0 && writes > 0);
    chk("saturated counter", n_sat > 0);
    chk("overlapping writes", n_overlap > 0 && max_wif >= 2);
    chk("write held back by power pool", n_power_stall > 0);
    chk("command held back by busy bank", n_bank_stall > 0);
    chk("both ranks used", n_rank[0] > 0 && n_rank[1] > 0);
    chk("read during write", n_read_during_write > 0);
    $display("hits=%0d misses=%0d evictions=%0d pcm_writes=%0d pcm_reads=%0d saturated=%0d overlapped_writes=%0d max_in_flight=%0d power_stall=%0d bank_stall=%0d rank0=%0d rank1=%0d read_during_write=%0d",
      n_hit, n_miss, n_evict, writes, reads, n_sat, n_overlap, max_wif, n_power_stall, n_bank_stall,
      n_rank[0], n_rank[1], n_read_during_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
