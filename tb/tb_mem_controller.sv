// tb_mem_controller: the memory controller with the PCM channel model.
// Random read and write transactions to a small set of line addresses are fed
// in; each write carries the power-weighted count of bits it changes relative
// to the previous write of that address (as the LLC would compute it). The
// channel model enforces the physical power limit and bank occupancy; the
// testbench checks every command's rank/bank/row/column decoding (row:col:
// bank:rank), that every read returns the data of the latest earlier write of
// its address, that all transactions are served, and that writes overlapped
// and were held back by the power pool at least once each. Timing values are
// the small ones of the timing diagram to keep the run short.
module tb_mem_controller;
  import wpas_pkg::*;
  localparam int RATIO = 2, BUDGET = 16;
  localparam int T_BURST = 4, T_MOD = 1, T_AL = 0, T_CWD = 1, T_WR = 6, T_RP = 4, T_RCD = 3, T_CL = 2;
  localparam int W_OCC = T_AL + T_CWD + T_WR + T_RP;
  localparam int R_OCC = T_RCD + T_CL + T_BURST + T_RP;
  localparam int NTXN = 3000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic txn_valid, txn_ready, fill_valid, pcm_cmd_valid, pcm_rvalid;
  txn_t txn;
  laddr_t fill_addr, pcm_raddr;
  line_t fill_data, pcm_rdata;
  cmd_t pcm_cmd;
  logic [RANKS-1:0][$clog2(BANKS+1)-1:0] wif;
  logic [RANKS-1:0][CHIPS-1:0][$clog2(RATIO*BUDGET+1)-1:0] pool;
  int violations, max_wif, writes, reads;

  mem_controller #(.POWER_RATIO(RATIO), .CHIP_BUDGET(BUDGET), .T_BURST(T_BURST), .T_MOD(T_MOD),
    .T_AL(T_AL), .T_CWD(T_CWD), .T_WR(T_WR), .T_RP(T_RP), .T_RCD(T_RCD), .T_CL(T_CL)) dut (
    .clk, .rst_n, .txn_valid, .txn_ready, .txn, .fill_valid, .fill_addr, .fill_data,
    .pcm_cmd_valid, .pcm_cmd, .pcm_rvalid, .pcm_raddr, .pcm_rdata,
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

  line_t latest [laddr_t];
  line_t expect_rd [laddr_t][$];
  int issued = 0, filled = 0, power_stalls = 0;

  // command decoding and read data checks
  always @(posedge clk) if (rst_n) begin
    if (pcm_cmd_valid) begin
      issued++;
      chk("rank", pcm_cmd.ma.rank == pcm_cmd.addr[0]);
      chk("bank", pcm_cmd.ma.bank == pcm_cmd.addr[3:1]);
      chk("col",  pcm_cmd.ma.col  == pcm_cmd.addr[10:4]);
      chk("row",  pcm_cmd.ma.row  == pcm_cmd.addr[25:11]);
    end
    if (fill_valid) begin
      filled++;
      chk("read tag known", expect_rd.exists(fill_addr) && expect_rd[fill_addr].size() > 0);
      if (expect_rd.exists(fill_addr) && expect_rd[fill_addr].size() > 0) begin
        chk("read data", fill_data == expect_rd[fill_addr][0]);
        void'(expect_rd[fill_addr].pop_front());
      end
    end
    // a write that waits although bank and order would allow it
    for (int r = 0; r < RANKS; r++)
      for (int i = 0; i < 32; i++)
        if (dut.cq_valid[r][i] && dut.cq_entries[r][i].kind == TXN_WRITE && !dut.cq_fits[r][i])
          power_stalls++;
  end

  initial begin
    int nreads = 0;
    txn_valid = 0; txn = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NTXN; t++) begin
      laddr_t a;
      // 64 addresses: all banks of both ranks, several rows
      a = laddr_t'(($urandom % 16) | (($urandom % 4) << 11));
      if (!latest.exists(a)) latest[a] = init_line(a);
      @(negedge clk);
      txn_valid = 1;
      txn.addr = a;
      if ($urandom % 3 == 0) begin
        txn.kind = TXN_READ;
        txn.data = '0;
        txn.mods = '0;
        expect_rd[a].push_back(latest[a]);
        nreads++;
      end else begin
        line_t nd;
        int acc [CHIPS];
        nd = latest[a];
        begin
          int nflip;
          nflip = 4 + int'($urandom % 40);
          for (int k = 0; k < nflip; k++) begin
            int idx;
            idx = int'($urandom % LINE_BITS);
            nd[idx] = ~nd[idx];
          end
        end
        for (int c = 0; c < CHIPS; c++) acc[c] = 0;
        for (int k = 0; k < LINE_BITS; k++)
          if (nd[k] != latest[a][k]) acc[(k % 64) / 8] += nd[k] ? 1 : RATIO;
        txn.kind = TXN_WRITE;
        txn.data = nd;
        for (int c = 0; c < CHIPS; c++) txn.mods[c] = (acc[c] > 15) ? 4'hF : 4'(acc[c]);
        latest[a] = nd;
      end
      @(posedge clk);
      while (!txn_ready) @(posedge clk);
      @(negedge clk);
      txn_valid = 0;
    end
    repeat (3000) @(posedge clk);
    chk("all issued", issued == NTXN);
    chk("all reads returned", filled == nreads);
    chk("no power or bank violation", violations == 0);
    chk("writes overlapped", max_wif >= 2);
    chk("power stalls happened", power_stalls > 0);
    $display("issued=%0d reads=%0d writes=%0d max_writes_in_flight=%0d power_stall_entry_cycles=%0d violations=%0d",
             issued, reads, writes, max_wif, power_stalls, violations);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
