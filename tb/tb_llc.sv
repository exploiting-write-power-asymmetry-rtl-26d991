// tb_llc: drives the LLC as the upper-level cache and answers its memory
// transactions as the memory. A small configuration (4 sets, 2 ways) forces
// many replacements. Independent of the cache organisation, the testbench
// keeps the latest data of every address and, per address, the power-weighted
// count of modified bits since the line was last fetched (bit k belongs to chip
// (k mod 64) / 8, a 1->0 change costs 2, a 0->1 change costs 1, saturating at
// 15). Checks: read data, the 20-cycle hit latency, that every eviction
// carries the latest data and exactly those counts, and that dirty lines are
// never lost (memory plus cache always hold the latest data).
module tb_llc;
  import wpas_pkg::*;
  localparam int SETS = 4, WAYS = 2, LAT = 20, RATIO = 2, NADDR = 24;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done, req_valid, req_ready, req_write, resp_valid, resp_write;
  laddr_t req_addr, resp_addr, fill_addr;
  line_t req_data, resp_data, fill_data;
  logic mem_txn_valid, mem_txn_ready, fill_valid, hit_p, miss_p, evict_p;
  txn_t mem_txn;

  llc #(.SETS(SETS), .WAYS(WAYS), .HIT_LAT(LAT), .POWER_RATIO(RATIO)) dut (
    .clk, .rst_n, .init_done, .req_valid, .req_ready, .req_write, .req_addr, .req_data,
    .resp_valid, .resp_write, .resp_addr, .resp_data, .mem_txn_valid, .mem_txn_ready, .mem_txn,
    .fill_valid, .fill_addr, .fill_data, .hit_pulse(hit_p), .miss_pulse(miss_p), .evict_pulse(evict_p));

  line_t   golden [laddr_t];
  line_t   backing [laddr_t];
  int      cnt [laddr_t][CHIPS];
  int      hits = 0, misses = 0, evicts = 0, sat = 0;
  int      cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(w) * 32'h85EBCA6B;
    return l;
  endfunction

  function automatic laddr_t addr_of(int i);
    return laddr_t'(i * 3 + 1);   // spreads over the 4 sets
  endfunction

  // memory side: accept each transaction after a random delay; fill reads later
  laddr_t pend_addr;
  int     fill_at = -1;
  always @(posedge clk) begin
    if (rst_n && mem_txn_valid && mem_txn_ready) begin
      if (mem_txn.kind == TXN_WRITE) begin
        evicts++;
        chk("evicted data is latest", golden.exists(mem_txn.addr) && mem_txn.data == golden[mem_txn.addr]);
        for (int c = 0; c < CHIPS; c++) begin
          chk("evicted counts", int'(mem_txn.mods[c]) == ((cnt[mem_txn.addr][c] > 15) ? 15 : cnt[mem_txn.addr][c]));
          if (cnt[mem_txn.addr][c] > 15) sat++;
        end
        backing[mem_txn.addr] = mem_txn.data;
      end else begin
        pend_addr = mem_txn.addr;
        fill_at = cyc + 3 + int'($urandom % 10);
      end
    end
  end
  always @(negedge clk) mem_txn_ready <= ($urandom % 3 != 0);
  always @(posedge clk) begin
    fill_valid <= 1'b0;
    if (fill_at == cyc) begin
      if (!backing.exists(pend_addr)) backing[pend_addr] = init_line(pend_addr);
      if (!golden.exists(pend_addr)) golden[pend_addr] = backing[pend_addr];
      chk("memory holds latest on fill", backing[pend_addr] == golden[pend_addr]);
      for (int c = 0; c < CHIPS; c++) cnt[pend_addr][c] = 0;
      fill_valid <= 1'b1;
      fill_addr  <= pend_addr;
      fill_data  <= backing[pend_addr];
      fill_at = -1;
    end
  end

  initial begin
    req_valid = 0; req_write = 0; req_addr = '0; req_data = '0; mem_txn_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    for (int t = 0; t < 1500; t++) begin
      int acc_cyc;
      logic was_miss;
      laddr_t a;
      line_t nd;
      a = addr_of($urandom % NADDR);
      @(negedge clk);
      req_valid = 1;
      req_write = ($urandom % 2 == 0);
      req_addr = a;
      if (req_write) begin
        line_t base;
        base = golden.exists(a) ? golden[a] : (backing.exists(a) ? backing[a] : init_line(a));
        nd = base;
        begin
          int nflip;
          nflip = (t % 10 == 0) ? 60 : 1 + int'($urandom % 6);
          for (int k = 0; k < nflip; k++) begin
            int idx;
            idx = int'($urandom % LINE_BITS);
            nd[idx] = ~nd[idx];
          end
        end
        req_data = nd;
      end
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      acc_cyc = cyc;
      @(negedge clk);
      req_valid = 0;
      was_miss = 0;
      while (!resp_valid) begin
        @(posedge clk);
        if (miss_p) was_miss = 1;
        #1;
      end
      if (was_miss) misses++; else hits++;
      if (!was_miss) chk("hit latency 20", cyc - acc_cyc == LAT);
      chk("resp addr", resp_addr == a && resp_write == req_write);
      if (!req_write) chk("read data", resp_data == golden[a]);
      else begin
        // reference: the fill (if any) has already reset cnt and set golden
        for (int k = 0; k < LINE_BITS; k++)
          if (golden[a][k] != nd[k]) cnt[a][(k % 64) / 8] += nd[k] ? 1 : RATIO;
        golden[a] = nd;
      end
    end
    chk("hits seen", hits > 0);
    chk("misses seen", misses > 0);
    chk("evictions seen", evicts > 0);
    $display("hits=%0d misses=%0d evictions=%0d saturated_counts=%0d", hits, misses, evicts, sat);
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
