// tb_wpas_top_full: one complete operation of the subsystem with every
// parameter at its default (32 MB 16-way LLC, 20-cycle latency, ratio 2, chip
// budget 16, 32-entry queues, row:col:bank:rank mapping, t_RP = 60 cycles).
// Seventeen write-backs to lines of one LLC set fill its sixteen ways and then
// evict the first line: the eviction must reach the PCM channel as a write with
// the latest data and the per-chip counters the testbench computes (bit k on
// chip (k mod 64) / 8, 2 per 1->0 change, 1 per 0->1 change). Reading the
// evicted line back must return that data. A hit must respond in 20 cycles.
module tb_wpas_top_full;
  import wpas_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_done, req_valid, req_ready, req_write, resp_valid, resp_write;
  laddr_t req_addr, resp_addr, pcm_raddr;
  line_t req_data, resp_data, pcm_rdata;
  logic pcm_cmd_valid, pcm_rvalid, llc_hit, llc_miss, llc_evict;
  cmd_t pcm_cmd;
  logic [RANKS-1:0][$clog2(BANKS+1)-1:0] wif;
  logic [RANKS-1:0][CHIPS-1:0][5:0] pool;
  int violations, max_wif, writes, reads;

  wpas_top dut (
    .clk, .rst_n, .init_done, .req_valid, .req_ready, .req_write, .req_addr, .req_data,
    .resp_valid, .resp_write, .resp_addr, .resp_data, .pcm_cmd_valid, .pcm_cmd,
    .pcm_rvalid, .pcm_raddr, .pcm_rdata, .llc_hit, .llc_miss, .llc_evict,
    .writes_in_flight(wif), .pool);

  pcm_channel_model #(.RATIO(2), .CHIP_BUDGET(16), .T_RCD(22), .T_CL(5), .T_BURST(4),
    .W_OCC(0 + 1 + 6 + 60), .R_OCC(22 + 5 + 4 + 60)) u_pcm (
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

  localparam int SET = 12345;
  function automatic laddr_t line_addr(int k);
    return laddr_t'((k << 15) | SET);
  endfunction

  line_t written [17];
  int    exp_cnt [CHIPS];
  cmd_t  seen_wr;
  int    n_wr_cmd = 0;
  always @(posedge clk) if (pcm_cmd_valid && pcm_cmd.kind == TXN_WRITE) begin
    seen_wr = pcm_cmd;
    n_wr_cmd++;
  end

  task automatic access(logic wr, laddr_t a, line_t d, output line_t rd, output int lat);
    int t0;
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = a; req_data = d;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = $time / 10;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(posedge clk);
    lat = $time / 10 - t0;
    rd = resp_data;
  endtask

  initial begin
    line_t rd, d;
    int lat;
    req_valid = 0; req_write = 0; req_addr = '0; req_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    // line 0: two write-backs before it is evicted; counters accumulate
    for (int c = 0; c < CHIPS; c++) exp_cnt[c] = 0;
    d = init_line(line_addr(0));
    for (int pass = 0; pass < 2; pass++) begin
      line_t nd;
      nd = d;
      for (int k = 0; k < 6; k++) nd[(pass * 97 + k * 37) % LINE_BITS] = ~nd[(pass * 97 + k * 37) % LINE_BITS];
      for (int k = 0; k < LINE_BITS; k++)
        if (nd[k] != d[k]) exp_cnt[(k % 64) / 8] += nd[k] ? 1 : 2;
      access(1'b1, line_addr(0), nd, rd, lat);
      if (pass == 1) chk("hit latency 20", lat == 20);
      d = nd;
    end
    written[0] = d;
    // lines 1..16 fill the rest of the set, the last one evicts line 0
    for (int k = 1; k <= 16; k++) begin
      written[k] = init_line(line_addr(k)) ^ (line_t'(1) << k);
      access(1'b1, line_addr(k), written[k], rd, lat);
    end
    repeat (200) @(posedge clk);
    chk("one write reached the PCM", n_wr_cmd == 1);
    chk("evicted address", seen_wr.addr == line_addr(0));
    chk("evicted data", seen_wr.data == written[0]);
    for (int c = 0; c < CHIPS; c++)
      chk($sformatf("evicted counter chip %0d", c), int'(seen_wr.mods[c]) == exp_cnt[c]);
    chk("mapped rank/bank", seen_wr.ma.rank == line_addr(0)[0] && seen_wr.ma.bank == line_addr(0)[3:1]);
    // read the evicted line back through the PCM
    access(1'b0, line_addr(0), '0, rd, lat);
    chk("read back evicted line", rd == written[0]);
    chk("read went to the PCM", reads >= 18);
    repeat (200) @(posedge clk);
    chk("no channel violation", violations == 0);
    chk("second eviction", n_wr_cmd == 2 && seen_wr.addr == line_addr(1) && seen_wr.data == written[1]);
    $display("pcm_writes=%0d pcm_reads=%0d", writes, reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
