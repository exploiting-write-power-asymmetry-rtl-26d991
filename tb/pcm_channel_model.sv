// pcm_channel_model: behavioural model of the PCM ranks on one channel, for
// testbenches only (the PCM devices are not part of the RTL). It stores line
// data per address (unwritten lines hold a fixed pattern of the address),
// returns read data T_RCD + T_CL + T_BURST cycles after a read command with the
// line address as tag, and checks the physical power limit: while a write is in
// flight (W_OCC cycles) it draws, on each chip, RATIO per bit it changes to 0
// and 1 per bit it changes to 1; the sum per chip and rank must stay within
// RATIO * CHIP_BUDGET (a single write larger than that is only flagged if it
// overlaps another write that draws from the same chip). It also checks that a write's
// per-chip counter is not below what it really changes, unless saturated. It also checks that a bank gets no new command while
// busy, and reports the most writes seen in flight at once.
module pcm_channel_model
  import wpas_pkg::*;
#(
  parameter int RATIO = 2,
  parameter int CHIP_BUDGET = 16,
  parameter int T_RCD = 22,
  parameter int T_CL = 5,
  parameter int T_BURST = 4,
  parameter int W_OCC = 71,
  parameter int R_OCC = 91,
  parameter int CNT_SCALE = 1   // power units per counter step (2 when a counter step is one RESET)
) (
  input  logic   clk,
  input  logic   cmd_valid,
  input  cmd_t   cmd,
  output logic   rvalid,
  output laddr_t raddr,
  output line_t  rdata,
  output int     violations,
  output int     max_writes_in_flight,
  output int     writes,
  output int     reads
);

  line_t mem [laddr_t];
  int draw [RANKS][CHIPS];
  int wr_end [RANKS][BANKS];
  int wr_cost [RANKS][BANKS][CHIPS];
  int busy_until [RANKS][BANKS];
  int cyc = 0;

  typedef struct { int due; laddr_t a; line_t d; } rd_t;
  rd_t rq [$];

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(w) * 32'h85EBCA6B;
    return l;
  endfunction

  function automatic line_t peek(laddr_t a);
    return mem.exists(a) ? mem[a] : init_line(a);
  endfunction

  initial begin
    violations = 0; max_writes_in_flight = 0; writes = 0; reads = 0; rvalid = 0;
    for (int r = 0; r < RANKS; r++) begin
      for (int c = 0; c < CHIPS; c++) draw[r][c] = 0;
      for (int b = 0; b < BANKS; b++) begin wr_end[r][b] = -1; busy_until[r][b] = 0; end
    end
  end

  always @(posedge clk) begin
    int inflight;
    cyc++;
    // writes that complete return their draw
    for (int r = 0; r < RANKS; r++)
      for (int b = 0; b < BANKS; b++)
        if (wr_end[r][b] == cyc) begin
          for (int c = 0; c < CHIPS; c++) draw[r][c] -= wr_cost[r][b][c];
          wr_end[r][b] = -1;
        end
    if (cmd_valid) begin
      int r, b;
      r = int'(cmd.ma.rank);
      b = int'(cmd.ma.bank);
      if (cyc < busy_until[r][b]) begin
        violations++;
        $display("PCM: command to busy bank r%0d b%0d", r, b);
      end
      if (cmd.kind == TXN_WRITE) begin
        line_t old;
        old = peek(cmd.addr);
        writes++;
        for (int c = 0; c < CHIPS; c++) wr_cost[r][b][c] = 0;
        for (int k = 0; k < LINE_BITS; k++)
          if (old[k] != cmd.data[k]) wr_cost[r][b][(k % 64) / 8] += cmd.data[k] ? 1 : RATIO;
        for (int c = 0; c < CHIPS; c++) begin
          if (cmd.mods[c] != 4'hF && wr_cost[r][b][c] > CNT_SCALE * int'(cmd.mods[c])) begin
            violations++;
            $display("PCM: counter %0d below the %0d units written on chip %0d", cmd.mods[c], wr_cost[r][b][c], c);
          end
          draw[r][c] += wr_cost[r][b][c];
          // a single write larger than the whole budget can only run alone
          if (draw[r][c] > RATIO * CHIP_BUDGET && wr_cost[r][b][c] > 0 && draw[r][c] != wr_cost[r][b][c]) begin
            violations++;
            $display("PCM: power exceeded on rank %0d chip %0d: %0d", r, c, draw[r][c]);
          end
        end
        wr_end[r][b] = cyc + W_OCC;
        busy_until[r][b] = cyc + W_OCC;
        mem[cmd.addr] = cmd.data;
      end else begin
        rd_t e;
        reads++;
        e.due = cyc + T_RCD + T_CL + T_BURST;
        e.a = cmd.addr;
        e.d = peek(cmd.addr);
        rq.push_back(e);
        busy_until[r][b] = cyc + R_OCC;
      end
    end
    for (int r = 0; r < RANKS; r++) begin
      inflight = 0;
      for (int b = 0; b < BANKS; b++) if (wr_end[r][b] > cyc) inflight++;
      if (inflight > max_writes_in_flight) max_writes_in_flight = inflight;
    end
    rvalid <= 1'b0;
    if (rq.size() > 0 && rq[0].due == cyc) begin
      rvalid <= 1'b1;
      raddr  <= rq[0].a;
      rdata  <= rq[0].d;
      void'(rq.pop_front());
    end
  end

endmodule
