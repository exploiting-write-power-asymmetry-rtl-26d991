// wpas_top: a PCM main-memory subsystem with write power asymmetry scheduling.
// The LLC tracks, per line and per PCM chip, a power-weighted count of modified
// bits (a RESET to 0 costs POWER_RATIO, a SET to 1 costs 1); evicted dirty lines
// travel with those counts to the memory controller, whose scheduler lets a
// write start only when each target chip's power pool can cover its count.
// Because SETs are charged less than RESETs, more writes to different banks run
// at once than a scheme charging every modified bit as a RESET would allow.
// The upper-level cache port (req/resp) and the PCM channel (pcm_cmd/pcm_r*) are
// the top's ports: the processor and the PCM devices themselves are outside.
// All parameter defaults are the main configuration (32 MB 16-way LLC,
// 32-entry queues, power ratio 2.0, mapping row:col:bank:rank); CHIP_BUDGET and
// the t_RCD/t_RP cycle counts are this design's own values (see cmd_scheduler).
module wpas_top
  import wpas_pkg::*;
#(
  parameter int unsigned LLC_SETS    = 32768,
  parameter int unsigned LLC_WAYS    = 16,
  parameter int unsigned LLC_LAT     = 20,
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
  output logic   init_done,
  // upper-level cache port
  input  logic   req_valid,
  output logic   req_ready,
  input  logic   req_write,
  input  laddr_t req_addr,
  input  line_t  req_data,
  output logic   resp_valid,
  output logic   resp_write,
  output laddr_t resp_addr,
  output line_t  resp_data,
  // PCM channel
  output logic   pcm_cmd_valid,
  output cmd_t   pcm_cmd,
  input  logic   pcm_rvalid,
  input  laddr_t pcm_raddr,
  input  line_t  pcm_rdata,
  // observation
  output logic   llc_hit,
  output logic   llc_miss,
  output logic   llc_evict,
  output logic [RANKS-1:0][$clog2(BANKS+1)-1:0] writes_in_flight,
  output logic [RANKS-1:0][CHIPS-1:0][PW-1:0]   pool
);

  logic   txn_valid, txn_ready;
  txn_t   txn;
  logic   fill_valid;
  laddr_t fill_addr;
  line_t  fill_data;

  llc #(.SETS(LLC_SETS), .WAYS(LLC_WAYS), .HIT_LAT(LLC_LAT), .POWER_RATIO(POWER_RATIO)) u_llc (
    .clk, .rst_n, .init_done,
    .req_valid, .req_ready, .req_write, .req_addr, .req_data,
    .resp_valid, .resp_write, .resp_addr, .resp_data,
    .mem_txn_valid(txn_valid), .mem_txn_ready(txn_ready), .mem_txn(txn),
    .fill_valid, .fill_addr, .fill_data,
    .hit_pulse(llc_hit), .miss_pulse(llc_miss), .evict_pulse(llc_evict)
  );

  mem_controller #(
    .POWER_RATIO(POWER_RATIO), .CHIP_BUDGET(CHIP_BUDGET),
    .TQ_DEPTH(TQ_DEPTH), .CQ_DEPTH(CQ_DEPTH), .SCHEME(SCHEME),
    .T_BURST(T_BURST), .T_MOD(T_MOD), .T_AL(T_AL), .T_CWD(T_CWD),
    .T_WR(T_WR), .T_RP(T_RP), .T_RCD(T_RCD), .T_CL(T_CL)
  ) u_mc (
    .clk, .rst_n,
    .txn_valid, .txn_ready, .txn,
    .fill_valid, .fill_addr, .fill_data,
    .pcm_cmd_valid, .pcm_cmd, .pcm_rvalid, .pcm_raddr, .pcm_rdata,
    .writes_in_flight, .pool
  );

endmodule
