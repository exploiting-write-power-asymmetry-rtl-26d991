// llc: the last-level cache extended for WPAS. A WAYS-way set-associative,
// write-back, write-allocate cache of 64-byte lines (default 32 MB, 16 ways,
// 20-cycle latency). Besides tag and data, every line carries one 4-bit
// modification counter per PCM chip. When the upper level writes a line back,
// the old copy is read (overlapped with the tag match, so it costs no extra
// cycles) and mod_calculator adds the power-weighted number of changed bits to
// the counters. A line filled from memory starts with zero counters. When a
// dirty line is replaced, it is sent to the memory controller as a write
// transaction that carries the counters; a miss sends a read transaction and
// waits for the fill. Clean victims are dropped.
// Document: the counters per line and per chip, their width, how they are
// updated, and that they travel with the evicted line; the cache size,
// associativity, line size and latency. This design's choices: one request at a
// time (blocking), round-robin replacement per set, a write-back miss fetching
// the line first (the old data is needed for the comparison), and clearing the
// valid bits one set per cycle after reset (init_done rises when finished).
// Interface: req_* valid/ready; resp_valid pulses HIT_LAT cycles after a hit is
// accepted (reads return data, writes are acknowledged); mem_txn_* valid/ready;
// fill_* is a one-cycle pulse carrying read data from memory.
module llc
  import wpas_pkg::*;
#(
  parameter int unsigned SETS        = 32768,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned HIT_LAT     = 20,
  parameter int unsigned POWER_RATIO = 2,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned TAG_W = LADDR_W - SET_W
) (
  input  logic   clk,
  input  logic   rst_n,
  output logic   init_done,
  // upper level (L2) side
  input  logic   req_valid,
  output logic   req_ready,
  input  logic   req_write,
  input  laddr_t req_addr,
  input  line_t  req_data,
  output logic   resp_valid,
  output logic   resp_write,
  output laddr_t resp_addr,
  output line_t  resp_data,
  // memory controller side
  output logic   mem_txn_valid,
  input  logic   mem_txn_ready,
  output txn_t   mem_txn,
  input  logic   fill_valid,
  input  laddr_t fill_addr,
  input  line_t  fill_data,
  // observation
  output logic   hit_pulse,
  output logic   miss_pulse,
  output logic   evict_pulse
);

  localparam int unsigned LINES = SETS * WAYS;
  localparam int unsigned LW = $clog2(LINES);

  typedef enum logic [2:0] {S_INIT, S_IDLE, S_LOOKUP, S_EVICT, S_FETCH, S_WAIT} state_e;
  state_e state;

  line_t            data_q  [LINES];
  logic [TAG_W-1:0] tag_q   [LINES];
  modvec_t          cnt_q   [LINES];
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAYS-1:0]  dirty_q [SETS];
  logic [WAY_W-1:0] rr_q    [SETS];

  logic             r_write;
  laddr_t           r_addr;
  line_t            r_data;
  logic [$clog2(HIT_LAT+1)-1:0] lat;
  logic [SET_W-1:0] init_set;
  logic [WAY_W-1:0] victim;

  initial if (HIT_LAT < 2) $fatal(1, "llc: HIT_LAT must be at least 2");

  logic [SET_W-1:0] set_i;
  logic [TAG_W-1:0] tag_i;
  assign set_i = SET_W'(r_addr);
  assign tag_i = TAG_W'(r_addr >> SET_W);

  function automatic logic [LW-1:0] lidx(logic [SET_W-1:0] s, logic [WAY_W-1:0] w);
    return LW'(32'(s) * WAYS + 32'(w));
  endfunction

  // Tag match and victim choice.
  logic             hit;
  logic [WAY_W-1:0] hit_way, free_way;
  logic             has_free;
  always_comb begin
    hit = 1'b0; hit_way = '0; has_free = 1'b0; free_way = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      if (valid_q[set_i][w] && tag_q[lidx(set_i, WAY_W'(w))] == tag_i && !hit) begin
        hit = 1'b1; hit_way = WAY_W'(w);
      end
      if (!valid_q[set_i][w] && !has_free) begin
        has_free = 1'b1; free_way = WAY_W'(w);
      end
    end
  end

  // Calculator on the hit line.
  modvec_t new_cnt;
  mod_calculator #(.POWER_RATIO(POWER_RATIO)) u_calc (
    .old_data(data_q[lidx(set_i, hit_way)]),
    .new_data(r_data),
    .cnt_in(cnt_q[lidx(set_i, hit_way)]),
    .cnt_out(new_cnt)
  );

  assign init_done = (state != S_INIT);
  assign req_ready = (state == S_IDLE);

  always_comb begin
    mem_txn_valid = 1'b0;
    mem_txn       = '0;
    if (state == S_EVICT) begin
      mem_txn_valid = 1'b1;
      mem_txn.kind  = TXN_WRITE;
      mem_txn.addr  = laddr_t'({tag_q[lidx(set_i, victim)], set_i});
      mem_txn.data  = data_q[lidx(set_i, victim)];
      mem_txn.mods  = cnt_q[lidx(set_i, victim)];
    end else if (state == S_FETCH) begin
      mem_txn_valid = 1'b1;
      mem_txn.kind  = TXN_READ;
      mem_txn.addr  = r_addr;
    end
  end

  always_ff @(posedge clk) begin
    resp_valid  <= 1'b0;
    hit_pulse   <= 1'b0;
    miss_pulse  <= 1'b0;
    evict_pulse <= 1'b0;
    if (!rst_n) begin
      state    <= S_INIT;
      init_set <= '0;
    end else begin
      unique case (state)
        S_INIT: begin
          valid_q[init_set] <= '0;
          dirty_q[init_set] <= '0;
          rr_q[init_set]    <= '0;
          init_set <= init_set + 1'b1;
          if (32'(init_set) == SETS - 1) state <= S_IDLE;
        end
        S_IDLE: if (req_valid) begin
          r_write <= req_write;
          r_addr  <= req_addr;
          r_data  <= req_data;
          lat     <= $bits(lat)'(HIT_LAT - 2);
          state   <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (lat != '0) lat <= lat - 1'b1;
          else if (hit) begin
            hit_pulse  <= 1'b1;
            resp_valid <= 1'b1;
            resp_write <= r_write;
            resp_addr  <= r_addr;
            resp_data  <= data_q[lidx(set_i, hit_way)];
            if (r_write) begin
              data_q[lidx(set_i, hit_way)] <= r_data;
              cnt_q[lidx(set_i, hit_way)]  <= new_cnt;
              dirty_q[set_i][hit_way]      <= 1'b1;
            end
            state <= S_IDLE;
          end else begin
            miss_pulse <= 1'b1;
            victim <= has_free ? free_way : rr_q[set_i];
            if (!has_free) rr_q[set_i] <= WAY_W'((32'(rr_q[set_i]) + 1) % WAYS);
            state <= (!has_free && dirty_q[set_i][rr_q[set_i]]) ? S_EVICT : S_FETCH;
          end
        end
        S_EVICT: if (mem_txn_ready) begin
          evict_pulse <= 1'b1;
          valid_q[set_i][victim] <= 1'b0;
          dirty_q[set_i][victim] <= 1'b0;
          state <= S_FETCH;
        end
        S_FETCH: if (mem_txn_ready) state <= S_WAIT;
        S_WAIT: if (fill_valid && fill_addr == r_addr) begin
          data_q[lidx(set_i, victim)] <= fill_data;
          tag_q[lidx(set_i, victim)]  <= tag_i;
          cnt_q[lidx(set_i, victim)]  <= '0;
          valid_q[set_i][victim]      <= 1'b1;
          dirty_q[set_i][victim]      <= 1'b0;
          state <= S_LOOKUP;   // lat is 0: the retried lookup hits at once
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
