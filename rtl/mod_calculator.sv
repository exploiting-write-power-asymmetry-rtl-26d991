// mod_calculator: the LLC-side calculator of WPAS. When an upper-level cache
// writes a line back into the LLC, the old LLC copy is compared bit by bit with
// the new data, separately for the bits that go to each PCM chip. A bit that
// changes to 0 (a RESET, the expensive operation) costs POWER_RATIO units and a
// bit that changes to 1 (a SET) costs one unit, so the cost is expressed in
// "one-writes". The cost is added to the chip's running counter: a bit modified
// twice before the line is evicted is counted twice, which never under-estimates
// the power the eventual memory write needs. Counters are CNT_W (4) bits wide and
// saturate at all ones; the memory controller reads a saturated counter as
// "may need the whole chip budget". Weighting by the power ratio, the 4-bit
// counter per chip and the conservative accumulation follow the document; the
// saturation rule and the chip bit interleaving are this design's choices.
// Interface: purely combinational, old_data/new_data/cnt_in -> cnt_out.
module mod_calculator
  import wpas_pkg::*;
#(
  parameter int unsigned POWER_RATIO = 2   // RESET power / SET power
) (
  input  line_t   old_data,
  input  line_t   new_data,
  input  modvec_t cnt_in,
  output modvec_t cnt_out
);

  localparam int unsigned SUM_W = $clog2(CHIP_BITS * POWER_RATIO + (1 << CNT_W)) + 1;
  localparam logic [SUM_W-1:0] CNT_MAX = SUM_W'((1 << CNT_W) - 1);

  always_comb begin
    for (int unsigned c = 0; c < CHIPS; c++) begin
      logic [CHIP_BITS-1:0] o, n, diff;
      logic [SUM_W-1:0] zeros, ones, sum;
      o     = chip_slice(old_data, c);
      n     = chip_slice(new_data, c);
      diff  = o ^ n;
      zeros = '0;
      ones  = '0;
      for (int unsigned b = 0; b < CHIP_BITS; b++) begin
        zeros += SUM_W'(diff[b] & !n[b]);
        ones  += SUM_W'(diff[b] &  n[b]);
      end
      sum = SUM_W'(cnt_in[c]) + zeros * SUM_W'(POWER_RATIO) + ones;
      cnt_out[c] = (sum > CNT_MAX) ? '1 : CNT_W'(sum);
    end
  end

endmodule
