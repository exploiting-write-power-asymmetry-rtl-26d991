// tb_power_pool: checks the per-chip power pool and its comparator.
// Replays the four-chip scheduling example: with every modified bit charged as
// a zero (ratio 1, budget 4) write X leaves 2,3,3,1 and write Y (3,2,2,1) does
// not fit; with ratio 2 the pool starts at 8, X leaves 5,7,6,5 and Y fits.
// Then random consume/release traffic against a software copy of the pool,
// including saturated counters, which are charged the whole capacity.
module tb_power_pool;
  import wpas_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  modvec_t [1:0] need;
  logic [1:0] fits1, fits2;
  logic cons1, cons2;
  modvec_t cmods;
  logic [BANKS-1:0] rel1, rel2;
  modvec_t [BANKS-1:0] rmods;
  logic [CHIPS-1:0][2:0] pool1;
  logic [CHIPS-1:0][3:0] pool2;

  power_pool #(.POWER_RATIO(1), .CHIP_BUDGET(4), .DEPTH(2)) dut1 (
    .clk, .rst_n, .need, .fits(fits1), .consume_valid(cons1), .consume_mods(cmods),
    .release_valid(rel1), .release_mods(rmods), .pool(pool1));
  power_pool #(.POWER_RATIO(2), .CHIP_BUDGET(4), .DEPTH(2)) dut2 (
    .clk, .rst_n, .need, .fits(fits2), .consume_valid(cons2), .consume_mods(cmods),
    .release_valid(rel2), .release_mods(rmods), .pool(pool2));

  function automatic modvec_t mv(int a, int b, int c, int d);
    modvec_t m = '0;
    m[0] = 4'(a); m[1] = 4'(b); m[2] = 4'(c); m[3] = 4'(d);
    return m;
  endfunction

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  int model [CHIPS];

  initial begin
    cons1 = 0; cons2 = 0; rel1 = '0; rel2 = '0; cmods = '0; rmods = '0;
    need[0] = mv(2, 1, 1, 3); need[1] = mv(3, 2, 2, 1);   // ratio-1 counts of X, Y
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("pt initial 4", pool1[0] == 4 && pool1[7] == 4);
    chk("wpas initial 8", pool2[0] == 8 && pool2[7] == 8);
    chk("pt X,Y fit on a full pool", fits1 == 2'b11);
    // issue X in the ratio-1 pool
    cmods = mv(2, 1, 1, 3); cons1 = 1;
    @(negedge clk); cons1 = 0;
    chk("pt pool after X", pool1[0] == 2 && pool1[1] == 3 && pool1[2] == 3 && pool1[3] == 1 && pool1[4] == 4);
    chk("pt Y blocked", fits1[1] == 1'b0);
    // ratio-2 counts of X and Y
    need[0] = mv(3, 1, 2, 3); need[1] = mv(3, 2, 3, 2);
    cmods = mv(3, 1, 2, 3); cons2 = 1;
    @(negedge clk); cons2 = 0;
    chk("wpas pool after X", pool2[0] == 5 && pool2[1] == 7 && pool2[2] == 6 && pool2[3] == 5 && pool2[4] == 8);
    chk("wpas Y fits", fits2[1] == 1'b1);
    // X completes in both (bank 3 release port)
    rmods[3] = mv(2, 1, 1, 3); rel1[3] = 1;
    @(negedge clk); rel1 = '0;
    chk("pt pool restored", pool1[0] == 4 && pool1[3] == 4);
    rmods[3] = mv(3, 1, 2, 3); rel2[3] = 1;
    @(negedge clk); rel2 = '0;
    chk("wpas pool restored", pool2[0] == 8 && pool2[3] == 8);
    // exactly-equal need fits; a saturated counter takes the whole chip
    need[0] = mv(8, 0, 0, 0); need[1] = mv(15, 0, 0, 0);
    #1;
    chk("equal fits", fits2[0] == 1'b1);
    chk("saturated fits full pool", fits2[1] == 1'b1);
    cmods = mv(15, 0, 0, 0); cons2 = 1;
    @(negedge clk); cons2 = 0;
    chk("saturated charged full", pool2[0] == 0);
    need[0] = mv(1, 0, 0, 0);
    #1;
    chk("empty chip blocks", fits2[0] == 1'b0);
    rmods[5] = mv(15, 0, 0, 0); rel2[5] = 1;
    @(negedge clk); rel2 = '0;
    chk("saturated returned", pool2[0] == 8);

    // random traffic on the ratio-2 pool with up to 8 writes in flight
    begin
      modvec_t inflight [BANKS];
      logic [BANKS-1:0] busy;
      busy = '0;
      for (int c = 0; c < CHIPS; c++) model[c] = 8;
      for (int t = 0; t < 500; t++) begin
        int b;
        modvec_t m;
        for (int c = 0; c < CHIPS; c++) m[c] = ($urandom % 8 == 0) ? 4'd15 : 4'($urandom % 5);
        need[0] = m; need[1] = '0;
        #1;
        begin
          logic exp_fit;
          exp_fit = 1;
          for (int c = 0; c < CHIPS; c++)
            if (((m[c] == 15) ? 8 : int'(m[c])) > model[c]) exp_fit = 0;
          chk($sformatf("random fit t=%0d", t), fits2[0] == exp_fit);
          b = $urandom % BANKS;
          rel2 = '0;
          for (int k = 0; k < BANKS; k++)
            if (busy[k] && $urandom % 3 == 0) begin
              rel2[k] = 1; rmods[k] = inflight[k]; busy[k] = 0;
              for (int c = 0; c < CHIPS; c++) model[c] += (inflight[k][c] == 15) ? 8 : int'(inflight[k][c]);
            end
          cons2 = 0;
          if (exp_fit && !busy[b] && !rel2[b]) begin
            cons2 = 1; cmods = m; busy[b] = 1; inflight[b] = m;
            for (int c = 0; c < CHIPS; c++) model[c] -= (m[c] == 15) ? 8 : int'(m[c]);
          end
        end
        @(negedge clk);
        cons2 = 0; rel2 = '0;
        for (int c = 0; c < CHIPS; c++)
          chk($sformatf("random pool t=%0d c=%0d", t, c), int'(pool2[c]) == model[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
