// tb_mod_calculator: checks the per-chip modification calculator.
// 1) The four-chip example with 4-bit banks: writes X (to bank A) and Y (to
//    bank B) give per-chip counts 3,1,2,3 and 3,2,3,2 with a power ratio of 2,
//    and 2,1,1,3 and 3,2,2,1 when every modified bit is charged as a zero
//    (ratio 1). Each chip's nibble sits in its byte lane of the first beat.
// 2) Random lines and counters, at power ratios 1, 2, 3 and 5, against a bit-by-bit reference that maps bit k
//    of the line to chip (k mod 64) / 8, including saturation at 15.
module tb_mod_calculator;
  import wpas_pkg::*;

  int checks = 0, failures = 0;

  line_t   old_d, new_d;
  modvec_t cin, cout2, cout1;

  mod_calculator #(.POWER_RATIO(2)) dut2 (.old_data(old_d), .new_data(new_d), .cnt_in(cin), .cnt_out(cout2));
  modvec_t cout3, cout5;
  mod_calculator #(.POWER_RATIO(3)) dut3 (.old_data(old_d), .new_data(new_d), .cnt_in(cin), .cnt_out(cout3));
  mod_calculator #(.POWER_RATIO(5)) dut5 (.old_data(old_d), .new_data(new_d), .cnt_in(cin), .cnt_out(cout5));
  mod_calculator #(.POWER_RATIO(1)) dut1 (.old_data(old_d), .new_data(new_d), .cnt_in(cin), .cnt_out(cout1));

  function automatic line_t put4(logic [3:0] n0, logic [3:0] n1, logic [3:0] n2, logic [3:0] n3);
    line_t l = '0;
    l[0*8 +: 4] = n0; l[1*8 +: 4] = n1; l[2*8 +: 4] = n2; l[3*8 +: 4] = n3;
    return l;
  endfunction

  function automatic modvec_t ref_cnt(line_t o, line_t n, modvec_t ci, int ratio);
    int acc [CHIPS];
    modvec_t r;
    for (int c = 0; c < CHIPS; c++) acc[c] = int'(ci[c]);
    for (int k = 0; k < LINE_BITS; k++)
      if (o[k] != n[k]) acc[(k % 64) / 8] += n[k] ? 1 : ratio;
    for (int c = 0; c < CHIPS; c++) r[c] = (acc[c] > 15) ? 4'd15 : 4'(acc[c]);
    return r;
  endfunction

  task automatic expect4(string what, modvec_t got, int e0, int e1, int e2, int e3);
    checks++;
    if (got[0] != 4'(e0) || got[1] != 4'(e1) || got[2] != 4'(e2) || got[3] != 4'(e3) ||
        got[7:4] != '0) begin
      failures++;
      $display("FAIL %s: got %0d %0d %0d %0d", what, got[0], got[1], got[2], got[3]);
    end
  endtask

  initial begin
    cin = '0;
    // write X to bank A
    old_d = put4(4'b1001, 4'b0011, 4'b1010, 4'b1000);
    new_d = put4(4'b1010, 4'b1011, 4'b1000, 4'b1111);
    #1;
    expect4("X ratio2", cout2, 3, 1, 2, 3);
    expect4("X ratio1", cout1, 2, 1, 1, 3);
    // write Y to bank B
    old_d = put4(4'b1000, 4'b0000, 4'b0001, 4'b1000);
    new_d = put4(4'b1111, 4'b1001, 4'b1000, 4'b0000);
    #1;
    expect4("Y ratio2", cout2, 3, 2, 3, 2);
    expect4("Y ratio1", cout1, 3, 2, 2, 1);

    // random, sparse and dense modifications, random starting counters
    for (int t = 0; t < 400; t++) begin
      line_t flip;
      for (int w = 0; w < LINE_BITS / 32; w++) begin
        old_d[w*32 +: 32] = $urandom;
        flip[w*32 +: 32]  = (t % 2 == 0) ? ($urandom & $urandom & $urandom & $urandom & $urandom) : $urandom;
      end
      new_d = old_d ^ flip;
      for (int c = 0; c < CHIPS; c++) cin[c] = (t % 3 == 0) ? 4'($urandom % 16) : 4'($urandom % 4);
      #1;
      checks++;
      if (cout2 !== ref_cnt(old_d, new_d, cin, 2)) begin
        failures++;
        $display("FAIL random ratio2 t=%0d", t);
      end
      checks += 2;
      if (cout3 !== ref_cnt(old_d, new_d, cin, 3)) begin
        failures++;
        $display("FAIL random ratio3 t=%0d", t);
      end
      if (cout5 !== ref_cnt(old_d, new_d, cin, 5)) begin
        failures++;
        $display("FAIL random ratio5 t=%0d", t);
      end
      checks++;
      if (cout1 !== ref_cnt(old_d, new_d, cin, 1)) begin
        failures++;
        $display("FAIL random ratio1 t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
