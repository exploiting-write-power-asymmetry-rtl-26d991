// tb_txn_queue: random pushes and pops against a SystemVerilog queue model;
// checks order, data, count, full at DEPTH and empty.
module tb_txn_queue;
  import wpas_pkg::*;
  localparam int D = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  txn_t in_txn, out_txn;
  logic [$clog2(D+1)-1:0] count;
  txn_t model [$];
  int fulls = 0;

  txn_queue #(.DEPTH(D)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_txn,
    .out_valid, .out_ready, .out_txn, .count);

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_txn = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk("count", int'(count) == model.size());
      chk("ready", in_ready == (model.size() < D));
      chk("valid", out_valid == (model.size() > 0));
      if (model.size() > 0) chk("head", out_txn == model[0]);
      if (model.size() == D) fulls++;
      // phases: fill-biased, then drain-biased
      in_valid = ($urandom % 100) < ((t % 600 < 300) ? 80 : 30);
      out_ready = ($urandom % 100) < ((t % 600 < 300) ? 30 : 80);
      in_txn.kind = txn_kind_e'($urandom % 2);
      in_txn.addr = laddr_t'($urandom);
      in_txn.data = {16{$urandom}};
      in_txn.mods = modvec_t'({$urandom});
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_txn);
    end
    chk("reached full", fulls > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
