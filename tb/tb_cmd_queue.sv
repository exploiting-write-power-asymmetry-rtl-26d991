// tb_cmd_queue: random appends and removals at random slots against a queue
// model; checks that slots stay in age order with the right contents, that
// the queue refuses a push when holding DEPTH commands, and that a push and a
// removal in one cycle both take effect.
module tb_cmd_queue;
  import wpas_pkg::*;
  localparam int D = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic push_valid, push_ready, pop_valid;
  cmd_t push_cmd;
  logic [$clog2(D)-1:0] pop_idx;
  logic [D-1:0] valid;
  cmd_t [D-1:0] entries;
  cmd_t model [$];
  int fulls = 0, both = 0;

  cmd_queue #(.DEPTH(D)) dut (.clk, .rst_n, .push_valid, .push_ready, .push_cmd,
    .pop_valid, .pop_idx, .valid, .entries);

  task automatic chk(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    push_valid = 0; pop_valid = 0; pop_idx = '0; push_cmd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk("ready", push_ready == (model.size() < D));
      for (int i = 0; i < D; i++) begin
        chk("valid", valid[i] == (i < model.size()));
        if (i < model.size()) chk($sformatf("entry %0d t=%0d", i, t), entries[i] == model[i]);
      end
      if (model.size() == D) fulls++;
      push_valid = ($urandom % 100) < ((t % 600 < 300) ? 80 : 30);
      pop_valid = model.size() > 0 && ($urandom % 100) < ((t % 600 < 300) ? 30 : 80);
      pop_idx = (model.size() > 0) ? 5'($urandom % model.size()) : '0;
      push_cmd.kind = txn_kind_e'($urandom % 2);
      push_cmd.ma = maddr_t'($urandom);
      push_cmd.addr = laddr_t'($urandom);
      push_cmd.data = {16{$urandom}};
      push_cmd.mods = modvec_t'({$urandom});
      @(posedge clk);
      if (pop_valid && push_valid && push_ready) both++;
      if (pop_valid) model.delete(int'(pop_idx));
      if (push_valid && (model.size() < D || pop_valid) && push_ready) model.push_back(push_cmd);
    end
    chk("reached full", fulls > 0);
    chk("push with pop", both > 0);
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
