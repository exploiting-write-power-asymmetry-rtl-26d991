// txn_queue: the memory controller's transaction queue, a synchronous FIFO of
// DEPTH (32) transactions arriving from the LLC. Valid/ready handshake on both
// sides; a push and a pop may happen in the same cycle. The depth is the
// document's; the handshake and the storage as a circular buffer are this
// design's choices. Output data is the head entry, valid while not empty.
module txn_queue
  import wpas_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  txn_t in_txn,
  output logic out_valid,
  input  logic out_ready,
  output txn_t out_txn,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  txn_t mem [DEPTH];
  logic [AW-1:0] wp, rp;

  wire push = in_valid && in_ready;
  wire pop  = out_valid && out_ready;

  assign in_ready  = (32'(count) < DEPTH);
  assign out_valid = (count != '0);
  assign out_txn   = mem[rp];

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) if (push) mem[wp] <= in_txn;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
