// Flit FIFO of DEPTH entries, used as a virtual-channel input buffer.
//
// Push and pop may happen in the same cycle.  `front` shows the oldest
// flit whenever `empty` is low.  Overflow and underflow are the caller's
// responsibility under credit flow control and are flagged by assertions.
module flit_fifo
  import hnoc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t front,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  flit_t          mem [DEPTH];
  logic [AW-1:0]  rd, wr;

  assign empty = (count == 0);
  assign full  = (count == DEPTH);
  assign front = mem[rd];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0; wr <= '0; count <= '0;
    end else begin
      if (push) wr <= inc(wr);
      if (pop)  rd <= inc(rd);
      count <= count + (push ? 1'b1 : 1'b0) - (pop ? 1'b1 : 1'b0);
    end
  end

  always_ff @(posedge clk) if (push) mem[wr] <= din;

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop))
    else $error("flit_fifo overflow");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("flit_fifo underflow");
endmodule
