// Round-robin arbiter.
//
// Grants one of N requests, one-hot, combinationally.  The request just
// after the last granted one has the highest priority; the pointer moves
// only when `advance` is high (the grant was used).  Reset gives
// requester 0 the highest priority.
module rr_arb #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  logic [N-1:0] prio;   // one-hot: highest-priority requester

  always_comb begin
    int unsigned idx;
    idx = 0;
    gnt = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (prio[i]) begin
        for (int unsigned k = 0; k < N; k++) begin
          idx = (i + k) % N;
          if (req[idx] && (gnt == '0)) gnt[idx] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  prio <= N'(1);
    else if (advance && |gnt)    prio <= (N > 1) ? {gnt[N-2:0], gnt[N-1]} : gnt;
  end
endmodule
