// Wireless router of the overlay network: one per memory controller.
//
// The switching core is a vc_router in wireless mode: it routes X-Y over the
// mesh of clusters using the destination cluster of each packet, and ejects
// to its local port (the memory controller's network interface) either at
// the destination cluster or, under the W_th rule, when a head flit has been
// blocked for wait_th cycles.  Its four mesh outputs drive wireless links.
//
// Each outgoing link owns a private channel and may hold a borrowed one
// (see token_mac and bw_allocator).  An output accepts a flit when either is
// free (priv_free / brw_free, which already include token possession); the
// private channel is used first.  Because a link starts at most one flit per
// cycle and both channels have the same latency, the flits of a packet
// arrive in order even when they are spread over both channels.  use_pulse
// marks every flit a link sends, for the usage counters.  The steering rule
// (private first) is this implementation's choice.
module wl_router
  import hnoc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [COORD_W-1:0] my_x,   // cluster coordinates of this router
  input  logic [COORD_W-1:0] my_y,
  input  logic [15:0] wait_th,
  // injection from / ejection to the network interface (port 0 = local)
  // and reception from the four incoming wireless links
  input  logic        in_valid   [NPORT],
  input  flit_t       in_flit    [NPORT],
  output credit_t     in_credit  [NPORT],
  // ejection (index 0) and transmission onto the outgoing links (1..4)
  output logic        priv_start [NPORT],
  output logic        brw_start  [NPORT],
  output flit_t       tx_flit    [NPORT],
  input  logic        priv_free  [NPORT],
  input  logic        brw_free   [NPORT],
  input  credit_t     out_credit [NPORT],
  output logic        want       [NPORT],
  output logic        use_pulse  [NPORT],
  output logic        ev_timeout
);
  logic  out_valid [NPORT];
  logic  out_ready [NPORT];

  vc_router #(.WIRELESS(1'b1)) u_core (
    .clk, .rst_n, .my_x, .my_y, .wait_th,
    .in_valid, .in_flit, .in_credit,
    .out_valid, .out_flit (tx_flit), .out_ready, .out_credit,
    .out_want (want), .ev_timeout
  );

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      if (p == 0) begin
        // ejection to the network interface: credit controlled only
        out_ready[p]  = 1'b1;
        priv_start[p] = out_valid[p];
        brw_start[p]  = 1'b0;
        use_pulse[p]  = 1'b0;
      end else begin
        out_ready[p]  = priv_free[p] || brw_free[p];
        priv_start[p] = out_valid[p] && priv_free[p];
        brw_start[p]  = out_valid[p] && !priv_free[p];
        use_pulse[p]  = out_valid[p];
      end
    end
  end
endmodule
