// Five-port virtual-channel router with lookahead X-Y routing.
//
// Used as the wired mesh router (WIRELESS = 0) and as the switching core of
// the wireless router (WIRELESS = 1).  Every input port has NUM_VC buffers of
// BUF_DEPTH flits.  Flow control is credit based: the router keeps one
// credit counter per downstream VC and returns a credit upstream for every
// flit that leaves one of its buffers.
//
// Pipeline (two stages, as the design's routers have):
//   1. buffer write: the arriving flit is written into its VC buffer; its
//      route at this router was already computed upstream (lookahead).
//   2. VC and switch allocation plus switch traversal, in one cycle: each
//      input port picks one ready VC round-robin, each output port picks one
//      input port round-robin; a head flit that wins takes the lowest free
//      output VC that has a credit.  The winner leaves the router in that
//      cycle and the route it must take at the next router is written into
//      it on the way out.
// A wired hop (buffer, allocation, 1-cycle link register) therefore costs
// two cycles.  The allocator organisation is this implementation's choice.
//
// In wireless mode the router routes on the destination cluster instead of
// the destination node and implements the W_th rule: a head flit that has
// waited at the front of its buffer for `wait_th` cycles without winning an
// output VC is sent to the local (ejection) port instead, from where the
// network interface moves it to the wired network.  wait_th = 0 disables it.
//
// out_ready[p] lets a slow output (a wireless channel) refuse a flit; a
// wired output ties it high.  The router's position comes in on my_x/my_y
// (constants in a mesh) rather than as parameters, so that all routers of a
// mesh are one and the same module.  out_want[p] reports that some buffered flit
// could use port p if it were ready; it does not depend on out_ready.
module vc_router
  import hnoc_pkg::*;
#(
  parameter bit          WIRELESS = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [COORD_W-1:0] my_x,      // this router's position
  input  logic [COORD_W-1:0] my_y,
  input  logic [15:0] wait_th,
  input  logic        in_valid   [NPORT],
  input  flit_t       in_flit    [NPORT],
  output credit_t     in_credit  [NPORT],
  output logic        out_valid  [NPORT],
  output flit_t       out_flit   [NPORT],
  input  logic        out_ready  [NPORT],
  input  credit_t     out_credit [NPORT],
  output logic        out_want   [NPORT],
  output logic        ev_timeout
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  // ---------------------------------------------------------------- state
  flit_t             front   [NPORT][NUM_VC];
  logic              empty   [NPORT][NUM_VC];
  logic              pop     [NPORT][NUM_VC];
  logic              push    [NPORT][NUM_VC];

  logic              alloc   [NPORT][NUM_VC];   // input VC owns an output VC
  port_e             ivc_port[NPORT][NUM_VC];
  logic [VC_W-1:0]   ivc_ovc [NPORT][NUM_VC];
  logic [15:0]       wait_cnt[NPORT][NUM_VC];

  logic              busy    [NPORT][NUM_VC];   // output VC allocated
  logic [CW-1:0]     cred    [NPORT][NUM_VC];

  // ---------------------------------------------------------------- buffers
  for (genvar p = 0; p < NPORT; p++) begin : g_in
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      assign push[p][v] = in_valid[p] && (in_flit[p].vc == VC_W'(v));
      flit_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n,
        .push (push[p][v]), .din (in_flit[p]),
        .pop  (pop[p][v]),  .front (front[p][v]),
        .empty(empty[p][v]), .full (), .count ()
      );
    end
  end

  // ------------------------------------------------- route and requests
  port_e           req_port [NPORT][NUM_VC];
  logic [VC_W-1:0] free_ovc [NPORT][NUM_VC];
  logic            timed    [NPORT][NUM_VC];
  logic            want_iv  [NPORT][NUM_VC];
  logic [NUM_VC-1:0] req_a  [NPORT];

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      for (int v = 0; v < NUM_VC; v++) begin
        logic found;
        timed[p][v] = WIRELESS && (wait_th != 16'd0) && (wait_cnt[p][v] >= wait_th);
        if (alloc[p][v])      req_port[p][v] = ivc_port[p][v];
        else if (timed[p][v]) req_port[p][v] = P_LOCAL;
        else                  req_port[p][v] = front[p][v].route;
        found = 1'b0;
        free_ovc[p][v] = '0;
        for (int o = 0; o < NUM_VC; o++) begin
          if (!found && !busy[req_port[p][v]][o] && (cred[req_port[p][v]][o] != '0)) begin
            found = 1'b1;
            free_ovc[p][v] = VC_W'(o);
          end
        end
        if (empty[p][v])      want_iv[p][v] = 1'b0;
        else if (alloc[p][v]) want_iv[p][v] = (cred[ivc_port[p][v]][ivc_ovc[p][v]] != '0);
        else                  want_iv[p][v] = found && is_head(front[p][v]);
        req_a[p][v] = want_iv[p][v] && out_ready[req_port[p][v]];
      end
    end
    for (int o = 0; o < NPORT; o++) begin
      out_want[o] = 1'b0;
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NUM_VC; v++)
          if (want_iv[p][v] && (req_port[p][v] == port_e'(o))) out_want[o] = 1'b1;
    end
  end

  // ------------------------------------------------------ allocation
  logic [NUM_VC-1:0] gnt_a  [NPORT];   // per input: chosen VC
  logic [NPORT-1:0]  req_b  [NPORT];   // per output: requesting inputs
  logic [NPORT-1:0]  gnt_b  [NPORT];
  logic              in_win [NPORT];
  logic [VC_W-1:0]   sel_vc [NPORT];
  port_e             sel_port[NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_arb_a
    rr_arb #(.N(NUM_VC)) u_arb_a (
      .clk, .rst_n, .req (req_a[p]), .advance (in_win[p]), .gnt (gnt_a[p]));
  end
  for (genvar o = 0; o < NPORT; o++) begin : g_arb_b
    rr_arb #(.N(NPORT)) u_arb_b (
      .clk, .rst_n, .req (req_b[o]), .advance (1'b1), .gnt (gnt_b[o]));
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      sel_vc[p]   = '0;
      for (int v = 0; v < NUM_VC; v++) if (gnt_a[p][v]) sel_vc[p] = VC_W'(v);
      sel_port[p] = req_port[p][sel_vc[p]];
    end
    for (int o = 0; o < NPORT; o++)
      for (int p = 0; p < NPORT; p++)
        req_b[o][p] = (|gnt_a[p]) && (sel_port[p] == port_e'(o));
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      in_win[p] = 1'b0;
      for (int o = 0; o < NPORT; o++) if (gnt_b[o][p]) in_win[p] = 1'b1;
      for (int v = 0; v < NUM_VC; v++)
        pop[p][v] = in_win[p] && (sel_vc[p] == VC_W'(v));
      in_credit[p].valid = in_win[p];
      in_credit[p].vc    = sel_vc[p];
    end
  end

  // ------------------------------------------- switch traversal, lookahead
  logic [VC_W-1:0] win_ovc [NPORT];
  always_comb begin
    ev_timeout = 1'b0;
    for (int o = 0; o < NPORT; o++) begin
      int unsigned ip;
      flit_t f;
      logic [COORD_W-1:0] nx, ny;
      ip = 0;
      for (int p = 0; p < NPORT; p++) if (gnt_b[o][p]) ip = p;
      f = front[ip][sel_vc[ip]];
      win_ovc[o] = alloc[ip][sel_vc[ip]] ? ivc_ovc[ip][sel_vc[ip]] : free_ovc[ip][sel_vc[ip]];
      f.vc = win_ovc[o];
      {nx, ny} = neighbour(my_x, my_y, port_e'(o));
      if (o != P_LOCAL) begin
        if (WIRELESS) f.route = route_xy(nx, ny, f.dst_cx, f.dst_cy);
        else          f.route = route_xy(nx, ny, f.dst_x,  f.dst_y);
      end
      out_valid[o] = |gnt_b[o];
      out_flit[o]  = f;
      if (out_valid[o] && !alloc[ip][sel_vc[ip]] && timed[ip][sel_vc[ip]] &&
          (front[ip][sel_vc[ip]].route != P_LOCAL))
        ev_timeout = 1'b1;
    end
  end

  // ---------------------------------------------------------- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NUM_VC; v++) begin
          alloc[p][v]    <= 1'b0;
          ivc_port[p][v] <= P_LOCAL;
          ivc_ovc[p][v]  <= '0;
          wait_cnt[p][v] <= '0;
          busy[p][v]     <= 1'b0;
          cred[p][v]     <= CW'(BUF_DEPTH);
        end
    end else begin
      // credits: returned by downstream, spent by flits sent
      for (int o = 0; o < NPORT; o++)
        for (int v = 0; v < NUM_VC; v++)
          cred[o][v] <= cred[o][v]
                      + ((out_credit[o].valid && out_credit[o].vc == VC_W'(v)) ? 1'b1 : 1'b0)
                      - ((out_valid[o] && win_ovc[o] == VC_W'(v)) ? 1'b1 : 1'b0);
      for (int p = 0; p < NPORT; p++)
        for (int v = 0; v < NUM_VC; v++) begin
          if (pop[p][v]) begin
            if (is_tail(front[p][v])) begin
              alloc[p][v] <= 1'b0;
              busy[req_port[p][v]][alloc[p][v] ? ivc_ovc[p][v] : free_ovc[p][v]] <= 1'b0;
            end else if (!alloc[p][v]) begin
              alloc[p][v]    <= 1'b1;
              ivc_port[p][v] <= req_port[p][v];
              ivc_ovc[p][v]  <= free_ovc[p][v];
              busy[req_port[p][v]][free_ovc[p][v]] <= 1'b1;
            end
          end
          if (WIRELESS && !empty[p][v] && !alloc[p][v] && !pop[p][v] && is_head(front[p][v]))
            wait_cnt[p][v] <= (wait_cnt[p][v] == 16'hFFFF) ? wait_cnt[p][v] : wait_cnt[p][v] + 1'b1;
          else
            wait_cnt[p][v] <= '0;
        end
    end
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     out_valid[o] |-> cred[o][win_ovc[o]] != '0)
      else $error("vc_router: flit sent without credit");
  end
endmodule
