// Network interface of a memory controller (MC) in the reply network.
//
// The MC hands over reply packets flit by flit (mc_valid / mc_ready, every
// flit carrying the destination node).  For each packet the interface picks
// a network when the head flit arrives and keeps it until the tail:
//   * wired   if the X-Y hop count to the destination is below hop_th, or
//             the destination lies in the MC's own cluster, or the
//             wireless router's injection queue holds more than l_th flits
//             (admission control policy 1);
//   * wireless otherwise, addressed to the destination's cluster.
// Packets leaving the wireless network here (at their destination cluster,
// or early under the W_th rule of the wireless router) are buffered per
// wireless VC and re-injected into the wired network; a packet never goes
// from the wired network to the wireless one, which keeps the two networks
// free of a common deadlock.  MC packets use wired VC 0, re-injected
// packets wired VC 1, so the two streams can interleave flit by flit on the
// single local port; which stream gets the port alternates each cycle when
// both are ready.  The interface computes the lookahead route of every head
// flit for the first router it enters.  The wireless injection queue length
// is read from the credit count (BUF_DEPTH minus credits held for VC 0).
// All decisions are combinational: a flit passes in the cycle it is offered.
//
// The three rules follow the design; the VC split, the own-cluster rule,
// the per-cycle alternation and the queue-length measure are this
// implementation's choices.  Thresholds are inputs so they can be tuned at
// run time.
module mc_ni
  import hnoc_pkg::*;
#(
  parameter int unsigned MC_X = 0,
  parameter int unsigned MC_Y = 0,
  parameter int unsigned CL_W = 4,   // cluster width in routers
  parameter int unsigned CL_H = 2    // cluster height in routers
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  hop_th,
  input  logic [3:0]  l_th,
  // from the memory controller
  input  logic        mc_valid,
  input  flit_t       mc_flit,
  output logic        mc_ready,
  // to the local input of the wired router
  output logic        w_valid,
  output flit_t       w_flit,
  input  credit_t     w_credit,
  // to the local input of the wireless router
  output logic        wl_valid,
  output flit_t       wl_flit,
  input  credit_t     wl_credit,
  // from the local output of the wireless router
  input  logic        ej_valid,
  input  flit_t       ej_flit,
  output credit_t     ej_credit,
  // events
  output logic        ev_to_wireless,
  output logic        ev_near_wired,
  output logic        ev_lth_divert,
  output logic        ev_reinject
);
  localparam logic [COORD_W-1:0] MX  = COORD_W'(MC_X);
  localparam logic [COORD_W-1:0] MY  = COORD_W'(MC_Y);
  localparam logic [COORD_W-1:0] MCX = COORD_W'(MC_X / CL_W);
  localparam logic [COORD_W-1:0] MCY = COORD_W'(MC_Y / CL_H);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  logic [CW-1:0] w_cred  [NUM_VC];
  logic [CW-1:0] wl_cred [NUM_VC];

  // ------------------------------------------------ network decision
  typedef enum logic [1:0] {PATH_NONE, PATH_WIRED, PATH_WL} path_e;
  path_e path_q, path_now;
  logic [COORD_W-1:0] dcx, dcy;
  logic [COORD_W+1:0] hops;
  logic [CW-1:0]      wl_queue;
  logic               far, same_cl, congested;

  always_comb begin
    dcx       = COORD_W'(mc_flit.dst_x / CL_W);
    dcy       = COORD_W'(mc_flit.dst_y / CL_H);
    hops      = abs_diff(mc_flit.dst_x, MX) + abs_diff(mc_flit.dst_y, MY);
    wl_queue  = CW'(BUF_DEPTH) - wl_cred[0];
    far       = hops >= (COORD_W+2)'(hop_th);
    same_cl   = (dcx == MCX) && (dcy == MCY);
    congested = 5'(wl_queue) > 5'(l_th);
    if (path_q != PATH_NONE)              path_now = path_q;
    else if (far && !same_cl && !congested) path_now = PATH_WL;
    else                                  path_now = PATH_WIRED;
  end

  // ------------------------------------------------ re-injection buffers
  flit_t          rq_front [NUM_VC];
  logic           rq_empty [NUM_VC];
  logic           rq_pop   [NUM_VC];
  for (genvar v = 0; v < NUM_VC; v++) begin : g_rq
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_rq (
      .clk, .rst_n,
      .push (ej_valid && ej_flit.vc == VC_W'(v)), .din (ej_flit),
      .pop (rq_pop[v]), .front (rq_front[v]), .empty (rq_empty[v]),
      .full (), .count ()
    );
  end
  logic            rlock;      // a re-injected packet is in progress
  logic [VC_W-1:0] rvc_q, rvc;

  // ------------------------------------------------ local port sharing
  logic mc_w_rdy, rq_rdy, turn_rq, give_mc, give_rq;
  flit_t mc_out, rq_out;

  always_comb begin
    // re-injection stream: finish the current packet, else take any VC
    rvc = rvc_q;
    if (!rlock) begin
      rvc = '0;
      for (int v = NUM_VC - 1; v >= 0; v--) if (!rq_empty[v]) rvc = VC_W'(v);
    end
    rq_rdy   = !rq_empty[rvc] && (w_cred[1] != '0);
    mc_w_rdy = mc_valid && (path_now == PATH_WIRED) && (w_cred[0] != '0);
    give_mc  = mc_w_rdy && (!rq_rdy || !turn_rq);
    give_rq  = rq_rdy && !give_mc;

    mc_out        = mc_flit;
    mc_out.dst_cx = dcx;
    mc_out.dst_cy = dcy;
    rq_out        = rq_front[rvc];
    rq_out.vc     = VC_W'(1);
    rq_out.route  = route_xy(MX, MY, rq_out.dst_x, rq_out.dst_y);
    for (int v = 0; v < NUM_VC; v++) rq_pop[v] = give_rq && (rvc == VC_W'(v));

    w_valid  = give_mc || give_rq;
    w_flit   = mc_out;
    w_flit.vc    = '0;
    w_flit.route = route_xy(MX, MY, mc_flit.dst_x, mc_flit.dst_y);
    if (give_rq) w_flit = rq_out;

    wl_valid       = mc_valid && (path_now == PATH_WL) && (wl_cred[0] != '0);
    wl_flit        = mc_out;
    wl_flit.vc     = '0;
    wl_flit.route  = route_xy(MCX, MCY, dcx, dcy);

    mc_ready = give_mc || wl_valid;

    ej_credit.valid = give_rq;
    ej_credit.vc    = rvc;

    ev_to_wireless = wl_valid && (path_q == PATH_NONE) && is_head(mc_flit);
    ev_near_wired  = give_mc && (path_q == PATH_NONE) && is_head(mc_flit) && (!far || same_cl);
    ev_lth_divert  = give_mc && (path_q == PATH_NONE) && is_head(mc_flit) && far && !same_cl &&
                     congested;
    ev_reinject    = give_rq && is_head(rq_front[rvc]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      path_q  <= PATH_NONE;
      rlock   <= 1'b0;
      rvc_q   <= '0;
      turn_rq <= 1'b0;
      for (int v = 0; v < NUM_VC; v++) begin
        w_cred[v]  <= CW'(BUF_DEPTH);
        wl_cred[v] <= CW'(BUF_DEPTH);
      end
    end else begin
      if (mc_valid && mc_ready)
        path_q <= is_tail(mc_flit) ? PATH_NONE : path_now;
      if (give_rq) begin
        rlock <= !is_tail(rq_front[rvc]);
        rvc_q <= rvc;
      end
      if (mc_w_rdy && rq_rdy) turn_rq <= !turn_rq;
      for (int v = 0; v < NUM_VC; v++) begin
        w_cred[v]  <= w_cred[v]
                    + ((w_credit.valid && w_credit.vc == VC_W'(v)) ? CW'(1) : CW'(0))
                    - ((w_valid && w_flit.vc == VC_W'(v)) ? CW'(1) : CW'(0));
        wl_cred[v] <= wl_cred[v]
                    + ((wl_credit.valid && wl_credit.vc == VC_W'(v)) ? CW'(1) : CW'(0))
                    - ((wl_valid && wl_flit.vc == VC_W'(v)) ? CW'(1) : CW'(0));
      end
    end
  end
endmodule
