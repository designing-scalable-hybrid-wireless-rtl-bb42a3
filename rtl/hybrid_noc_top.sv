// Hybrid wired/wireless network-on-chip for a GPU.
//
// GPU traffic is many-to-few (requests from shader cores to memory
// controllers) and few-to-many (replies, most of the bytes).  The design
// keeps a plain wired mesh for requests and builds the reply network from
// two layers: a wired MESH_X x MESH_Y mesh and, on top of it, a WX x WY mesh
// of wireless routers, one per memory controller (MC).  The wired mesh is cut
// into WX x WY clusters of CL_W x CL_H routers with one MC each.  An MC's
// network interface (mc_ni) sends a reply over the wireless layer to the
// destination's cluster when the destination is far and the wireless
// injection queue is short; the packet then finishes its trip on the wired
// mesh from that cluster's MC node.  Packets only ever move from the
// wireless to the wired layer.
//
// MC placement: MC_PLACE = 0 puts each MC at the chip edge (outer column of
// its cluster), MC_PLACE = 1 (default) towards the chip centre (inner column,
// inner row).  Both placements come from the design; their exact positions
// within a cluster are this implementation's choice.
//
// Interface (all ports are plain arrays of hnoc_pkg structs):
//   mc_*        reply flits from the MCs (valid/ready), MC k in cluster
//               (k % WX, k / WX)
//   rep_ej_*    reply flits leaving the wired mesh at every node (shader
//               cores); the sink returns one credit per flit taken
//   req_*       local ports of the request mesh at every node: shader cores
//               inject (credit controlled), MCs eject
//   hop_th, l_th, w_th   admission-control thresholds, adjustable at run time
//   ev_*        one-cycle event pulses for monitoring
module hybrid_noc_top
  import hnoc_pkg::*;
#(
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned WX        = 2,
  parameter int unsigned WY        = 4,
  parameter int unsigned MC_PLACE  = 1,
  parameter int unsigned LINK_LAT  = 9,
  parameter int unsigned EPOCH     = 50000,
  parameter int unsigned NUM_PAIRS = 3,
  parameter int unsigned N         = MESH_X * MESH_Y,
  parameter int unsigned NMC       = WX * WY,
  parameter int unsigned NL        = 4 * NMC
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  hop_th,
  input  logic [3:0]  l_th,
  input  logic [15:0] w_th,
  // reply network
  input  logic        mc_valid      [NMC],
  input  flit_t       mc_flit       [NMC],
  output logic        mc_ready      [NMC],
  output logic        rep_ej_valid  [N],
  output flit_t       rep_ej_flit   [N],
  input  credit_t     rep_ej_credit [N],
  // request network
  input  logic        req_inj_valid [N],
  input  flit_t       req_inj_flit  [N],
  output credit_t     req_inj_credit[N],
  output logic        req_ej_valid  [N],
  output flit_t       req_ej_flit   [N],
  input  credit_t     req_ej_credit [N],
  // events
  output logic [NMC-1:0] ev_to_wireless,
  output logic [NMC-1:0] ev_near_wired,
  output logic [NMC-1:0] ev_lth_divert,
  output logic [NMC-1:0] ev_reinject,
  output logic [NMC-1:0] ev_timeout,
  output logic [NL-1:0]  ev_borrow_tx,
  output logic [NL-1:0]  ev_token_pass,
  output logic           ev_realloc
);
  localparam int unsigned CL_W = MESH_X / WX;
  localparam int unsigned CL_H = MESH_Y / WY;

  function automatic int unsigned mc_x(input int unsigned k);
    int unsigned cx;
    cx = k % WX;
    if (MC_PLACE == 0) return (cx < WX / 2) ? cx * CL_W : cx * CL_W + CL_W - 1;
    else               return (cx < WX / 2) ? cx * CL_W + CL_W - 1 : cx * CL_W;
  endfunction
  function automatic int unsigned mc_y(input int unsigned k);
    int unsigned cy;
    cy = k / WX;
    if (MC_PLACE == 0) return cy * CL_H;
    else               return cy * CL_H + ((cy < WY / 2) ? CL_H - 1 : 0);
  endfunction
  // index of the MC at node n, or NMC when there is none
  function automatic int unsigned mc_at(input int unsigned n);
    for (int unsigned k = 0; k < NMC; k++)
      if (mc_y(k) * MESH_X + mc_x(k) == n) return k;
    return NMC;
  endfunction

  // ------------------------------------------------------ request network
  wired_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_req_mesh (
    .clk, .rst_n,
    .inj_valid (req_inj_valid), .inj_flit (req_inj_flit), .inj_credit (req_inj_credit),
    .ej_valid  (req_ej_valid),  .ej_flit  (req_ej_flit),  .ej_credit  (req_ej_credit)
  );

  // -------------------------------------------------------- reply network
  logic    rw_inj_valid  [N];
  flit_t   rw_inj_flit   [N];
  credit_t rw_inj_credit [N];

  logic    wl_inj_valid  [NMC];
  flit_t   wl_inj_flit   [NMC];
  credit_t wl_inj_credit [NMC];
  logic    wl_ej_valid   [NMC];
  flit_t   wl_ej_flit    [NMC];
  credit_t wl_ej_credit  [NMC];
  logic    ni_w_valid    [NMC];
  flit_t   ni_w_flit     [NMC];

  wired_mesh #(.MESH_X(MESH_X), .MESH_Y(MESH_Y)) u_rep_mesh (
    .clk, .rst_n,
    .inj_valid (rw_inj_valid), .inj_flit (rw_inj_flit), .inj_credit (rw_inj_credit),
    .ej_valid  (rep_ej_valid), .ej_flit  (rep_ej_flit), .ej_credit  (rep_ej_credit)
  );

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int unsigned K = mc_at(n);
    if (K < NMC) begin : g_mc
      assign rw_inj_valid[n] = ni_w_valid[K];
      assign rw_inj_flit[n]  = ni_w_flit[K];
    end else begin : g_core
      // shader cores inject nothing into the reply network
      assign rw_inj_valid[n] = 1'b0;
      assign rw_inj_flit[n]  = '0;
    end
  end

  wl_network #(.WX(WX), .WY(WY), .LINK_LAT(LINK_LAT), .EPOCH(EPOCH),
               .NUM_PAIRS(NUM_PAIRS)) u_wl (
    .clk, .rst_n, .wait_th (w_th),
    .inj_valid (wl_inj_valid), .inj_flit (wl_inj_flit), .inj_credit (wl_inj_credit),
    .ej_valid  (wl_ej_valid),  .ej_flit  (wl_ej_flit),  .ej_credit  (wl_ej_credit),
    .ev_timeout, .ev_borrow_tx, .ev_token_pass, .ev_realloc
  );

  for (genvar k = 0; k < NMC; k++) begin : g_ni
    localparam int unsigned KX = mc_x(k);
    localparam int unsigned KY = mc_y(k);
    mc_ni #(.MC_X(KX), .MC_Y(KY), .CL_W(CL_W), .CL_H(CL_H)) u_ni (
      .clk, .rst_n, .hop_th, .l_th,
      .mc_valid (mc_valid[k]), .mc_flit (mc_flit[k]), .mc_ready (mc_ready[k]),
      .w_valid  (ni_w_valid[k]), .w_flit (ni_w_flit[k]),
      .w_credit (rw_inj_credit[KY * MESH_X + KX]),
      .wl_valid (wl_inj_valid[k]), .wl_flit (wl_inj_flit[k]), .wl_credit (wl_inj_credit[k]),
      .ej_valid (wl_ej_valid[k]),  .ej_flit (wl_ej_flit[k]),  .ej_credit (wl_ej_credit[k]),
      .ev_to_wireless (ev_to_wireless[k]), .ev_near_wired (ev_near_wired[k]),
      .ev_lth_divert  (ev_lth_divert[k]),  .ev_reinject   (ev_reinject[k])
    );
  end
endmodule
