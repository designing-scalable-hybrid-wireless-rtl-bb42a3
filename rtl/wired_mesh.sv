// Wired MESH_X x MESH_Y mesh of vc_router instances joined by 1-cycle links.
//
// Node n sits at x = n % MESH_X, y = n / MESH_X.  Each node's local port is
// brought out: inj_* feeds the router's local input (the injector must honour
// the credits on inj_credit, BUF_DEPTH per VC, and set the head flit's
// lookahead route for this first router), ej_* is the router's local output
// (the sink returns one ej_credit per flit it consumes).  Ports at the mesh
// edge are tied off; X-Y routing never selects them.  The 8x8 size, the
// 1-cycle link and X-Y routing follow the design; one instance of this
// module is the request network and one the wired part of the reply network.
module wired_mesh
  import hnoc_pkg::*;
#(
  parameter int unsigned MESH_X = 8,
  parameter int unsigned MESH_Y = 8,
  parameter int unsigned N      = MESH_X * MESH_Y
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    inj_valid  [N],
  input  flit_t   inj_flit   [N],
  output credit_t inj_credit [N],
  output logic    ej_valid   [N],
  output flit_t   ej_flit    [N],
  input  credit_t ej_credit  [N]
);
  logic    r_in_valid  [N][NPORT];
  flit_t   r_in_flit   [N][NPORT];
  credit_t r_in_credit [N][NPORT];
  logic    r_out_valid [N][NPORT];
  flit_t   r_out_flit  [N][NPORT];
  credit_t r_out_credit[N][NPORT];
  logic    r_out_ready [N][NPORT];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int unsigned NX = n % MESH_X;
    localparam int unsigned NY = n / MESH_X;

    vc_router #(.WIRELESS(1'b0)) u_router (
      .clk, .rst_n, .wait_th (16'd0),
      .my_x (COORD_W'(NX)), .my_y (COORD_W'(NY)),
      .in_valid   (r_in_valid[n]),  .in_flit  (r_in_flit[n]),  .in_credit (r_in_credit[n]),
      .out_valid  (r_out_valid[n]), .out_flit (r_out_flit[n]), .out_ready (r_out_ready[n]),
      .out_credit (r_out_credit[n]), .out_want (), .ev_timeout ()
    );

    assign r_in_valid[n][P_LOCAL]   = inj_valid[n];
    assign r_in_flit[n][P_LOCAL]    = inj_flit[n];
    assign inj_credit[n]            = r_in_credit[n][P_LOCAL];
    assign ej_valid[n]              = r_out_valid[n][P_LOCAL];
    assign ej_flit[n]               = r_out_flit[n][P_LOCAL];
    assign r_out_credit[n][P_LOCAL] = ej_credit[n];
    for (genvar p = 0; p < NPORT; p++) begin : g_rdy
      assign r_out_ready[n][p] = 1'b1;
    end

    // the link leaving through port p lands on the neighbour's opposite port
    for (genvar p = 1; p < NPORT; p++) begin : g_port
      localparam int OPP = (p == P_NORTH) ? P_SOUTH : (p == P_SOUTH) ? P_NORTH :
                           (p == P_EAST)  ? P_WEST  : P_EAST;
      localparam bit HAS = (p == P_NORTH) ? (NY > 0) : (p == P_SOUTH) ? (NY < MESH_Y - 1) :
                           (p == P_EAST)  ? (NX < MESH_X - 1) : (NX > 0);
      localparam int unsigned NB = (p == P_NORTH) ? n - MESH_X : (p == P_SOUTH) ? n + MESH_X :
                                   (p == P_EAST)  ? n + 1 : n - 1;
      if (HAS) begin : g_link
        mesh_link u_link (
          .clk, .rst_n,
          .up_valid (r_out_valid[n][p]), .up_flit (r_out_flit[n][p]),
          .up_credit(r_out_credit[n][p]),
          .dn_valid (r_in_valid[NB][OPP]), .dn_flit (r_in_flit[NB][OPP]),
          .dn_credit(r_in_credit[NB][OPP])
        );
      end else begin : g_edge
        assign r_in_valid[n][p]   = 1'b0;
        assign r_in_flit[n][p]    = '0;
        assign r_out_credit[n][p] = '0;
      end
    end
  end
endmodule
