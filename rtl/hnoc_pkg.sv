// Shared types and helper functions of the hybrid wired/wireless GPU NoC.
//
// A flit is 128 bits of payload plus side-band header bits: the flit type,
// the virtual channel (VC) it travels on, the lookahead route (the output
// port to take at the router that receives it), the destination node in the
// wired mesh and the destination cluster in the wireless mesh.  The 128-bit
// flit, the 4-flit packet, the VC buffer depth of 4 and X-Y routing follow
// the design's system configuration; the number of VCs (2), the port
// numbering and the 4-bit coordinates (enough for a 16x16 mesh) are this
// implementation's choices.
package hnoc_pkg;

  localparam int unsigned DATA_W     = 128;  // flit payload
  localparam int unsigned NUM_VC     = 2;    // VCs per port
  localparam int unsigned VC_W       = 1;
  localparam int unsigned BUF_DEPTH  = 4;    // flits per VC buffer
  localparam int unsigned PKT_FLITS  = 4;    // flits per packet
  localparam int unsigned COORD_W    = 4;
  localparam int unsigned NPORT      = 5;

  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // y - 1
    P_EAST  = 3'd2,   // x + 1
    P_SOUTH = 3'd3,   // y + 1
    P_WEST  = 3'd4    // x - 1
  } port_e;

  typedef enum logic [1:0] {
    F_HEAD     = 2'd0,
    F_BODY     = 2'd1,
    F_TAIL     = 2'd2,
    F_HEADTAIL = 2'd3
  } ftype_e;

  typedef struct packed {
    ftype_e              ftype;
    logic [VC_W-1:0]     vc;
    port_e               route;    // port to take at the receiving router
    logic [COORD_W-1:0]  dst_x;    // destination node, wired mesh
    logic [COORD_W-1:0]  dst_y;
    logic [COORD_W-1:0]  dst_cx;   // destination cluster, wireless mesh
    logic [COORD_W-1:0]  dst_cy;
    logic [DATA_W-1:0]   data;
  } flit_t;

  // One credit returned upstream: a flit left the buffer of VC `vc`.
  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  function automatic logic is_head(input flit_t f);
    return (f.ftype == F_HEAD) || (f.ftype == F_HEADTAIL);
  endfunction

  function automatic logic is_tail(input flit_t f);
    return (f.ftype == F_TAIL) || (f.ftype == F_HEADTAIL);
  endfunction

  // Dimension-ordered X-Y routing: X first, then Y.
  function automatic port_e route_xy(input logic [COORD_W-1:0] cx,
                                     input logic [COORD_W-1:0] cy,
                                     input logic [COORD_W-1:0] dx,
                                     input logic [COORD_W-1:0] dy);
    if (dx > cx)      return P_EAST;
    else if (dx < cx) return P_WEST;
    else if (dy > cy) return P_SOUTH;
    else if (dy < cy) return P_NORTH;
    else              return P_LOCAL;
  endfunction

  // Coordinates of the neighbour reached through port p.
  function automatic logic [2*COORD_W-1:0] neighbour(input logic [COORD_W-1:0] cx,
                                                     input logic [COORD_W-1:0] cy,
                                                     input port_e p);
    logic [COORD_W-1:0] nx, ny;
    nx = cx; ny = cy;
    case (p)
      P_NORTH: ny = cy - 1'b1;
      P_SOUTH: ny = cy + 1'b1;
      P_EAST:  nx = cx + 1'b1;
      P_WEST:  nx = cx - 1'b1;
      default: ;
    endcase
    return {nx, ny};
  endfunction

  function automatic logic [COORD_W:0] abs_diff(input logic [COORD_W-1:0] a,
                                                input logic [COORD_W-1:0] b);
    return (a > b) ? {1'b0, a - b} : {1'b0, b - a};
  endfunction

endpackage
