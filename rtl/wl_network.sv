// Overlaid wireless network: a WX x WY mesh of wireless routers, one per
// cluster / memory controller, with a private channel per directed link,
// a token MAC per channel and the epoch-based bandwidth allocator.
//
// Router r sits at cluster (r % WX, r / WX).  Link slot l = 4*r + (d-1)
// names the link leaving router r through mesh port d (1..4, see port_e);
// slots that would leave the mesh do not exist (LINK_MASK).  Channel l is
// link l's private channel.  The allocator may lend channel c to a
// borrowing link b: b's router then sends on c whenever c's token_mac hands
// it the token.  A receiver takes, from every channel, the flits tagged with
// the link that ends at it, so private and borrowed flits merge.  Credits
// for the receiving buffers travel back over the control network with one
// cycle of latency (the token hops take the same path, inside token_mac).
//
// Local ports: inj_* from the memory controller's network interface (VC
// buffers of BUF_DEPTH flits, credits on inj_credit) and ej_* to it (the
// interface returns ej_credit per flit it takes).  The 2x4 mesh, X-Y routing,
// 9-cycle links and the 50000-cycle epoch follow the design.
module wl_network
  import hnoc_pkg::*;
#(
  parameter int unsigned WX        = 2,
  parameter int unsigned WY        = 4,
  parameter int unsigned LINK_LAT  = 9,
  parameter int unsigned EPOCH     = 50000,
  parameter int unsigned NUM_PAIRS = 3,
  parameter int unsigned NR        = WX * WY,
  parameter int unsigned NL        = 4 * NR
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] wait_th,
  input  logic        inj_valid  [NR],
  input  flit_t       inj_flit   [NR],
  output credit_t     inj_credit [NR],
  output logic        ej_valid   [NR],
  output flit_t       ej_flit    [NR],
  input  credit_t     ej_credit  [NR],
  output logic [NR-1:0] ev_timeout,
  output logic [NL-1:0] ev_borrow_tx,
  output logic [NL-1:0] ev_token_pass,
  output logic          ev_realloc
);
  localparam int unsigned LW = $clog2(NL);

  function automatic logic [NL-1:0] link_mask();
    logic [NL-1:0] m;
    for (int r = 0; r < NR; r++) begin
      m[4*r + 0] = (r / WX) > 0;              // north
      m[4*r + 1] = (r % WX) < WX - 1;         // east
      m[4*r + 2] = (r / WX) < WY - 1;         // south
      m[4*r + 3] = (r % WX) > 0;              // west
    end
    return m;
  endfunction
  localparam logic [NL-1:0] LINK_MASK = link_mask();

  // destination router of link l (valid where the link exists)
  function automatic int unsigned link_dst(input int unsigned l);
    int unsigned r, d;
    r = l / 4; d = l % 4;
    case (d)
      0:       return r - WX;
      1:       return r + 1;
      2:       return r + WX;
      default: return r - 1;
    endcase
  endfunction

  // router port signals
  logic    r_in_valid  [NR][NPORT];
  flit_t   r_in_flit   [NR][NPORT];
  credit_t r_in_credit [NR][NPORT];
  logic    r_priv_start[NR][NPORT];
  logic    r_brw_start [NR][NPORT];
  flit_t   r_tx_flit   [NR][NPORT];
  logic    r_priv_free [NR][NPORT];
  logic    r_brw_free  [NR][NPORT];
  credit_t r_out_credit[NR][NPORT];
  logic    r_want      [NR][NPORT];
  logic    r_use       [NR][NPORT];

  // per link / channel signals
  logic          l_want   [NL];
  logic          l_pstart [NL];
  logic          l_bstart [NL];
  flit_t         l_flit   [NL];
  logic          c_idle   [NL];
  logic          c_start  [NL];
  flit_t         c_flit   [NL];
  logic [LW-1:0] c_tag    [NL];
  logic          c_rx     [NL];
  flit_t         c_rx_flit[NL];
  logic [LW-1:0] c_rx_tag [NL];
  logic          m_og     [NL];
  logic          m_bg     [NL];
  logic          m_lent   [NL];
  logic [LW-1:0] m_brw    [NL];
  logic          m_bstart [NL];
  logic          m_bwant  [NL];
  logic          m_btail  [NL];
  logic [NL-1:0] use_pulse;
  logic [NL-1:0] lend_valid;
  logic [LW-1:0] lend_to  [NL];
  logic          l_bfree  [NL];
  logic [LW-1:0] l_bsel   [NL];   // channel a borrowing link uses

  // ------------------------------------------------------------ routers
  for (genvar r = 0; r < NR; r++) begin : g_rt
    wl_router u_router (
      .clk, .rst_n, .wait_th,
      .my_x (COORD_W'(r % WX)), .my_y (COORD_W'(r / WX)),
      .in_valid   (r_in_valid[r]),   .in_flit   (r_in_flit[r]),  .in_credit (r_in_credit[r]),
      .priv_start (r_priv_start[r]), .brw_start (r_brw_start[r]), .tx_flit  (r_tx_flit[r]),
      .priv_free  (r_priv_free[r]),  .brw_free  (r_brw_free[r]),
      .out_credit (r_out_credit[r]), .want      (r_want[r]),      .use_pulse (r_use[r]),
      .ev_timeout (ev_timeout[r])
    );
    assign r_in_valid[r][P_LOCAL]   = inj_valid[r];
    assign r_in_flit[r][P_LOCAL]    = inj_flit[r];
    assign inj_credit[r]            = r_in_credit[r][P_LOCAL];
    assign ej_valid[r]              = r_priv_start[r][P_LOCAL];
    assign ej_flit[r]               = r_tx_flit[r][P_LOCAL];
    assign r_out_credit[r][P_LOCAL] = ej_credit[r];
    assign r_priv_free[r][P_LOCAL]  = 1'b1;
    assign r_brw_free[r][P_LOCAL]   = 1'b0;
    for (genvar d = 1; d < NPORT; d++) begin : g_d
      assign l_want[4*r + d - 1]   = r_want[r][d];
      assign l_pstart[4*r + d - 1] = r_priv_start[r][d];
      assign l_bstart[4*r + d - 1] = r_brw_start[r][d];
      assign l_flit[4*r + d - 1]   = r_tx_flit[r][d];
      assign use_pulse[4*r + d - 1] = r_use[r][d];
      assign r_priv_free[r][d]     = m_og[4*r + d - 1];
      assign r_brw_free[r][d]      = l_bfree[4*r + d - 1];
    end
  end

  // ------------------------------------------------- channels and MACs
  for (genvar l = 0; l < NL; l++) begin : g_ch
    if (LINK_MASK[l]) begin : g_on
      assign m_bstart[l] = l_bstart[m_brw[l]] && m_bg[l] && (l_bsel[m_brw[l]] == LW'(l));
      assign m_bwant[l]  = l_want[m_brw[l]];
      assign m_btail[l]  = is_tail(l_flit[m_brw[l]]);
      assign c_start[l]  = l_pstart[l] || m_bstart[l];
      assign c_flit[l]   = l_pstart[l] ? l_flit[l] : l_flit[m_brw[l]];
      assign c_tag[l]    = l_pstart[l] ? LW'(l) : m_brw[l];
      assign ev_borrow_tx[l] = m_bstart[l];

      token_mac #(.LINK_W(LW), .TOKEN_LAT(1)) u_mac (
        .clk, .rst_n,
        .cfg_valid (lend_valid[l]), .cfg_borrower (lend_to[l]),
        .ch_idle (c_idle[l]), .owner_want (l_want[l]),
        .borrower_want (m_bwant[l]), .borrower_start (m_bstart[l]),
        .borrower_tail (m_btail[l]),
        .owner_grant (m_og[l]), .borrower_grant (m_bg[l]),
        .lent (m_lent[l]), .borrower (m_brw[l]), .ev_pass (ev_token_pass[l])
      );
      wl_channel #(.LAT(LINK_LAT), .TAG_W(LW)) u_channel (
        .clk, .rst_n, .start (c_start[l]), .tx_flit (c_flit[l]), .tx_tag (c_tag[l]),
        .idle (c_idle[l]), .rx_valid (c_rx[l]), .rx_flit (c_rx_flit[l]), .rx_tag (c_rx_tag[l])
      );
    end else begin : g_off
      assign m_bstart[l] = 1'b0;  assign m_bwant[l] = 1'b0;  assign m_btail[l] = 1'b0;
      assign c_start[l]  = 1'b0;  assign c_flit[l]  = '0;    assign c_tag[l]   = '0;
      assign m_og[l]     = 1'b0;  assign m_bg[l]    = 1'b0;  assign m_lent[l]  = 1'b0;
      assign m_brw[l]    = '0;    assign c_idle[l]  = 1'b0;  assign c_rx[l]    = 1'b0;
      assign c_rx_flit[l] = '0;   assign c_rx_tag[l] = '0;
      assign ev_borrow_tx[l] = 1'b0;  assign ev_token_pass[l] = 1'b0;
    end
  end

  // a borrowing link may send on the (lowest) channel whose token it holds
  always_comb begin
    for (int b = 0; b < NL; b++) begin
      l_bfree[b] = 1'b0;
      l_bsel[b]  = '0;
      for (int c = NL - 1; c >= 0; c--)
        if (LINK_MASK[c] && m_bg[c] && m_lent[c] && (m_brw[c] == LW'(b))) begin
          l_bfree[b] = 1'b1;
          l_bsel[b]  = LW'(c);
        end
    end
  end

  // ------------------------------------------- reception and credit return
  for (genvar l = 0; l < NL; l++) begin : g_rx
    if (LINK_MASK[l]) begin : g_on
      localparam int unsigned SR  = l / 4;
      localparam int unsigned SP  = l % 4 + 1;
      localparam int unsigned DR  = link_dst(l);
      localparam int unsigned DP  = (SP == P_NORTH) ? P_SOUTH : (SP == P_SOUTH) ? P_NORTH :
                                    (SP == P_EAST)  ? P_WEST  : P_EAST;
      always_comb begin
        r_in_valid[DR][DP] = 1'b0;
        r_in_flit[DR][DP]  = c_rx_flit[l];
        for (int c = 0; c < NL; c++)
          if (c_rx[c] && (c_rx_tag[c] == LW'(l))) begin
            r_in_valid[DR][DP] = 1'b1;
            r_in_flit[DR][DP]  = c_rx_flit[c];
          end
      end
      always_ff @(posedge clk or negedge rst_n)
        if (!rst_n) r_out_credit[SR][SP] <= '0;
        else        r_out_credit[SR][SP] <= r_in_credit[DR][DP];
    end else begin : g_off
      localparam int unsigned SR = l / 4;
      localparam int unsigned SP = l % 4 + 1;
      assign r_out_credit[SR][SP] = '0;
      // the matching input port of the router has no link either
      localparam int unsigned DP = (SP == P_NORTH) ? P_SOUTH : (SP == P_SOUTH) ? P_NORTH :
                                   (SP == P_EAST)  ? P_WEST  : P_EAST;
      localparam int unsigned ER = (SP == P_NORTH) ? SR + WX * (WY - 1) :
                                   (SP == P_SOUTH) ? SR - WX * (WY - 1) :
                                   (SP == P_EAST)  ? SR - (WX - 1) : SR + (WX - 1);
      // a missing link leaving the north edge of router SR means the
      // router on the opposite (south) edge of that column has no south
      // input; tie that input off
      assign r_in_valid[ER][DP] = 1'b0;
      assign r_in_flit[ER][DP]  = '0;
    end
  end

  // ----------------------------------------------------------- allocator
  bw_allocator #(.NL(NL), .LINK_MASK(LINK_MASK), .EPOCH(EPOCH),
                 .NUM_PAIRS(NUM_PAIRS), .CNT_W(16), .LINK_W(LW)) u_alloc (
    .clk, .rst_n, .use_pulse, .lend_valid, .lend_to, .ev_realloc
  );

  for (genvar l = 0; l < NL; l++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) !(l_pstart[l] && m_bstart[l]))
      else $error("wl_network: link sent on two channels at once");
  end
endmodule
