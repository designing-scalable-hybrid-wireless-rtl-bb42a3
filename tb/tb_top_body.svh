// Shared body of the end-to-end testbenches of hybrid_noc_top.  The
// including module declares the DUT signals, instantiates the top with
// MESH_X/MESH_Y/WX/WY/MC_PLACE matching the localparams below and sets
// TB_CYCLES (traffic duration) and TB_MIN_REALLOC (reallocations required).
//
// Traffic: every memory controller sends reply packets, back to back, to
// random shader-core nodes; every 4th shader core sends request packets to
// random memory controllers over the request mesh.  Shader cores and memory
// controllers are modelled here as ideal sinks that return a credit the
// cycle after each flit.  Checks: every packet arrives exactly once, at its
// destination node, with its four flits in order on one VC.  Every mechanism
// of the design must occur at least once: short-distance wired injection,
// wireless injection, L_th diversion, W_th ejection, re-injection from the
// wireless into the wired network, token passing, transmission on a
// borrowed channel, epoch reallocation, and request delivery.

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int tb_mc_x(input int k);
    int cx, clw;
    cx = k % WX; clw = MX / WX;
    if (MC_PLACE == 0) return (cx < WX / 2) ? cx * clw : cx * clw + clw - 1;
    else               return (cx < WX / 2) ? cx * clw + clw - 1 : cx * clw;
  endfunction
  function automatic int tb_mc_y(input int k);
    int cy, clh;
    cy = k / WX; clh = MY / WY;
    if (MC_PLACE == 0) return cy * clh;
    else               return cy * clh + ((cy < WY / 2) ? clh - 1 : 0);
  endfunction
  function automatic port_e ref_route(input int cx, cy, dx, dy);
    if (dx > cx) return P_EAST;
    if (dx < cx) return P_WEST;
    if (dy > cy) return P_SOUTH;
    if (dy < cy) return P_NORTH;
    return P_LOCAL;
  endfunction

  int is_mc [N];
  int mc_node [NMC];
  bit traffic_on = 1'b0;

  // ------------------------------------------------------------ monitors
  int rep_sent = 0, rep_rcvd = 0, req_sent = 0, req_rcvd = 0;
  bit seen [int];
  int rep_idx [N][NUM_VC], rep_id [N][NUM_VC];
  int req_idx [N][NUM_VC], req_id [N][NUM_VC];
  int n_near = 0, n_wl = 0, n_div = 0, n_re = 0, n_to = 0, n_brw = 0, n_pass = 0, n_realloc = 0;

  always @(posedge clk) if (!rst_n) begin
    for (int n = 0; n < N; n++) begin rep_ej_credit[n] <= '0; req_ej_credit[n] <= '0; end
  end else begin
    n_near += $countones(ev_near_wired);
    n_wl   += $countones(ev_to_wireless);
    n_div  += $countones(ev_lth_divert);
    n_re   += $countones(ev_reinject);
    n_to   += $countones(ev_timeout);
    n_brw  += $countones(ev_borrow_tx);
    n_pass += $countones(ev_token_pass);
    n_realloc += ev_realloc;
    for (int n = 0; n < N; n++) begin
      rep_ej_credit[n] <= '{valid: rep_ej_valid[n], vc: rep_ej_flit[n].vc};
      req_ej_credit[n] <= '{valid: req_ej_valid[n], vc: req_ej_flit[n].vc};
      if (rep_ej_valid[n]) begin
        int v, id, idx;
        v = rep_ej_flit[n].vc; id = rep_ej_flit[n].data[127:96]; idx = rep_ej_flit[n].data[7:0];
        if (idx == 0) rep_id[n][v] = id;
        check(rep_ej_flit[n].dst_y * MX + rep_ej_flit[n].dst_x == n, "reply at its node");
        check(idx == rep_idx[n][v] && id == rep_id[n][v], "reply packet intact");
        rep_idx[n][v] = (idx + 1) % PKT_FLITS;
        if (idx == PKT_FLITS - 1) begin
          check(!seen.exists(id), "reply delivered once");
          seen[id] = 1'b1;
          rep_rcvd++;
        end
      end
      if (req_ej_valid[n]) begin
        int v, id, idx;
        v = req_ej_flit[n].vc; id = req_ej_flit[n].data[127:96]; idx = req_ej_flit[n].data[7:0];
        if (idx == 0) req_id[n][v] = id;
        check(is_mc[n] != 0 && req_ej_flit[n].dst_y * MX + req_ej_flit[n].dst_x == n,
              "request at its memory controller");
        check(idx == req_idx[n][v] && id == req_id[n][v], "request packet intact");
        req_idx[n][v] = (idx + 1) % PKT_FLITS;
        if (idx == PKT_FLITS - 1) req_rcvd++;
      end
    end
  end

  // ------------------------------------------------------ MC reply sources
  int next_id = 0;
  function automatic int new_id();
    return next_id++;
  endfunction

  for (genvar k = 0; k < NMC; k++) begin : g_mc
    initial begin
      mc_valid[k] = 1'b0; mc_flit[k] = '0;
      wait (traffic_on);
      while (traffic_on) begin
        int dst, id;
        do dst = $urandom_range(N - 1); while (is_mc[dst] != 0);
        id = new_id();
        for (int i = 0; i < PKT_FLITS; i++) begin
          @(negedge clk);
          mc_flit[k] = '0;
          mc_flit[k].ftype = (i == 0) ? F_HEAD : (i == PKT_FLITS - 1) ? F_TAIL : F_BODY;
          mc_flit[k].dst_x = COORD_W'(dst % MX); mc_flit[k].dst_y = COORD_W'(dst / MX);
          mc_flit[k].data = {32'(id), 88'(0), 8'(i)};
          mc_valid[k] = 1'b1;
          @(posedge clk);
          while (!mc_ready[k]) @(posedge clk);
        end
        @(negedge clk);
        mc_valid[k] = 1'b0;
        rep_sent++;
      end
    end
  end

  // ------------------------------------------------ shader request sources
  int req_cred [N][NUM_VC];
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < N; n++)
      if (req_inj_credit[n].valid) req_cred[n][req_inj_credit[n].vc]++;

  for (genvar n = 0; n < N; n++) begin : g_core
    initial begin
      req_inj_valid[n] = 1'b0; req_inj_flit[n] = '0;
      for (int v = 0; v < NUM_VC; v++) req_cred[n][v] = BUF_DEPTH;
      wait (traffic_on);
      if (is_mc[n] == 0 && n % 4 == 1) begin
        int vc = 0;
        while (traffic_on) begin
          int k, id, d;
          k = $urandom_range(NMC - 1);
          d = mc_node[k];
          id = new_id();
          for (int i = 0; i < PKT_FLITS; i++) begin
            flit_t f;
            f = '0;
            f.ftype = (i == 0) ? F_HEAD : (i == PKT_FLITS - 1) ? F_TAIL : F_BODY;
            f.vc = VC_W'(vc);
            f.dst_x = COORD_W'(d % MX); f.dst_y = COORD_W'(d / MX);
            f.route = ref_route(n % MX, n / MX, d % MX, d / MX);
            f.data = {32'(id), 88'(0), 8'(i)};
            @(negedge clk);
            while (req_cred[n][vc] == 0) @(negedge clk);
            req_cred[n][vc]--;
            req_inj_valid[n] = 1'b1; req_inj_flit[n] = f;
            @(negedge clk);
            req_inj_valid[n] = 1'b0;
          end
          req_sent++;
          vc = 1 - vc;
          repeat (20) @(negedge clk);
        end
      end
    end
  end

  // ----------------------------------------------------------- sequence
  initial begin
    for (int n = 0; n < N; n++) is_mc[n] = 0;
    for (int k = 0; k < NMC; k++) begin
      mc_node[k] = tb_mc_y(k) * MX + tb_mc_x(k);
      is_mc[mc_node[k]] = 1;
    end
    for (int n = 0; n < N; n++)
      for (int v = 0; v < NUM_VC; v++) begin
        rep_idx[n][v] = 0; req_idx[n][v] = 0; rep_id[n][v] = 0; req_id[n][v] = 0;
      end
    hop_th = 5'd4; l_th = 4'd2; w_th = 16'd24;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    traffic_on = 1'b1;
    repeat (TB_CYCLES) @(negedge clk);
    traffic_on = 1'b0;
    repeat (PKT_FLITS + 2) @(negedge clk);
    // drain: everything must arrive within 4000 cycles
    for (int i = 0; i < 4000 && !(rep_rcvd == rep_sent && req_rcvd == req_sent); i++)
      @(negedge clk);
    repeat (20) @(negedge clk);
    check(rep_rcvd == rep_sent && rep_sent > 0, $sformatf("replies %0d/%0d", rep_rcvd, rep_sent));
    check(req_rcvd == req_sent && req_sent > 0, $sformatf("requests %0d/%0d", req_rcvd, req_sent));
    check(n_near > 0, "short-distance packets took the wired mesh");
    check(n_wl > 0,   "long-distance packets took the wireless network");
    check(n_div > 0,  "L_th diverted a packet to the wired mesh");
    check(n_to > 0,   "W_th ejected a blocked packet");
    check(n_re > 0,   "wireless packets re-injected into the wired mesh");
    check(n_realloc >= TB_MIN_REALLOC, "epoch reallocation");
    if (TB_MIN_REALLOC > 0) begin
      check(n_pass > 0, "token passed to a borrower");
      check(n_brw > 0,  "flits sent on a borrowed channel");
    end
    $display("cycles %0d: replies %0d requests %0d | near %0d wireless %0d L_th %0d W_th %0d reinject %0d realloc %0d token %0d borrowed %0d",
             cycle, rep_rcvd, req_rcvd, n_near, n_wl, n_div, n_to, n_re, n_realloc, n_pass, n_brw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
