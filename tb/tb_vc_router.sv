// Self-checking testbench for vc_router in wired mode, placed at (2,1).
// Checks X-Y output port selection, the lookahead route written into the
// flits, the one-cycle buffer-to-output latency, VC allocation for two
// packets competing for one output, wormhole order within a VC, credit
// back-pressure (at most BUF_DEPTH flits per downstream VC without credits)
// and credit return upstream.
module tb_vc_router;
  import hnoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    in_valid  [NPORT];
  flit_t   in_flit   [NPORT];
  credit_t in_credit [NPORT];
  logic    out_valid [NPORT];
  flit_t   out_flit  [NPORT];
  logic    out_ready [NPORT];
  credit_t out_credit[NPORT];
  logic    out_want  [NPORT];
  logic    ev_timeout;

  vc_router #(.WIRELESS(1'b0)) dut (
    .clk, .rst_n, .my_x (COORD_W'(2)), .my_y (COORD_W'(1)), .wait_th (16'd0), .in_valid, .in_flit, .in_credit,
    .out_valid, .out_flit, .out_ready, .out_credit, .out_want, .ev_timeout);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // upstream credits the testbench holds for each input VC of the router
  int up_cred [NPORT][NUM_VC];
  // downstream: record what leaves, return credits when enabled
  bit  credit_en = 1'b1;
  flit_t rx_q [NPORT][$];
  int    rx_t [NPORT][$];
  int    pend [NPORT][NUM_VC];

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORT; p++) begin
      if (in_credit[p].valid) up_cred[p][in_credit[p].vc]++;
      if (out_valid[p]) begin
        rx_q[p].push_back(out_flit[p]);
        rx_t[p].push_back(cycle);
        pend[p][out_flit[p].vc]++;
      end
    end
  end
  always @(negedge clk) begin
    for (int p = 0; p < NPORT; p++) begin
      out_credit[p] = '0;
      if (credit_en)
        for (int v = 0; v < NUM_VC; v++)
          if (pend[p][v] > 0 && !out_credit[p].valid) begin
            pend[p][v]--;
            out_credit[p].valid = 1'b1;
            out_credit[p].vc = VC_W'(v);
          end
    end
  end

  function automatic port_e ref_route(input int cx, cy, dx, dy);
    if (dx > cx) return P_EAST;
    if (dx < cx) return P_WEST;
    if (dy > cy) return P_SOUTH;
    if (dy < cy) return P_NORTH;
    return P_LOCAL;
  endfunction

  int sent_t [NPORT][$];
  task automatic send_pkt(input int p, input int vc, input int dx, input int dy,
                          input logic [15:0] tag);
    for (int i = 0; i < PKT_FLITS; i++) begin
      flit_t f;
      f = '0;
      f.ftype = (i == 0) ? F_HEAD : (i == PKT_FLITS - 1) ? F_TAIL : F_BODY;
      f.vc = VC_W'(vc);
      f.route = ref_route(2, 1, dx, dy);
      f.dst_x = COORD_W'(dx); f.dst_y = COORD_W'(dy);
      f.data = {tag, 112'(i)};
      while (up_cred[p][vc] == 0) @(negedge clk);
      up_cred[p][vc]--;
      in_valid[p] = 1'b1; in_flit[p] = f;
      sent_t[p].push_back(cycle);
      @(negedge clk);
      in_valid[p] = 1'b0;
    end
  endtask

  // check a packet stream on output o: flits of `tag` in order
  task automatic expect_pkt(input int o, input logic [15:0] tag, input port_e next_route,
                            output int vc_used);
    int idx = 0;
    vc_used = -1;
    for (int k = 0; k < rx_q[o].size(); k++) begin
      if (rx_q[o][k].data[127:112] == tag) begin
        if (vc_used < 0) vc_used = rx_q[o][k].vc;
        check(rx_q[o][k].data[111:0] == 112'(idx), $sformatf("order tag %h", tag));
        check(rx_q[o][k].vc == VC_W'(vc_used), "one VC per packet");
        if (idx == 0) check(rx_q[o][k].route == next_route, "lookahead route");
        idx++;
      end
    end
    check(idx == PKT_FLITS, $sformatf("tag %h: %0d flits on port %0d", tag, idx, o));
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v0, v1;
    for (int p = 0; p < NPORT; p++) begin
      in_valid[p] = 1'b0; in_flit[p] = '0; out_ready[p] = 1'b1; out_credit[p] = '0;
      for (int v = 0; v < NUM_VC; v++) begin up_cred[p][v] = BUF_DEPTH; pend[p][v] = 0; end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // A: west -> east, latency of one cycle per flit in the router
    send_pkt(P_WEST, 0, 5, 1, 16'hA001);
    repeat (5) @(negedge clk);
    expect_pkt(P_EAST, 16'hA001, P_EAST, v0);
    check(rx_t[P_EAST].size() == 4 && rx_t[P_EAST][0] - sent_t[P_WEST][0] == 1,
          "one-cycle router latency");
    check(rx_t[P_EAST][3] - rx_t[P_EAST][0] == 3, "one flit per cycle");
    check(up_cred[P_WEST][0] == BUF_DEPTH, "credits returned upstream");

    // B: south turn and ejection; next-hop route computed for (2,2)
    send_pkt(P_NORTH, 1, 2, 2, 16'hB001);
    send_pkt(P_EAST, 0, 2, 1, 16'hB002);
    repeat (5) @(negedge clk);
    expect_pkt(P_SOUTH, 16'hB001, P_LOCAL, v0);
    expect_pkt(P_LOCAL, 16'hB002, P_LOCAL, v0);

    // C: two packets compete for the east output: two output VCs
    fork
      send_pkt(P_WEST,  0, 6, 0, 16'hC001);
      send_pkt(P_LOCAL, 1, 7, 3, 16'hC002);
    join
    repeat (6) @(negedge clk);
    expect_pkt(P_EAST, 16'hC001, P_EAST, v0);
    expect_pkt(P_EAST, 16'hC002, P_EAST, v1);
    check(v0 != v1, "competing packets on different VCs");

    // D: no credits from downstream: only 2 x BUF_DEPTH flits may leave
    credit_en = 1'b0;
    for (int p = 0; p < NPORT; p++) begin rx_q[p].delete(); rx_t[p].delete(); end
    fork
      send_pkt(P_NORTH, 0, 2, 3, 16'hD001);
      send_pkt(P_EAST,  0, 2, 2, 16'hD002);
      send_pkt(P_WEST,  1, 2, 3, 16'hD003);
    join_none
    repeat (30) @(negedge clk);
    check(rx_q[P_SOUTH].size() == 2 * BUF_DEPTH,
          $sformatf("credit stall: %0d flits left", rx_q[P_SOUTH].size()));
    credit_en = 1'b1;
    repeat (30) @(negedge clk);
    check(rx_q[P_SOUTH].size() == 3 * PKT_FLITS, "stalled packet resumes");
    expect_pkt(P_SOUTH, 16'hD001, P_SOUTH, v0);
    expect_pkt(P_SOUTH, 16'hD002, P_LOCAL, v0);
    expect_pkt(P_SOUTH, 16'hD003, P_SOUTH, v0);
    check(rx_q[P_WEST].size() == 0, "no flit on west");
    for (int p = 0; p < NPORT; p++)
      for (int v = 0; v < NUM_VC; v++)
        check(up_cred[p][v] == BUF_DEPTH, "all upstream credits back");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
