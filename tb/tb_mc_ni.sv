// Self-checking testbench for mc_ni at node (3,1) of cluster (0,0), clusters
// of 4x2 routers, hop threshold 4 and queue threshold L_th = 2.  Expected
// decisions are worked out here from the hop count, the cluster and the
// wireless queue length the testbench creates by holding back credits.
// Also checks the lookahead route and VC of the emitted flits, re-injection
// of packets ejected from the wireless network onto wired VC 1 with credit
// return, and flit order when both streams share the wired port.
module tb_mc_ni;
  import hnoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic mc_valid, mc_ready, w_valid, wl_valid, ej_valid;
  flit_t mc_flit, w_flit, wl_flit, ej_flit;
  credit_t w_credit, wl_credit, ej_credit;
  logic ev_to_wireless, ev_near_wired, ev_lth_divert, ev_reinject;
  logic [4:0] hop_th = 5'd4;
  logic [3:0] l_th = 4'd2;

  mc_ni #(.MC_X(3), .MC_Y(1), .CL_W(4), .CL_H(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // the wired router returns a credit the cycle after each flit; the
  // wireless router only when wl_return is set
  bit wl_return = 1'b1;
  int wl_owed = 0;
  flit_t wq [$], wlq [$];
  int n_wl = 0, n_near = 0, n_div = 0, n_re = 0, ej_cred = 0;
  always @(posedge clk) if (!rst_n) begin
    w_credit  <= '0;
    wl_credit <= '0;
  end else begin
    w_credit  <= '{valid: w_valid, vc: w_flit.vc};
    if (w_valid)  wq.push_back(w_flit);
    if (wl_valid) begin wlq.push_back(wl_flit); wl_owed++; end
    if (wl_return && wl_owed > 0 && !wl_valid) begin
      wl_credit <= '{valid: 1'b1, vc: '0}; wl_owed--;
    end else wl_credit <= '0;
    n_wl   += ev_to_wireless;
    n_near += ev_near_wired;
    n_div  += ev_lth_divert;
    n_re   += ev_reinject;
    ej_cred += ej_credit.valid;
  end

  task automatic mc_send(input int dx, input int dy, input logic [15:0] tag);
    for (int i = 0; i < PKT_FLITS; i++) begin
      mc_flit = '0;
      mc_flit.ftype = (i == 0) ? F_HEAD : (i == PKT_FLITS - 1) ? F_TAIL : F_BODY;
      mc_flit.dst_x = COORD_W'(dx); mc_flit.dst_y = COORD_W'(dy);
      mc_flit.data = {tag, 112'(i)};
      mc_valid = 1'b1;
      @(posedge clk);
      while (!mc_ready) @(posedge clk);
      @(negedge clk);
      mc_valid = 1'b0;
    end
  endtask

  task automatic ej_send(input int vc, input int dx, input int dy, input logic [15:0] tag);
    for (int i = 0; i < PKT_FLITS; i++) begin
      ej_flit = '0;
      ej_flit.ftype = (i == 0) ? F_HEAD : (i == PKT_FLITS - 1) ? F_TAIL : F_BODY;
      ej_flit.vc = VC_W'(vc);
      ej_flit.dst_x = COORD_W'(dx); ej_flit.dst_y = COORD_W'(dy);
      ej_flit.data = {tag, 112'(i)};
      ej_valid = 1'b1;
      @(negedge clk);
      ej_valid = 1'b0;
    end
  endtask

  // all flits of `tag` in q, in order, with the given VC; returns head
  task automatic expect_pkt(ref flit_t q [$], input logic [15:0] tag, input int vc,
                            output flit_t head);
    int idx = 0;
    head = '0;
    foreach (q[k]) if (q[k].data[127:112] == tag) begin
      if (idx == 0) head = q[k];
      check(q[k].data[111:0] == 112'(idx), $sformatf("order %h", tag));
      check(q[k].vc == VC_W'(vc), $sformatf("vc %h", tag));
      idx++;
    end
    check(idx == PKT_FLITS, $sformatf("tag %h: %0d flits", tag, idx));
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t h;
    mc_valid = 0; mc_flit = '0; ej_valid = 0; ej_flit = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    mc_send(2, 0, 16'h0001);          // 2 hops: wired
    mc_send(7, 7, 16'h0002);          // 10 hops, cluster (1,3): wireless
    mc_send(1, 1, 16'h0003);          // own cluster: wired
    mc_send(3, 5, 16'h0004);          // 4 hops, cluster (0,2): wireless
    repeat (10) @(negedge clk);
    expect_pkt(wq, 16'h0001, 0, h);
    check(h.route == P_WEST, "route at MC router (3,1)->(2,0)");
    expect_pkt(wlq, 16'h0002, 0, h);
    check(h.dst_cx == 1 && h.dst_cy == 3 && h.route == P_EAST, "wireless head to cluster (1,3)");
    expect_pkt(wq, 16'h0003, 0, h);
    check(h.route == P_WEST, "own-cluster packet wired");
    expect_pkt(wlq, 16'h0004, 0, h);
    check(h.dst_cx == 0 && h.dst_cy == 2 && h.route == P_SOUTH, "wireless head to cluster (0,2)");
    check(n_wl == 2 && n_near == 2 && n_div == 0, "decisions counted");

    // L_th: hold back wireless credits, a full injection queue diverts
    wl_return = 1'b0;
    mc_send(7, 6, 16'h0005);          // fills the 4-flit queue
    mc_send(6, 7, 16'h0006);          // queue 4 > L_th: wired
    repeat (4) @(negedge clk);
    expect_pkt(wlq, 16'h0005, 0, h);
    expect_pkt(wq, 16'h0006, 0, h);
    check(h.route == P_EAST, "diverted packet routed on the wired mesh");
    check(n_div == 1, "one L_th diversion");
    wl_return = 1'b1;
    repeat (10) @(negedge clk);

    // re-injection, interleaved with an MC packet on the wired port
    fork
      ej_send(1, 6, 2, 16'h0007);
      mc_send(0, 1, 16'h0008);
    join
    ej_send(0, 3, 0, 16'h0009);
    repeat (10) @(negedge clk);
    expect_pkt(wq, 16'h0007, 1, h);
    check(h.route == P_EAST, "re-injected route (3,1)->(6,2)");
    expect_pkt(wq, 16'h0008, 0, h);
    expect_pkt(wq, 16'h0009, 1, h);
    check(h.route == P_NORTH, "re-injected route (3,1)->(3,0)");
    check(n_re == 2, "two re-injections counted");
    check(ej_cred == 8, $sformatf("credits to the wireless router: %0d", ej_cred));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
