// Self-checking testbench for wl_network: the 2x4 wireless mesh with 9-cycle
// channels, a 2000-cycle epoch and three borrowing pairs.
//  1. A single packet across 4 wireless hops: head latency of 10 cycles per
//     hop (9 on the channel, 1 in the router) plus 1 for ejection, and the
//     4 flits of a packet spaced 9 cycles apart on one private channel.
//  2. One epoch of heavy traffic on the link 0 -> 1 only; at the epoch end
//     the allocator lends an idle channel to it; in the next epoch the same
//     traffic must use the borrowed channel (token passes, borrowed flits)
//     and finish faster than in the first epoch.
//  3. W_th = 3 with three sources crowding one link: heads that wait too
//     long leave at their current router; every packet must still come out
//     exactly once, intact, at its destination cluster or by a timeout.
module tb_wl_network;
  import hnoc_pkg::*;
  localparam int WX = 2, WY = 4, NR = WX * WY, NL = 4 * NR;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [15:0] wait_th;
  logic    inj_valid [NR];
  flit_t   inj_flit  [NR];
  credit_t inj_credit[NR];
  logic    ej_valid  [NR];
  flit_t   ej_flit   [NR];
  credit_t ej_credit [NR];
  logic [NR-1:0] ev_timeout;
  logic [NL-1:0] ev_borrow_tx, ev_token_pass;
  logic ev_realloc;

  wl_network #(.WX(WX), .WY(WY), .LINK_LAT(9), .EPOCH(2000), .NUM_PAIRS(3)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic port_e ref_route(input int cx, cy, dx, dy);
    if (dx > cx) return P_EAST;
    if (dx < cx) return P_WEST;
    if (dy > cy) return P_SOUTH;
    if (dy < cy) return P_NORTH;
    return P_LOCAL;
  endfunction

  int cred [NR][NUM_VC];
  int rx_pkts = 0, rx_at_dst = 0, n_timeout = 0, n_borrow = 0, n_pass = 0, n_realloc = 0;
  int head_t [$], flit_t_q [$];
  int exp_idx [NR][NUM_VC];
  int cur_id  [NR][NUM_VC];
  always @(posedge clk) if (!rst_n) begin
    for (int r = 0; r < NR; r++) ej_credit[r] <= '0;
  end else begin
    n_timeout += $countones(ev_timeout);
    n_borrow  += $countones(ev_borrow_tx);
    n_pass    += $countones(ev_token_pass);
    n_realloc += ev_realloc;
    for (int r = 0; r < NR; r++) begin
      if (inj_credit[r].valid) cred[r][inj_credit[r].vc]++;
      ej_credit[r] <= '{valid: ej_valid[r], vc: ej_flit[r].vc};
      if (ej_valid[r]) begin
        int v, id, idx;
        v = ej_flit[r].vc; id = ej_flit[r].data[127:96]; idx = ej_flit[r].data[7:0];
        flit_t_q.push_back(cycle);
        if (idx == 0) begin cur_id[r][v] = id; head_t.push_back(cycle); end
        check(idx == exp_idx[r][v] && id == cur_id[r][v], "packet intact at ejection");
        exp_idx[r][v] = (idx + 1) % PKT_FLITS;
        if (is_tail(ej_flit[r])) begin
          rx_pkts++;
          if (ej_flit[r].dst_cy * WX + ej_flit[r].dst_cx == r) rx_at_dst++;
        end
      end
    end
  end

  int pkt_id = 0;
  task automatic send_pkt(input int src, input int dst, input int vc);
    int id;
    id = pkt_id++;
    for (int i = 0; i < PKT_FLITS; i++) begin
      flit_t f;
      f = '0;
      f.ftype = (i == 0) ? F_HEAD : (i == PKT_FLITS - 1) ? F_TAIL : F_BODY;
      f.vc = VC_W'(vc);
      f.dst_cx = COORD_W'(dst % WX); f.dst_cy = COORD_W'(dst / WX);
      f.route = ref_route(src % WX, src / WX, dst % WX, dst / WX);
      f.data = {32'(id), 88'(0), 8'(i)};
      while (cred[src][vc] == 0) @(negedge clk);
      cred[src][vc]--;
      inj_valid[src] = 1'b1; inj_flit[src] = f;
      @(negedge clk);
      inj_valid[src] = 1'b0;
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog: %0d packets", rx_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t_ep1, t_ep2, base;
    for (int r = 0; r < NR; r++) begin
      inj_valid[r] = 0; inj_flit[r] = '0;
      for (int v = 0; v < NUM_VC; v++) begin cred[r][v] = BUF_DEPTH; exp_idx[r][v] = 0; end
    end
    wait_th = 16'd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. latency over 4 hops, 9-cycle flit spacing on a private channel
    t0 = cycle;
    send_pkt(0, 7, 0);
    wait (rx_pkts == 1);
    @(negedge clk);
    check(head_t[0] - t0 == 10 * 4 + 1, $sformatf("4-hop head latency %0d", head_t[0] - t0));
    check(flit_t_q[3] - flit_t_q[0] == 27, $sformatf("flit spacing %0d", flit_t_q[3] - flit_t_q[0]));
    check(rx_at_dst == 1, "arrived at cluster 7");

    // 2. epoch 1: 12 packets over link 0 -> 1 without borrowing
    t0 = cycle;
    for (int k = 0; k < 12; k++) send_pkt(0, 1, k % 2);
    wait (rx_pkts == 13);
    @(negedge clk);
    t_ep1 = cycle - t0;
    check(n_borrow == 0, "no borrowing before the first reallocation");
    wait (n_realloc == 1);
    @(negedge clk);
    check(dut.lend_valid != '0, "a channel is lent after the epoch");
    // epoch 2: same traffic, now with a borrowed channel
    t0 = cycle;
    for (int k = 0; k < 12; k++) send_pkt(0, 1, k % 2);
    wait (rx_pkts == 25);
    @(negedge clk);
    t_ep2 = cycle - t0;
    check(n_pass > 0 && n_borrow > 0, $sformatf("token passes %0d, borrowed flits %0d", n_pass, n_borrow));
    check(t_ep2 < t_ep1, $sformatf("borrowing speeds the link up: %0d -> %0d cycles", t_ep1, t_ep2));
    check(rx_at_dst == 25, "all at their destination");

    // 3. W_th ejection under contention
    wait_th = 16'd3;
    base = rx_pkts;
    fork
      for (int k = 0; k < 8; k++) send_pkt(0, 7, k % 2);
      for (int k = 0; k < 8; k++) send_pkt(2, 7, k % 2);
      for (int k = 0; k < 8; k++) send_pkt(4, 7, k % 2);
    join
    wait (rx_pkts == base + 24);
    repeat (50) @(negedge clk);
    check(rx_pkts == base + 24, "every packet ejected exactly once");
    check(n_timeout > 0, $sformatf("%0d W_th ejections", n_timeout));
    check(rx_pkts - rx_at_dst == n_timeout, "packets off-destination = timeouts");
    $display("epoch1 %0d cycles, epoch2 %0d cycles, timeouts %0d", t_ep1, t_ep2, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
