// Self-checking testbench for wired_mesh at its default 8x8 size.
// First single packets on an empty mesh: each must arrive at its
// destination only, with a head latency of 2 cycles per hop plus 1 (buffer
// write at the source router, then two cycles per hop).  Then random
// uniform traffic from every node: every packet must arrive once, at the
// right node, with its four flits in order on one VC.
module tb_wired_mesh;
  import hnoc_pkg::*;
  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int PKTS_PER_NODE = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic    inj_valid [N];
  flit_t   inj_flit  [N];
  credit_t inj_credit[N];
  logic    ej_valid  [N];
  flit_t   ej_flit   [N];
  credit_t ej_credit [N];

  wired_mesh dut (.*);

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

  int cred [N][NUM_VC];
  int rx_flits = 0, rx_pkts = 0, last_head_t;
  int exp_idx [N][NUM_VC];   // per (node, VC): next flit index expected
  int cur_id  [N][NUM_VC];   // ... and the packet it belongs to
  int pkt_id = 0;
  always @(posedge clk) if (!rst_n) begin
    for (int n = 0; n < N; n++) ej_credit[n] <= '0;
  end else begin
    for (int n = 0; n < N; n++) begin
      if (inj_credit[n].valid) cred[n][inj_credit[n].vc]++;
      ej_credit[n] <= '{valid: ej_valid[n], vc: ej_flit[n].vc};
      if (ej_valid[n]) begin
        int dx, dy, id, idx, v;
        dx = ej_flit[n].dst_x; dy = ej_flit[n].dst_y;
        id = ej_flit[n].data[127:96]; idx = ej_flit[n].data[7:0]; v = ej_flit[n].vc;
        check(dy * MX + dx == n, "delivered at its destination");
        if (idx == 0) cur_id[n][v] = id;
        check(idx == exp_idx[n][v] && id == cur_id[n][v], $sformatf("packet intact at %0d", n));
        exp_idx[n][v] = (idx + 1) % PKT_FLITS;
        rx_flits++;
        if (is_head(ej_flit[n])) last_head_t = cycle;
        if (is_tail(ej_flit[n])) rx_pkts++;
      end
    end
  end

  // send one packet from src to dst on VC vc
  task automatic send_pkt(input int src, input int dst, input int vc);
    int id;
    id = pkt_id++;
    for (int i = 0; i < PKT_FLITS; i++) begin
      flit_t f;
      f = '0;
      f.ftype = (i == 0) ? F_HEAD : (i == PKT_FLITS - 1) ? F_TAIL : F_BODY;
      f.vc = VC_W'(vc);
      f.dst_x = COORD_W'(dst % MX); f.dst_y = COORD_W'(dst / MX);
      f.route = ref_route(src % MX, src / MX, dst % MX, dst / MX);
      f.data = {32'(id), 88'(src), 8'(i)};
      while (cred[src][vc] == 0) @(negedge clk);
      cred[src][vc]--;
      inj_valid[src] = 1'b1; inj_flit[src] = f;
      @(negedge clk);
      inj_valid[src] = 1'b0;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog: %0d packets received", rx_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, s, d, hops;
    for (int n = 0; n < N; n++) begin
      inj_valid[n] = 0; inj_flit[n] = '0;
      for (int v = 0; v < NUM_VC; v++) cred[n][v] = BUF_DEPTH;
      for (int v = 0; v < NUM_VC; v++) begin exp_idx[n][v] = 0; cur_id[n][v] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // isolated packets: latency
    for (int k = 0; k < 4; k++) begin
      s = (k == 0) ? 0 : (k == 1) ? 63 : (k == 2) ? 9 : 27;
      d = (k == 0) ? 63 : (k == 1) ? 0 : (k == 2) ? 14 : 28;
      hops = (s % MX > d % MX ? s % MX - d % MX : d % MX - s % MX) +
             (s / MX > d / MX ? s / MX - d / MX : d / MX - s / MX);
      t0 = cycle;
      send_pkt(s, d, k % 2);
      repeat (40) @(negedge clk);
      check(last_head_t - t0 == 2 * hops + 1,
            $sformatf("%0d hops: head latency %0d", hops, last_head_t - t0));
    end
    check(rx_pkts == 4, "isolated packets delivered");

    // uniform random traffic from all nodes at once
    for (int n = 0; n < N; n++) begin
      fork
        automatic int src = n;
        begin
          for (int p = 0; p < PKTS_PER_NODE; p++) begin
            int dst;
            dst = $urandom_range(N - 1);
            if (dst == src) dst = (dst + 1) % N;
            send_pkt(src, dst, p % NUM_VC);
          end
        end
      join_none
    end
    wait (rx_pkts == 4 + N * PKTS_PER_NODE);
    repeat (5) @(negedge clk);
    check(rx_flits == PKT_FLITS * (4 + N * PKTS_PER_NODE), "every flit delivered once");
    $display("random traffic done at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
