// Self-checking testbench for wl_router at cluster (0,1).  Checks routing on
// the destination cluster, ejection at the destination cluster, use of the
// private channel first and of the borrowed channel when only it is free,
// that nothing is sent when neither is free while `want` reports the
// waiting flit, and the W_th rule: a head blocked for wait_th cycles is
// ejected to the local port.
module tb_wl_router;
  import hnoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        in_valid [NPORT];
  flit_t       in_flit  [NPORT];
  credit_t     in_credit[NPORT];
  logic        priv_start[NPORT], brw_start[NPORT], priv_free[NPORT], brw_free[NPORT];
  flit_t       tx_flit  [NPORT];
  credit_t     out_credit[NPORT];
  logic        want[NPORT], use_pulse[NPORT];
  logic        ev_timeout;
  logic [15:0] wait_th;

  logic [COORD_W-1:0] my_x = '0, my_y = COORD_W'(1);
  wl_router dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int n_priv [NPORT], n_brw [NPORT], n_use [NPORT], n_to;
  flit_t last [NPORT];
  int ej_t;
  always @(posedge clk) if (!rst_n) begin
    for (int p = 0; p < NPORT; p++) out_credit[p] <= '0;
  end else begin
    for (int p = 0; p < NPORT; p++) begin
      if (priv_start[p]) begin n_priv[p]++; last[p] = tx_flit[p]; end
      if (brw_start[p])  begin n_brw[p]++;  last[p] = tx_flit[p]; end
      if (use_pulse[p]) n_use[p]++;
      out_credit[p] <= '{valid: priv_start[p] | brw_start[p], vc: tx_flit[p].vc};
    end
    if (priv_start[0]) ej_t = cycle;
    n_to += ev_timeout;
  end

  task automatic send(input int p, input int cx, input int cy, input ftype_e t,
                      input port_e route);
    in_flit[p] = '0;
    in_flit[p].ftype = t; in_flit[p].route = route;
    in_flit[p].dst_cx = COORD_W'(cx); in_flit[p].dst_cy = COORD_W'(cy);
    in_valid[p] = 1'b1;
    @(negedge clk);
    in_valid[p] = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    for (int p = 0; p < NPORT; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; priv_free[p] = 1; brw_free[p] = 0;
      n_priv[p] = 0; n_brw[p] = 0; n_use[p] = 0;
    end
    n_to = 0;
    wait_th = 16'd0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // private channel east, lookahead route at cluster (1,1) is local
    send(P_LOCAL, 1, 1, F_HEADTAIL, P_EAST);
    @(negedge clk);
    check(n_priv[P_EAST] == 1 && n_brw[P_EAST] == 0, "private channel used");
    check(last[P_EAST].route == P_LOCAL, "lookahead route for (1,1)");
    // borrowed channel only
    priv_free[P_EAST] = 0; brw_free[P_EAST] = 1;
    send(P_LOCAL, 1, 1, F_HEADTAIL, P_EAST);
    @(negedge clk);
    check(n_brw[P_EAST] == 1 && n_priv[P_EAST] == 1, "borrowed channel used");
    // both busy: flit waits, want is high
    brw_free[P_EAST] = 0;
    send(P_LOCAL, 1, 3, F_HEADTAIL, P_EAST);
    repeat (5) @(negedge clk);
    check(want[P_EAST] && n_priv[P_EAST] + n_brw[P_EAST] == 2, "blocked flit waits");
    priv_free[P_EAST] = 1;
    @(negedge clk);
    check(n_priv[P_EAST] == 2 && last[P_EAST].route == P_SOUTH, "sent when free; route (1,1)->(1,3)");
    check(n_use[P_EAST] == 3, "usage pulses");
    // ejection at the destination cluster, from the north input
    send(P_NORTH, 0, 1, F_HEADTAIL, P_LOCAL);
    @(negedge clk);
    check(n_priv[P_LOCAL] == 1 && n_use[P_LOCAL] == 0, "ejected at destination cluster");
    // W_th: south output blocked, head ejected after wait_th cycles
    wait_th = 16'd20;
    priv_free[P_SOUTH] = 0;
    t0 = cycle;
    send(P_LOCAL, 0, 3, F_HEAD, P_SOUTH);
    send(P_LOCAL, 0, 3, F_TAIL, P_SOUTH);
    repeat (40) @(negedge clk);
    check(n_priv[P_SOUTH] == 0, "nothing on blocked south output");
    check(n_priv[P_LOCAL] == 3 && n_to == 1, "W_th ejection of the whole packet");
    check(ej_t - t0 >= 20 && ej_t - t0 <= 23, $sformatf("timeout after %0d cycles", ej_t - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
