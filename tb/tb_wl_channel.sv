// Self-checking testbench for wl_channel: a flit appears at the receiver
// exactly LAT cycles after it was sent, the channel refuses a second flit
// while busy, accepts the next one LAT cycles after the first (one flit per
// LAT cycles) and carries the link tag with the flit.
module tb_wl_channel;
  import hnoc_pkg::*;
  localparam int unsigned LAT = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, idle, rx_valid;
  flit_t tx_flit, rx_flit;
  logic [4:0] tx_tag, rx_tag;

  wl_channel #(.LAT(LAT), .TAG_W(5)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int rx_cycle [$];
  flit_t rx_f [$];
  logic [4:0] rx_g [$];
  always @(posedge clk) if (rx_valid) begin
    rx_cycle.push_back(cycle); rx_f.push_back(rx_flit); rx_g.push_back(rx_tag);
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1, busy_cycles;
    start = 1'b0; tx_flit = '0; tx_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(idle, "idle after reset");
    // send flit A, then try to send B every cycle until accepted
    tx_flit = '0; tx_flit.data = 128'hA5A5; tx_tag = 5'd7; start = 1'b1;
    t0 = cycle;
    @(negedge clk);
    start = 1'b0;
    tx_flit.data = 128'hB6B6; tx_tag = 5'd3;
    busy_cycles = 0;
    while (!idle) begin busy_cycles++; @(negedge clk); end
    start = 1'b1;
    t1 = cycle;
    @(negedge clk);
    start = 1'b0;
    repeat (2 * LAT + 2) @(negedge clk);
    check(busy_cycles == LAT - 1, $sformatf("busy for %0d cycles", busy_cycles));
    check(t1 - t0 == LAT, "next flit accepted LAT cycles later");
    check(rx_cycle.size() == 2, $sformatf("%0d flits received", rx_cycle.size()));
    if (rx_cycle.size() == 2) begin
      check(rx_cycle[0] - t0 == LAT, $sformatf("latency %0d", rx_cycle[0] - t0));
      check(rx_cycle[1] - t1 == LAT, "second latency");
      check(rx_f[0].data == 128'hA5A5 && rx_g[0] == 5'd7, "first flit and tag");
      check(rx_f[1].data == 128'hB6B6 && rx_g[1] == 5'd3, "second flit and tag");
    end
    check(idle, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
