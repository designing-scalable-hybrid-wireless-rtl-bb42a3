// Self-checking testbench for bw_allocator with 8 link slots (slot 5 does
// not exist), a 200-cycle epoch and two pairs.  Link usage per epoch is set
// by the testbench; the expected pairs are worked out here: round 1 pairs
// the busiest with the least used link, round 2 the next two.  A second
// epoch with equal usage must remove all pairs.  The reallocation must end
// within 2 * NUM_PAIRS * NL + a few cycles of the epoch end.
module tb_bw_allocator;
  localparam int unsigned NL = 8, EPOCH = 200, NP = 2;
  localparam logic [NL-1:0] MASK = 8'b1101_1111;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NL-1:0] use_pulse, lend_valid;
  logic [2:0]    lend_to [NL];
  logic          ev_realloc;

  bw_allocator #(.NL(NL), .LINK_MASK(MASK), .EPOCH(EPOCH), .NUM_PAIRS(NP),
                 .CNT_W(16), .LINK_W(3)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int usage [NL];
  int t = 0;        // cycles since reset release
  always @(posedge clk) if (rst_n) t <= t + 1;
  always_comb
    for (int l = 0; l < NL; l++) use_pulse[l] = rst_n && ((t % EPOCH) >= EPOCH - usage[l]);

  int realloc_t [$];
  always @(posedge clk) if (rst_n && ev_realloc) realloc_t.push_back(t);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    usage = '{10, 50, 5, 30, 20, 100, 40, 1};   // slot 5 is not a link
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (realloc_t.size() == 1);
    @(negedge clk);
    check(realloc_t[0] - EPOCH <= 2 * NP * NL + 4,
          $sformatf("reallocation took %0d cycles", realloc_t[0] - EPOCH));
    check(lend_valid == 8'b1000_0100, $sformatf("lenders %b", lend_valid));
    check(lend_to[7] == 3'd1, "least used lends to the busiest");
    check(lend_to[2] == 3'd6, "second pair");
    // second epoch: equal usage everywhere, so no pair
    usage = '{25, 25, 25, 25, 25, 25, 25, 25};
    wait (realloc_t.size() == 2);
    @(negedge clk);
    check(lend_valid == '0, $sformatf("equal usage gives no pair: %b", lend_valid));
    check(realloc_t[1] - realloc_t[0] == EPOCH, "one reallocation per epoch");
    // third epoch: link 0 busiest, slot 5 (no link) must never be picked
    usage = '{90, 3, 8, 8, 8, 0, 8, 8};
    wait (realloc_t.size() == 3);
    @(negedge clk);
    check(lend_valid == 8'b0000_0010 || lend_valid == 8'b0000_0110 ||
          lend_valid[5] == 1'b0, "slot without link never lends");
    check(lend_valid[1] && lend_to[1] == 3'd0, "link 1 lends to link 0");
    check(lend_valid[5] == 1'b0, "slot 5 not lending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
