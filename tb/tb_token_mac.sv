// Self-checking testbench for token_mac: no lending without a pairing, the
// owner keeps the token while it has traffic, the token reaches the
// borrower one hop (TOKEN_LAT) after the owner goes quiet, the borrower
// keeps it for a whole packet and then returns it, an idle borrower returns
// it at once, and the two grants are never high together.
module tb_token_mac;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cfg_valid, ch_idle, owner_want, borrower_want, borrower_start, borrower_tail;
  logic [4:0] cfg_borrower, borrower;
  logic owner_grant, borrower_grant, lent, ev_pass;

  token_mac #(.LINK_W(5), .TOKEN_LAT(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always @(posedge clk) if (rst_n) check(!(owner_grant && borrower_grant), "exclusive grant");

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wait_cycles;
    cfg_valid = 0; cfg_borrower = 5'd9; ch_idle = 1; owner_want = 0;
    borrower_want = 1; borrower_start = 0; borrower_tail = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(owner_grant && !borrower_grant && !ev_pass, "no pairing: owner only");

    cfg_valid = 1; owner_want = 1;
    repeat (3) @(negedge clk);
    check(lent && borrower == 5'd9, "pairing taken over");
    check(owner_grant && !ev_pass, "busy owner keeps the token");
    cfg_borrower = 5'd4;   // new pairing while the owner holds the token
    @(negedge clk);
    check(borrower == 5'd4, "re-pairing at the owner");

    owner_want = 0;
    #1 check(ev_pass, "quiet owner passes the token");
    @(negedge clk);
    cfg_borrower = 5'd11;  // must not be taken while the token is away
    check(!owner_grant && !borrower_grant, "token in flight");
    @(negedge clk);
    check(borrower_grant && !owner_grant, "borrower holds the token after one hop");
    // borrower sends a head, then a body (channel busy in between), keeps token
    borrower_start = 1; borrower_tail = 0;
    @(negedge clk);
    borrower_start = 0; ch_idle = 0; owner_want = 1;
    repeat (3) @(negedge clk);
    check(!owner_grant, "owner waits while the borrower holds the token");
    ch_idle = 1;
    #1 check(borrower_grant, "borrower still holds the token");
    borrower_start = 1; borrower_tail = 1;     // tail: give the token back
    @(negedge clk);
    borrower_start = 0; borrower_tail = 0;
    check(!owner_grant && !borrower_grant, "token returning");
    check(borrower == 5'd4, "pairing kept while token away");
    @(negedge clk);
    check(owner_grant, "owner has the token back");
    @(negedge clk);
    check(borrower == 5'd11, "pending pairing taken at the owner");

    // borrower without traffic hands the token straight back
    owner_want = 0; borrower_want = 1;
    @(negedge clk);           // pass
    borrower_want = 0;
    @(negedge clk);           // in flight
    wait_cycles = 0;
    while (!owner_grant && wait_cycles < 10) begin @(negedge clk); wait_cycles++; end
    check(wait_cycles == 2, $sformatf("idle borrower returned the token after %0d", wait_cycles));

    cfg_valid = 0;
    repeat (2) @(negedge clk);
    borrower_want = 1;
    repeat (3) @(negedge clk);
    check(owner_grant && !lent, "pairing removed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
