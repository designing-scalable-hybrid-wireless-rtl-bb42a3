// End-to-end testbench of hybrid_noc_top at the default 8x8 / 2x4 size with
// a shortened epoch (1500 cycles) so that bandwidth reallocation, token
// passing and borrowed-channel transmission happen during the run.  The
// traffic and the checks are in tb_top_body.svh.
module tb_hybrid_noc_top;
  import hnoc_pkg::*;
  localparam int MX = 8, MY = 8, WX = 2, WY = 4, MC_PLACE = 1;
  localparam int N = MX * MY, NMC = WX * WY, NL = 4 * NMC;
  localparam int TB_CYCLES = 4000, TB_MIN_REALLOC = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  hop_th;
  logic [3:0]  l_th;
  logic [15:0] w_th;
  logic        mc_valid [NMC];
  flit_t       mc_flit  [NMC];
  logic        mc_ready [NMC];
  logic        rep_ej_valid [N];
  flit_t       rep_ej_flit  [N];
  credit_t     rep_ej_credit[N];
  logic        req_inj_valid [N];
  flit_t       req_inj_flit  [N];
  credit_t     req_inj_credit[N];
  logic        req_ej_valid  [N];
  flit_t       req_ej_flit   [N];
  credit_t     req_ej_credit [N];
  logic [NMC-1:0] ev_to_wireless, ev_near_wired, ev_lth_divert, ev_reinject, ev_timeout;
  logic [NL-1:0]  ev_borrow_tx, ev_token_pass;
  logic           ev_realloc;

  hybrid_noc_top #(.EPOCH(1500)) dut (.*);

  initial begin
    #((TB_CYCLES + 20000) * 10);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  `include "tb_top_body.svh"
endmodule
