// Timing model of one wireless channel (one carrier frequency), as digital
// logic: the serialise / modulate / radiate / demodulate path between a
// transmitter and the receivers tuned to the channel.
//
// A 128-bit flit at the channel's 20 Gb/s takes 6.4 ns, which at the 1.4 GHz
// network clock rounds up to LAT = 9 cycles; the channel is occupied for
// that whole time.  A flit accepted at clock edge t (`start` high while
// `idle`) is shown on rx_valid/rx_flit/rx_tag during the cycle before edge
// t+LAT, so a receiver buffers it at edge t+LAT, and the next flit may start
// at that same edge: one flit per LAT cycles, LAT cycles of latency.
// `tag` names the link the flit belongs to, so that the receiver of a
// borrowing link can pick its flits out of a channel it shares.  The
// 9-cycle figure follows the design's configuration; the tag is this
// implementation's choice.  The analog parts of the transceiver are not
// modelled.
module wl_channel
  import hnoc_pkg::*;
#(
  parameter int unsigned LAT   = 9,
  parameter int unsigned TAG_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  flit_t            tx_flit,
  input  logic [TAG_W-1:0] tx_tag,
  output logic             idle,
  output logic             rx_valid,
  output flit_t            rx_flit,
  output logic [TAG_W-1:0] rx_tag
);
  localparam int unsigned CW = $clog2(LAT + 1);
  logic [CW-1:0] cnt;

  assign rx_valid = (cnt == CW'(1));
  assign idle     = (cnt <= CW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      rx_tag <= '0;
    end else if (start && idle) begin
      cnt    <= CW'(LAT);
      rx_tag <= tx_tag;
    end else if (cnt != '0) begin
      cnt <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) if (start && idle) rx_flit <= tx_flit;

  assert property (@(posedge clk) disable iff (!rst_n) start |-> idle)
    else $error("wl_channel: transmission started on a busy channel");
endmodule
