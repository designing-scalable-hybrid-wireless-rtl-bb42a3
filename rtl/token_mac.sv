// Token-passing medium access control for one wireless channel.
//
// Every channel belongs to one link (its owner).  When the bandwidth
// allocator pairs the channel with a borrowing link, the owner's router and
// the borrower's router form a two-member token ring: only the token holder
// may transmit.  The owner keeps the token while it has traffic; when it has
// nothing to send, the channel is free and the borrower has a flit waiting,
// it passes the token to the borrower over the control network.  The
// borrower sends one packet (up to and including its tail flit), or stops
// when it has nothing more, and hands the token back.  Each token hop takes
// TOKEN_LAT cycles.  The pairing (cfg_*) is taken over only while the owner
// holds the token, so a change of pairing never strands the token.
//
// Owner priority, the two-member ring, one packet per token visit and the
// 1-cycle token hop are this implementation's reading of the design's
// description; the token ring itself follows it.
module token_mac #(
  parameter int unsigned LINK_W    = 5,
  parameter int unsigned TOKEN_LAT = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_valid,      // channel is lent
  input  logic [LINK_W-1:0] cfg_borrower,   // ... to this link
  input  logic              ch_idle,
  input  logic              owner_want,
  input  logic              borrower_want,
  input  logic              borrower_start, // borrower began a flit here
  input  logic              borrower_tail,  // ... and it was a tail flit
  output logic              owner_grant,
  output logic              borrower_grant,
  output logic              lent,           // pairing in force
  output logic [LINK_W-1:0] borrower,
  output logic              ev_pass         // token sent to the borrower
);
  typedef enum logic [1:0] {T_OWN, T_TO_BRW, T_BRW, T_TO_OWN} tstate_e;
  tstate_e state;
  logic [$clog2(TOKEN_LAT+1)-1:0] hop;

  assign owner_grant    = (state == T_OWN) && ch_idle;
  assign borrower_grant = (state == T_BRW) && ch_idle;
  assign ev_pass        = (state == T_OWN) && lent && !owner_want && ch_idle && borrower_want;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_OWN;
      hop      <= '0;
      lent     <= 1'b0;
      borrower <= '0;
    end else begin
      case (state)
        T_OWN: begin
          if (ev_pass) begin
            state <= T_TO_BRW;
            hop   <= '0;
          end else begin
            lent     <= cfg_valid;
            borrower <= cfg_borrower;
          end
        end
        T_TO_BRW, T_TO_OWN: begin
          if (hop == $bits(hop)'(TOKEN_LAT - 1))
            state <= (state == T_TO_BRW) ? T_BRW : T_OWN;
          else
            hop <= hop + 1'b1;
        end
        T_BRW: begin
          if ((borrower_start && borrower_tail) ||
              (!borrower_start && !borrower_want && ch_idle)) begin
            state <= T_TO_OWN;
            hop   <= '0;
          end
        end
        default: state <= T_OWN;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(owner_grant && borrower_grant))
    else $error("token_mac: two token holders");
  assert property (@(posedge clk) disable iff (!rst_n) borrower_start |-> borrower_grant)
    else $error("token_mac: borrower sent without the token");
endmodule
