// "Borrow from the Rich" adaptive wireless bandwidth allocation.
//
// Every link starts with one private channel of equal bandwidth.  The
// allocator counts the flits each wireless link sends (use[l] pulses).  At
// the end of every epoch of EPOCH cycles it freezes the counts, clears the
// live counters and builds NUM_PAIRS borrower/lender pairs: in each round it
// scans the links not yet picked for the most used one (borrowing pool) and
// the least used one (lending pool) and, if the first is strictly busier,
// lends the second's channel to the first.  Each scan visits one link per
// cycle, so a reallocation takes 2 * NUM_PAIRS * NL cycles, far less than an
// epoch; the counters keep counting meanwhile.  When the rounds are done the
// new pairing replaces the old one on lend_valid/lend_to, indexed by the
// lending link (its channel), and ev_realloc pulses.
//
// Epoch length (50000 cycles) and the pooling idea follow the design; the
// pool size of 3 (the three most and least used links the design tracks),
// the flit count as usage measure, the sequential scan and tie breaking
// (lowest index) are this implementation's choices.  LINK_MASK marks which
// of the NL link slots exist.
module bw_allocator #(
  parameter int unsigned    NL        = 32,
  parameter logic [NL-1:0]  LINK_MASK = '1,
  parameter int unsigned    EPOCH     = 50000,
  parameter int unsigned    NUM_PAIRS = 3,
  parameter int unsigned    CNT_W     = 16,
  parameter int unsigned    LINK_W    = $clog2(NL)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NL-1:0]     use_pulse,
  output logic [NL-1:0]     lend_valid,
  output logic [LINK_W-1:0] lend_to [NL],
  output logic              ev_realloc
);
  typedef enum logic [1:0] {S_IDLE, S_MAX, S_MIN, S_PAIR} astate_e;

  logic [CNT_W-1:0]  live [NL];
  logic [CNT_W-1:0]  snap [NL];
  logic [31:0]       epoch_cnt;
  logic              epoch_end;
  astate_e           state;
  logic [LINK_W-1:0] idx, best_max, best_min;
  logic              have_max, have_min;
  logic [NL-1:0]     picked;
  logic [$clog2(NUM_PAIRS+1)-1:0] round;
  logic [NL-1:0]     new_valid;
  logic [LINK_W-1:0] new_to [NL];

  assign epoch_end = (epoch_cnt == 32'(EPOCH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epoch_cnt <= '0;
      for (int l = 0; l < NL; l++) live[l] <= '0;
    end else begin
      epoch_cnt <= epoch_end ? '0 : epoch_cnt + 1'b1;
      for (int l = 0; l < NL; l++) begin
        if (epoch_end)         live[l] <= '0;
        else if (use_pulse[l] && live[l] != '1) live[l] <= live[l] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      idx        <= '0;
      best_max   <= '0;
      best_min   <= '0;
      have_max   <= 1'b0;
      have_min   <= 1'b0;
      picked     <= '0;
      round      <= '0;
      new_valid  <= '0;
      lend_valid <= '0;
      ev_realloc <= 1'b0;
      for (int l = 0; l < NL; l++) begin
        snap[l] <= '0; new_to[l] <= '0; lend_to[l] <= '0;
      end
    end else begin
      ev_realloc <= 1'b0;
      case (state)
        S_IDLE: if (epoch_end) begin
          for (int l = 0; l < NL; l++) snap[l] <= live[l];
          picked    <= ~LINK_MASK;
          new_valid <= '0;
          round     <= '0;
          idx       <= '0;
          have_max  <= 1'b0;
          state     <= S_MAX;
        end
        S_MAX: begin
          if (!picked[idx] && (!have_max || snap[idx] > snap[best_max])) begin
            best_max <= idx;
            have_max <= 1'b1;
          end
          if (idx == LINK_W'(NL - 1)) begin
            idx      <= '0;
            have_min <= 1'b0;
            state    <= S_MIN;
          end else idx <= idx + 1'b1;
        end
        S_MIN: begin
          if (!picked[idx] && (idx != best_max) &&
              (!have_min || snap[idx] < snap[best_min])) begin
            best_min <= idx;
            have_min <= 1'b1;
          end
          if (idx == LINK_W'(NL - 1)) begin
            idx   <= '0;
            state <= S_PAIR;
          end else idx <= idx + 1'b1;
        end
        S_PAIR: begin
          if (have_max && have_min && snap[best_max] > snap[best_min]) begin
            new_valid[best_min] <= 1'b1;
            new_to[best_min]    <= best_max;
            picked[best_max]    <= 1'b1;
            picked[best_min]    <= 1'b1;
          end
          have_max <= 1'b0;
          if (round == $bits(round)'(NUM_PAIRS - 1) || !(have_max && have_min)) begin
            state      <= S_IDLE;
            lend_valid <= new_valid;
            ev_realloc <= 1'b1;
            if (have_max && have_min && snap[best_max] > snap[best_min])
              lend_valid[best_min] <= 1'b1;
            for (int l = 0; l < NL; l++) lend_to[l] <= new_to[l];
            if (have_max && have_min && snap[best_max] > snap[best_min])
              lend_to[best_min] <= best_max;
          end else begin
            round <= round + 1'b1;
            state <= S_MAX;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
