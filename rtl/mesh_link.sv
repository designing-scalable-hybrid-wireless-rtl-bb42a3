// One wired mesh link: the 1-cycle link register for flits in one direction
// and the register for the credits going back the other way.  The 1-cycle
// link latency follows the design's configuration; registering the credit
// path as well is this implementation's choice.  Both registers load every
// cycle; only the valid bits are reset.
module mesh_link
  import hnoc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    up_valid,
  input  flit_t   up_flit,
  output credit_t up_credit,
  output logic    dn_valid,
  output flit_t   dn_flit,
  input  credit_t dn_credit
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_valid  <= 1'b0;
      up_credit <= '0;
    end else begin
      dn_valid  <= up_valid;
      up_credit <= dn_credit;
    end
  end
  always_ff @(posedge clk) dn_flit <= up_flit;
endmodule
