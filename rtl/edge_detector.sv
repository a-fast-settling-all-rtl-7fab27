// edge_detector: produces the latch timing of the DCO counter, ReF_REF, away from the F_REF
// rising edge.
//
// F_REF is asynchronous to DCO_OUT[0]. It is passed through SYNC_STAGES flops clocked by
// DCO_OUT[0] and its rising edge is detected there; latch_en is high for exactly one DCO cycle,
// SYNC_STAGES..SYNC_STAGES+1 DCO cycles after the F_REF rising edge. The counter latches on the
// DCO edge that ends that cycle, so the latch never coincides with the F_REF edge. The
// published design gates DCO_OUT[0] into a clock; here the same pulse is a clock enable, which
// keeps the counter latch in the DCO clock domain. Reset: asynchronous, active low.
`timescale 1ps/1fs
module edge_detector #(
  parameter int SYNC_STAGES = 2
) (
  input  logic dco_clk,    // DCO_OUT[0]
  input  logic rst_n,
  input  logic fref,
  output logic latch_en    // ReF_REF as a one-cycle enable
);

  logic [SYNC_STAGES:0] sync;   // sync[SYNC_STAGES] is the previous synchronised value

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[SYNC_STAGES-1:0], fref};
  end

  assign latch_en = sync[SYNC_STAGES-1] & ~sync[SYNC_STAGES];

endmodule
