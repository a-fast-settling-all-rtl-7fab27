// freq_counter: coarse DCO frequency detector.
//
// A CNT_W-bit counter runs on DCO_OUT[0]. The edge detector marks one DCO cycle a fixed delay
// after each F_REF rising edge, and the counter value is copied to cnt_latched on that cycle.
// The copy is stable long before the next F_REF falling edge, where the F_REF domain keeps the
// previous copy; cnt_delta = cnt_latched - previous copy (mod 2^CNT_W) is the number of DCO
// periods in the last reference period, the integer part of the frequency code. cnt_delta is
// valid from shortly after an F_REF rising edge until the following falling edge, where the
// phase frequency detector samples it. 10 bits follow the published design; the split of
// the latch and difference between the two clock domains is this design's choice.
// Reset: asynchronous, active low.
`timescale 1ps/1fs
module freq_counter #(
  parameter int CNT_W = 10
) (
  input  logic             dco_clk,
  input  logic             fref,
  input  logic             rst_n,
  output logic [CNT_W-1:0] cnt_latched,
  output logic [CNT_W-1:0] cnt_delta
);

  logic             latch_en;
  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] cnt_prev;

  edge_detector u_edge (
    .dco_clk  (dco_clk),
    .rst_n    (rst_n),
    .fref     (fref),
    .latch_en (latch_en)
  );

  always_ff @(posedge dco_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt         <= '0;
      cnt_latched <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (latch_en) cnt_latched <= cnt;
    end
  end

  // F_REF domain: previous latched value, updated at the falling edge
  always_ff @(negedge fref or negedge rst_n) begin
    if (!rst_n) cnt_prev <= '0;
    else        cnt_prev <= cnt_latched;
  end

  assign cnt_delta = cnt_latched - cnt_prev;

endmodule
