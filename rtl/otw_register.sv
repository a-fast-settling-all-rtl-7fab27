// otw_register: the selector between the TCPC and the loop filter and the register in front of
// the DCO.
//
// While INIT is high the TCPC's OTW_INIT drives the DCO directly, otherwise the loop filter
// output. The selected word is latched at the F_REF rising edge, half a reference period after
// the loop filter and PFD update at the falling edge, so the DCO control changes only on
// rising edges and the half-cycle gives the filter its setup time. Both follow the published
// design; the reset value RESET_OTW is this design's choice. Reset: asynchronous, active low.
`timescale 1ps/1fs
module otw_register
  import adpll_pkg::*;
#(
  parameter otw_t RESET_OTW = otw_t'(128 << OTW_FRAC)
) (
  input  logic fref,
  input  logic rst_n,
  input  logic init,
  input  otw_t otw_init,
  input  otw_t otw_dlf,
  output otw_t otw
);

  otw_t sel;
  assign sel = init ? otw_init : otw_dlf;

  always_ff @(posedge fref or negedge rst_n) begin
    if (!rst_n) otw <= RESET_OTW;
    else        otw <= sel;
  end

endmodule
