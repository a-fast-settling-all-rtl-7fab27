// loop_filter: proportional-integral digital loop filter with gain shift.
//
// At every F_REF falling edge the accumulator, which is the filter output OTW in Q8.8, moves
// by Ka*ferr + Kb*pfd_out. The gains follow the phase error: when |pfd_out| exceeds
// GAIN_THRESHOLD phase steps the coarse gains Ka = 2^-1, Kb = 2^-3 are used, otherwise the fine
// gains Ka = 2^-3, Kb = 2^-5 (threshold and gains as published). Before the gains, an error of
// one phase step counts as 2^-(3) OTW LSB (ERR_SCALE_SHIFT converts Q12.4 error into Q8.8
// OTW with that weight); this scale, chosen for a stable loop with the two-cycle delay from
// OTW to measured frequency, is this design's choice, as are the saturation to 0..255.996
// and the use of Ka on frequency error and Kb on phase error. While INIT is high the
// accumulator loads OTW_INIT, so the loop resumes from the TCPC's value when INIT falls.
// With the fine gains the loop is lightly damped; with FC_OUT quantised to one phase step it
// can hold a slow limit cycle of about +-4 phase steps that briefly touches the coarse gains.
// Reset: asynchronous, active low, to RESET_OTW.
`timescale 1ps/1fs
module loop_filter
  import adpll_pkg::*;
#(
  parameter int   GAIN_THRESHOLD  = 3 << FCW_FRAC,  // 3 phase steps in Q12.4
  parameter int   KA_COARSE_SHIFT = 1,
  parameter int   KB_COARSE_SHIFT = 3,
  parameter int   KA_FINE_SHIFT   = 3,
  parameter int   KB_FINE_SHIFT   = 5,
  parameter int   ERR_SCALE_SHIFT = 1,
  parameter otw_t RESET_OTW       = otw_t'(128 << OTW_FRAC)
) (
  input  logic fref,
  input  logic rst_n,
  input  logic init,
  input  otw_t otw_init,
  input  err_t ferr,
  input  err_t pfd_out,
  output otw_t otw_dlf,
  output logic coarse
);

  localparam int OTW_TOP = (1 << OTW_W) - 1;

  otw_t acc_next;

  always_comb begin
    int pe_mag, fe, pe, step, sum;
    pe_mag = (pfd_out < 0) ? -int'(pfd_out) : int'(pfd_out);
    coarse = pe_mag > GAIN_THRESHOLD;
    fe     = int'(ferr)    <<< ERR_SCALE_SHIFT;
    pe     = int'(pfd_out) <<< ERR_SCALE_SHIFT;
    if (coarse) step = (fe >>> KA_COARSE_SHIFT) + (pe >>> KB_COARSE_SHIFT);
    else        step = (fe >>> KA_FINE_SHIFT)   + (pe >>> KB_FINE_SHIFT);
    sum = int'(otw_dlf) + step;
    if (init)              acc_next = otw_init;
    else if (sum < 0)      acc_next = '0;
    else if (sum > OTW_TOP) acc_next = '1;
    else                   acc_next = otw_t'(sum);
  end

  always_ff @(negedge fref or negedge rst_n) begin
    if (!rst_n) otw_dlf <= RESET_OTW;
    else        otw_dlf <= acc_next;
  end

endmodule
