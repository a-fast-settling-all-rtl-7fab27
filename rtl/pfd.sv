// pfd: phase frequency detector of the divider-less loop.
//
// The DCO frequency over the last reference period is FC_OUT = 12*cnt_delta + FD_OUT phase
// steps (one step = 1/12 DCO period), shifted to the Q12.4 format of FCW. The frequency error
// is FCW - FC_OUT and the phase error PFD_OUT is its running sum, i.e. the reference phase
// (FCW accumulated per cycle) minus the DCO phase. The sum is a register updated at the F_REF
// falling edge; pfd_out is its next value (combinational), so the loop filter uses this
// cycle's error at the same edge. While clear (INIT) is high the phase error is held at zero,
// so the loop restarts from the TCPC's estimate without stale phase. All sums saturate.
// The FC_OUT sum follows the published design; the Q12.4 format, the error accumulator and
// the clear are this design's choices. Reset: asynchronous, active low.
`timescale 1ps/1fs
module pfd
  import adpll_pkg::*;
(
  input  logic              fref,
  input  logic              rst_n,
  input  logic              clear,
  input  fcw_t              fcw,
  input  logic [CNT_W-1:0]  cnt_delta,
  input  fd_t               fd_out,
  output fcw_t              fc_out,
  output err_t              ferr,
  output err_t              pfd_out,
  output err_t              pe_q
);

  localparam int PE_MAX = (1 << (PE_W - 1)) - 1;

  function automatic err_t sat_err(input int v);
    if (v > PE_MAX)        return err_t'(PE_MAX);
    else if (v < -PE_MAX)  return err_t'(-PE_MAX);
    else                   return err_t'(v);
  endfunction

  always_comb begin
    int steps, fc_q, pe_sum;
    steps = int'(N_PHASES) * int'(cnt_delta) + int'(fd_out);
    fc_q  = steps <<< FCW_FRAC;
    if (fc_q < 0)                     fc_out = '0;
    else if (fc_q > (1 << FCW_W) - 1) fc_out = '1;
    else                              fc_out = fcw_t'(fc_q);
    ferr   = sat_err(int'(fcw) - int'(fc_out));
    pe_sum = int'(pe_q) + int'(ferr);
    pfd_out = clear ? '0 : sat_err(pe_sum);
  end

  always_ff @(negedge fref or negedge rst_n) begin
    if (!rst_n) pe_q <= '0;
    else        pe_q <= pfd_out;
  end

endmodule
