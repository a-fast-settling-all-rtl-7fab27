// adpll_top: fast-settling, divider-less, fractional-N all-digital PLL with a ring DCO and a
// temperature compensated OTW estimator (TCPC).
//
// The DCO's 12 phases feed two phase detectors: a 10-bit counter on DCO_OUT[0], latched by the
// edge detector a few DCO cycles after each F_REF rising edge, and the phase converter, which
// latches all 12 phases at the F_REF rising edge and decodes them into a phase code with 1/12
// period resolution. At the F_REF falling edge the PFD forms the measured frequency FC_OUT and
// the frequency and phase errors against FCW, the gain-shifting PI loop filter updates the OTW,
// and the TCPC sequencer advances. At the next rising edge the selector and register in front
// of the DCO apply either the filter's OTW or, while INIT is high, the TCPC's OTW_INIT.
// When FCW changes, the TCPC freezes the loop for seven reference cycles, estimates the OTW of
// the new frequency from the locked point and the DCO model a, b, c, d, and restarts the loop
// there. A sweep of all OTW values (cal_start) gives the external processor the points it fits
// a, b, c, d to.
//
// The DCO is the behavioural model dco_model (analog in silicon); temp_c is its temperature
// and exists for simulation. Everything else is synthesizable. Latency: an OTW change applied
// at a rising edge is measured over that reference period and corrected at the second rising
// edge after it. Reset: asynchronous, active low.
`timescale 1ps/1fs
module adpll_top
  import adpll_pkg::*;
(
  input  logic                fref,
  input  logic                rst_n,
  input  fcw_t                fcw,
  input  logic signed [7:0]   temp_c,
  input  logic                tcpc_en,
  input  logic                cal_start,
  input  dco_coef_t           coef,
  input  logic                coef_valid,
  output cal_sample_t         cal,
  output logic                cal_done,
  output logic [N_PHASES-1:0] dco_out,
  output otw_t                otw,
  output logic                init,
  output tcpc_state_t         tcpc_state,
  output err_t                pfd_out,
  output fcw_t                fc_out,
  output logic                coarse,
  output logic                latch_err
);

  logic [CNT_W-1:0]   cnt_latched, cnt_delta;
  logic [PHASE_W-1:0] pc_out;
  fd_t                fd_out;
  err_t               ferr, pe_q;
  otw_t               otw_dlf, otw_init, otw_est;
  logic               flag_est, flag_otw;

  dco_model u_dco (
    .otw     (otw),
    .temp_c  (temp_c),
    .dco_out (dco_out)
  );

  freq_counter #(.CNT_W(CNT_W)) u_cnt (
    .dco_clk     (dco_out[0]),
    .fref        (fref),
    .rst_n       (rst_n),
    .cnt_latched (cnt_latched),
    .cnt_delta   (cnt_delta)
  );

  phase_converter #(.N_PHASES(N_PHASES), .PHASE_W(PHASE_W), .FD_W(FD_W)) u_pc (
    .fref      (fref),
    .rst_n     (rst_n),
    .dco_out   (dco_out),
    .pc_out    (pc_out),
    .fd_out    (fd_out),
    .latch_err (latch_err)
  );

  pfd u_pfd (
    .fref      (fref),
    .rst_n     (rst_n),
    .clear     (init),
    .fcw       (fcw),
    .cnt_delta (cnt_delta),
    .fd_out    (fd_out),
    .fc_out    (fc_out),
    .ferr      (ferr),
    .pfd_out   (pfd_out),
    .pe_q      (pe_q)
  );

  loop_filter u_dlf (
    .fref     (fref),
    .rst_n    (rst_n),
    .init     (init),
    .otw_init (otw_init),
    .ferr     (ferr),
    .pfd_out  (pfd_out),
    .otw_dlf  (otw_dlf),
    .coarse   (coarse)
  );

  tcpc u_tcpc (
    .fref       (fref),
    .rst_n      (rst_n),
    .en         (tcpc_en),
    .cal_start  (cal_start),
    .coef       (coef),
    .coef_valid (coef_valid),
    .fcw        (fcw),
    .fc_out     (fc_out),
    .otw_dlf    (otw_dlf),
    .init       (init),
    .otw_init   (otw_init),
    .flag_est   (flag_est),
    .flag_otw   (flag_otw),
    .otw_est    (otw_est),
    .state      (tcpc_state),
    .cal        (cal),
    .cal_done   (cal_done)
  );

  otw_register u_reg (
    .fref     (fref),
    .rst_n    (rst_n),
    .init     (init),
    .otw_init (otw_init),
    .otw_dlf  (otw_dlf),
    .otw      (otw)
  );

endmodule
