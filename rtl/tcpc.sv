// tcpc: temperature compensation PLL controller, the sequencer (tcpc_controller) and the
// estimation block (tcpc_estimator) of the published design wired together.
//
// Inputs are FCW, the measured FC_OUT and the loop filter's OTW; outputs are INIT, which hands
// the DCO over from the loop filter to OTW_INIT, and OTW_INIT itself. The estimator starts on
// FLAG_EST with the captured OTW_LOCK, FC_OUT and target FCW and its result is put out while
// FLAG_OTW is high. The sweep sample stream and coefficient inputs connect to the external
// calibration processor. Clocked at the F_REF falling edge. Reset: asynchronous, active low.
`timescale 1ps/1fs
module tcpc
  import adpll_pkg::*;
(
  input  logic        fref,
  input  logic        rst_n,
  input  logic        en,
  input  logic        cal_start,
  input  dco_coef_t   coef,
  input  logic        coef_valid,
  input  fcw_t        fcw,
  input  fcw_t        fc_out,
  input  otw_t        otw_dlf,
  output logic        init,
  output otw_t        otw_init,
  output logic        flag_est,
  output logic        flag_otw,
  output otw_t        otw_est,
  output tcpc_state_t state,
  output cal_sample_t cal,
  output logic        cal_done
);

  otw_t otw_lock;
  fcw_t fc_lock, fcw_target;
  logic est_valid;

  tcpc_controller u_ctrl (
    .fref       (fref),
    .rst_n      (rst_n),
    .en         (en),
    .cal_start  (cal_start),
    .coef_valid (coef_valid),
    .fcw        (fcw),
    .fc_out     (fc_out),
    .otw_dlf    (otw_dlf),
    .otw_est    (otw_est),
    .est_valid  (est_valid),
    .state      (state),
    .init       (init),
    .otw_init   (otw_init),
    .flag_est   (flag_est),
    .flag_otw   (flag_otw),
    .otw_lock   (otw_lock),
    .fc_lock    (fc_lock),
    .fcw_target (fcw_target),
    .cal        (cal),
    .cal_done   (cal_done)
  );

  tcpc_estimator u_est (
    .fref     (fref),
    .rst_n    (rst_n),
    .start    (flag_est),
    .coef     (coef),
    .otw_lock (otw_lock),
    .fc_out   (fc_lock),
    .fcw      (fcw_target),
    .otw_est  (otw_est),
    .valid    (est_valid)
  );

endmodule
