// adpll_pkg: widths, fixed-point formats and shared types of the fast-settling ADPLL.
//
// Number formats used throughout the design:
//   * FCW and FC_OUT: unsigned Q12.4, in DCO phase steps per reference period. One phase step
//     is 1/12 of a DCO period (12-phase ring), so 2.4 GHz at a 15 MHz reference is 1920.0.
//   * OTW: unsigned Q8.8. The integer part is the 0..255 tuning range (OTW_MAX = 255), the
//     whole word drives the 16-bit current source of the DCO.
//   * Phase error and frequency error: signed, same scaling as FCW (4 fraction bits).
//   * Estimator coefficients a, b, c, d of the DCO model NF = (a*OTW+b)/(c*OTW+d): unsigned Q6.10.
// The 12 phases, the 10-bit counter, the 4-bit phase code, the 16-bit FCW and OTW, OTW_MAX,
// the gain-shift threshold and gains and the seven-cycle TCPC sequence follow the published
// design; the fraction widths are this implementation's choice.
`timescale 1ps/1fs
package adpll_pkg;

  localparam int unsigned N_PHASES  = 12;
  localparam int unsigned CNT_W     = 10;
  localparam int unsigned PHASE_W   = 4;
  localparam int unsigned FCW_W     = 16;
  localparam int unsigned FCW_FRAC  = 4;
  localparam int unsigned OTW_W     = 16;
  localparam int unsigned OTW_FRAC  = 8;
  localparam int unsigned COEF_W    = 16;
  localparam int unsigned COEF_FRAC = 10;
  localparam int unsigned PE_W      = 20;
  localparam int unsigned FD_W      = 5;
  localparam int unsigned OTW_MAX   = 255;

  typedef logic [FCW_W-1:0]         fcw_t;   // Q12.4
  typedef logic [OTW_W-1:0]         otw_t;   // Q8.8
  typedef logic [COEF_W-1:0]        coef_t;  // Q6.10
  typedef logic signed [PE_W-1:0]   err_t;   // signed Q16.4
  typedef logic signed [FD_W-1:0]   fd_t;    // signed phase-code difference, -11..11

  // Coefficients of the DCO frequency model, Eq. NF = (a*OTW+b)/(c*OTW+d)
  typedef struct packed {
    coef_t a;
    coef_t b;
    coef_t c;
    coef_t d;
  } dco_coef_t;

  // One point of the initialization sweep, sent to the calibration processor
  typedef struct packed {
    logic                 valid;
    logic [7:0]           otw;     // integer OTW of the point
    fcw_t                 fc;      // measured FC_OUT at that OTW
  } cal_sample_t;

  // States of the TCPC sequencer
  typedef enum logic [3:0] {
    S_IDLE,
    S_CAL,        // sweeping OTW
    S_CAL_WAIT,   // sweep done, waiting for the processor's coefficients
    S_LOCK,       // cycle 1: OTW_LOCK captured, INIT high
    S_WAIT,       // cycle 2: DCO runs at OTW_LOCK
    S_FC,         // cycle 3: FC_OUT captured, FLAG_EST
    S_EST1,       // cycle 4: estimation stage 1
    S_EST2,       // cycle 5: estimation stage 2
    S_OTW,        // cycle 6: FLAG_OTW, OTW_EST on OTW_INIT
    S_REL         // cycle 7: loop filter loaded with OTW_EST, INIT falls after this cycle
  } tcpc_state_t;

endpackage
