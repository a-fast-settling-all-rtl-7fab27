// tcpc_controller: the sequencer of the temperature compensation PLL controller (TCPC).
//
// Initialization (cal_start): INIT goes high and OTW_INIT sweeps the integer OTW from 0 to
// OTW_MAX. Each word is held CAL_DWELL reference cycles and FC_OUT of the last one, which is
// the frequency measured entirely at that word, is sent out as a sweep sample for the
// calibration processor. After the sweep INIT stays high at OTW_MAX until coef_valid says the
// processor has loaded a, b, c, d; then one estimation runs from the last sweep point.
//
// Estimation, on every FCW change while en and coef_valid are high; seven reference cycles
// with INIT high, as published:
//   1 S_LOCK  OTW_LOCK captured from the loop filter, which is frozen from now on
//   2 S_WAIT  the DCO runs a whole period at OTW_LOCK
//   3 S_FC    FC_OUT of that period captured, FLAG_EST high
//   4 S_EST1  estimator stage 1
//   5 S_EST2  estimator stage 2
//   6 S_OTW   FLAG_OTW high, OTW_EST on OTW_INIT (the DCO gets it at the next rising edge)
//   7 S_REL   OTW_EST loaded into the loop filter; INIT falls at the end of this cycle
// The order of steps follows the published description; their exact placement in the seven
// cycles, the dwell and the handling of an FCW change during a sequence (taken up after it)
// are this design's choice. All state changes at the F_REF falling edge. Reset:
// asynchronous, active low.
`timescale 1ps/1fs
module tcpc_controller
  import adpll_pkg::*;
#(
  parameter int CAL_DWELL = 2
) (
  input  logic        fref,
  input  logic        rst_n,
  input  logic        en,
  input  logic        cal_start,
  input  logic        coef_valid,
  input  fcw_t        fcw,
  input  fcw_t        fc_out,
  input  otw_t        otw_dlf,
  input  otw_t        otw_est,
  input  logic        est_valid,
  output tcpc_state_t state,
  output logic        init,
  output otw_t        otw_init,
  output logic        flag_est,
  output logic        flag_otw,
  output otw_t        otw_lock,
  output fcw_t        fc_lock,
  output fcw_t        fcw_target,
  output cal_sample_t cal,
  output logic        cal_done
);

  localparam int DW_W = $clog2(CAL_DWELL + 1);

  logic [7:0]      cal_otw;
  logic [DW_W-1:0] dwell;
  otw_t            est_q;

  always_ff @(negedge fref or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      otw_lock   <= '0;
      fc_lock    <= '0;
      fcw_target <= '0;
      cal_otw    <= '0;
      dwell      <= '0;
      est_q      <= '0;
      cal        <= '0;
      cal_done   <= 1'b0;
    end else begin
      cal.valid <= 1'b0;
      if (est_valid) est_q <= otw_est;
      unique case (state)
        S_IDLE: begin
          if (cal_start) begin
            state    <= S_CAL;
            cal_otw  <= '0;
            dwell    <= '0;
            cal_done <= 1'b0;
          end else if (en && coef_valid && fcw != fcw_target) begin
            state      <= S_LOCK;
            otw_lock   <= otw_dlf;
            fcw_target <= fcw;
          end else if (!en) begin
            fcw_target <= fcw;
          end
        end
        S_CAL: begin
          if (dwell == DW_W'(CAL_DWELL - 1)) begin
            dwell     <= '0;
            cal.valid <= 1'b1;
            cal.otw   <= cal_otw;
            cal.fc    <= fc_out;
            if (cal_otw == 8'(OTW_MAX)) begin
              state    <= S_CAL_WAIT;
              cal_done <= 1'b1;
            end else begin
              cal_otw <= cal_otw + 1'b1;
            end
          end else begin
            dwell <= dwell + 1'b1;
          end
        end
        S_CAL_WAIT: begin
          if (coef_valid) begin
            if (en) begin
              state      <= S_LOCK;
              otw_lock   <= otw_dlf;
              fcw_target <= fcw;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        S_LOCK: state <= S_WAIT;
        S_WAIT: begin
          state   <= S_FC;
          fc_lock <= fc_out;
        end
        S_FC:   state <= S_EST1;
        S_EST1: state <= S_EST2;
        S_EST2: state <= S_OTW;
        S_OTW:  state <= S_REL;
        S_REL:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    init     = (state != S_IDLE);
    flag_est = (state == S_FC);
    flag_otw = (state == S_OTW);
    unique case (state)
      S_CAL:        otw_init = otw_t'({cal_otw, {OTW_FRAC{1'b0}}});
      S_CAL_WAIT:   otw_init = otw_t'(OTW_MAX << OTW_FRAC);
      S_OTW, S_REL: otw_init = est_q;
      default:      otw_init = otw_lock;
    endcase
  end

endmodule
