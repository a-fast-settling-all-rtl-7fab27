// dco_model: behavioural model (not synthesizable) of the 12-phase ring DCO, i.e. the
// multi-phase oscillator with phase couplers, its PMOS current source controlled by OTW and
// the level shifters that buffer its phases.
//
// Frequency law: F(OTW,T) = F_MAX_25_HZ * (1 + TEMPCO_PER_C*(T-25)) * (A*x+B)/(C*x+D), with
// x = OTW/2^OTW_FRAC. The rational shape is the published DCO model with its measured
// coefficients (1.11, 2.613, 1.0, 31.27); the scale puts x = 255 at 2.8 GHz at 25 degC, the top
// of the published 1.5-2.8 GHz range. Temperature multiplies the whole curve, which is the
// property the OTW estimator relies on (the normalised curve does not move with temperature).
// The temperature coefficient is this model's own choice.
//
// Outputs: dco_out[k] is a square wave that lags dco_out[0] by k/12 of a period. Every 1/12
// period one phase rises and the one six positions further falls. OTW and temperature are
// re-read every 1/12 period. The falling edge of phase SKEW_PHASE comes SKEW_PS late, a simple
// stand-in for phase mismatch: a reference edge inside that window latches a pattern whose
// phase boundary sits on the wrong side of DCO_OUT[0], the latch error the phase decoder
// corrects. Timing: continuous, no clock.
`timescale 1ps/1fs
module dco_model #(
  parameter int  N_PHASES     = 12,
  parameter int  OTW_W        = 16,
  parameter int  OTW_FRAC     = 8,
  parameter real A            = 1.11,
  parameter real B            = 2.613,
  parameter real C            = 1.0,
  parameter real D            = 31.27,
  parameter real F_MAX_HZ     = 2.8e9,   // frequency at OTW = 255.0 and 25 degC
  parameter real TEMPCO_PER_C = -0.0015,
  parameter int  SKEW_PHASE   = 6,       // phase whose falling edge is late
  parameter real SKEW_PS      = 15.0     // lateness, a model of phase mismatch
) (
  input  logic [OTW_W-1:0]    otw,
  input  logic signed [7:0]   temp_c,
  output logic [N_PHASES-1:0] dco_out
);

  function automatic real nf(input real x);
    return (A * x + B) / (C * x + D);
  endfunction

  function automatic real freq_hz(input logic [OTW_W-1:0] w, input logic signed [7:0] t);
    real x;
    x = real'(w) / real'(1 << OTW_FRAC);
    return F_MAX_HZ / nf(255.0) * nf(x) * (1.0 + TEMPCO_PER_C * (real'(t) - 25.0));
  endfunction

  real period_ps;

  initial begin
    // state just after phase 0 rises: phases N/2+1 .. N-1 and 0 are high
    for (int k = 0; k < N_PHASES; k++)
      dco_out[k] = (k == 0) || (k > N_PHASES / 2);
    forever begin
      for (int j = 0; j < N_PHASES; j++) begin
        period_ps = 1.0e12 / freq_hz(otw, temp_c);
        dco_out[j] = 1'b1;
        if ((j + N_PHASES / 2) % N_PHASES == SKEW_PHASE && SKEW_PS > 0.0) begin
          #(SKEW_PS);
          dco_out[SKEW_PHASE] = 1'b0;
          #(period_ps / real'(N_PHASES) - SKEW_PS);
        end else begin
          dco_out[(j + N_PHASES / 2) % N_PHASES] = 1'b0;
          #(period_ps / real'(N_PHASES));
        end
      end
    end
  end

endmodule
