// tcpc_estimator: the estimation block of the TCPC. It computes the tuning word expected to
// give the new target frequency, from the DCO model NF = (a*OTW+b)/(c*OTW+d):
//
//   A = a*OTW_LOCK + b,  B = c*OTW_LOCK + d,
//   OTW_EST = (d*FCW*A - b*FC_OUT*B) / (a*FC_OUT*B - c*FCW*A)
//
// OTW_LOCK is the word the loop was locked at and FC_OUT the frequency it measured there, so
// FCW/FC_OUT scales the normalised frequency of the locked point to the target one. Any
// temperature factor common to both cancels. The computation takes two reference cycles, as
// published: start (FLAG_EST) loads stage 1 (A, B and the four products), the next edge
// divides, and valid is high for the cycle after that with otw_est held until the next start.
// Formats: coefficients Q6.10, OTW Q8.8, FCW and FC_OUT Q12.4. A and B are kept as Q10.10; the
// result saturates to 0..255.996 and a non-positive denominator saturates by the sign of the
// numerator. The formats and saturation are this design's choice. Clocked at the F_REF falling
// edge, like the loop filter. Reset: asynchronous, active low.
`timescale 1ps/1fs
module tcpc_estimator
  import adpll_pkg::*;
(
  input  logic      fref,
  input  logic      rst_n,
  input  logic      start,
  input  dco_coef_t coef,
  input  otw_t      otw_lock,
  input  fcw_t      fc_out,
  input  fcw_t      fcw,
  output otw_t      otw_est,
  output logic      valid
);

  localparam int AB_W   = 20;   // Q10.10
  localparam int PROD_W = COEF_W + FCW_W + AB_W;   // 52
  localparam int NUM_W  = PROD_W + 2;

  typedef logic signed [NUM_W-1:0] wide_t;

  logic [AB_W-1:0] a_term, b_term;
  wide_t           num_q, den_q;
  logic            s1_valid;

  // Stage 1 (combinational part): A and B in Q10.10, products with the common scale 2^24
  always_comb begin
    logic [COEF_W+OTW_W-1:0] ax, cx;
    ax     = coef.a * otw_lock;                        // Q14.18
    cx     = coef.c * otw_lock;
    a_term = AB_W'(ax >> OTW_FRAC) + AB_W'(coef.b);    // Q10.10
    b_term = AB_W'(cx >> OTW_FRAC) + AB_W'(coef.d);
  end

  always_ff @(negedge fref or negedge rst_n) begin
    if (!rst_n) begin
      num_q    <= '0;
      den_q    <= '0;
      s1_valid <= 1'b0;
    end else begin
      s1_valid <= start;
      if (start) begin
        num_q <= wide_t'(coef.d) * wide_t'(fcw) * wide_t'(a_term) - wide_t'(coef.b) * wide_t'(fc_out) * wide_t'(b_term);
        den_q <= wide_t'(coef.a) * wide_t'(fc_out) * wide_t'(b_term) - wide_t'(coef.c) * wide_t'(fcw) * wide_t'(a_term);
      end
    end
  end

  // Stage 2: division to Q8.8 and saturation
  otw_t quot;
  always_comb begin
    logic signed [NUM_W+OTW_FRAC-1:0] n_sh, q;
    n_sh = (NUM_W+OTW_FRAC)'(num_q) <<< OTW_FRAC;
    q    = '0;
    if (den_q <= 0)           quot = (num_q > 0) ? '1 : '0;
    else if (num_q <= 0)      quot = '0;
    else begin
      q = n_sh / (NUM_W+OTW_FRAC)'(den_q);
      quot = (q > (NUM_W+OTW_FRAC)'((1 << OTW_W) - 1)) ? '1 : otw_t'(q);
    end
  end

  always_ff @(negedge fref or negedge rst_n) begin
    if (!rst_n) begin
      otw_est <= '0;
      valid   <= 1'b0;
    end else begin
      valid <= s1_valid;
      if (s1_valid) otw_est <= quot;
    end
  end

endmodule
