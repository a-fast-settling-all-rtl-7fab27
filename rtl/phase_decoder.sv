// phase_decoder: turns the 12 latched DCO phases PL into the 4-bit Phase code and cancels
// latch errors with T_CHECK.
//
// Phase p means PL[p] = L and PL[p+1] = H (indices mod 12), the decoding table of the published
// design. In a clean sample exactly one such L-to-H boundary exists. With this phase order the
// high half of DCO_OUT[0] gives Phase 6..11 and the low half Phase 0..5, so T_CHECK (DCO_OUT[0]
// sampled with the same edge) names the half the answer must lie in. The lowest boundary in
// that half is taken. A sample whose only boundaries lie in the other half was latched across
// a DCO_OUT[0] transition: it is moved to the nearest code of the right half. A sample with no
// boundary at all gives the first code of the half. raw_phase is the plain decode (15 when no
// boundary exists) and corrected flags a changed result. The correction rules are this
// design's reading of the published description. Purely combinational.
`timescale 1ps/1fs
module phase_decoder #(
  parameter int N_PHASES = 12,
  parameter int PHASE_W  = 4
) (
  input  logic [N_PHASES-1:0] pl,
  input  logic                t_check,
  output logic [PHASE_W-1:0]  phase,
  output logic [PHASE_W-1:0]  raw_phase,
  output logic                corrected
);

  localparam int H = N_PHASES / 2;

  logic [N_PHASES-1:0] bnd;
  always_comb begin
    for (int p = 0; p < N_PHASES; p++)
      bnd[p] = ~pl[p] & pl[(p + 1) % N_PHASES];
  end

  always_comb begin
    logic found_in, found_out;
    int   p_in, p_out;
    found_in  = 1'b0;
    found_out = 1'b0;
    p_in      = 0;
    p_out     = 0;
    raw_phase = '1;
    for (int p = N_PHASES - 1; p >= 0; p--) begin
      if (bnd[p]) begin
        raw_phase = PHASE_W'(p);
        if ((p >= H) == t_check) begin
          found_in = 1'b1;
          p_in     = p;
        end else begin
          found_out = 1'b1;
          p_out     = p;
        end
      end
    end
    corrected = !found_in;
    if (found_in)
      phase = PHASE_W'(p_in);
    else if (found_out) begin
      if (t_check) phase = (p_out < H / 2)     ? PHASE_W'(N_PHASES - 1) : PHASE_W'(H);
      else         phase = (p_out < H + H / 2) ? PHASE_W'(H - 1)        : PHASE_W'(0);
    end else
      phase = t_check ? PHASE_W'(H) : PHASE_W'(0);
  end

endmodule
