// tb_calibration_flow: the complete calibrate-then-estimate flow. At 25 degC the TCPC sweeps
// all tuning words; a model of the external processor fits a, b, c, d to the sweep by least
// squares and loads them. With those fitted coefficients FCW then steps between 2.400 and
// 2.415 GHz at 25, 10 and 50 degC. The fit must reproduce the DCO's normalised curve (within
// 0.3 % from OTW 8 to 255), and every TCPC estimate must lie within one OTW LSB of the ideal
// word, also at the temperatures the sweep was not made at, and the loop must lock.
`timescale 1ps/1fs
module tb_calibration_flow;
  import adpll_pkg::*;

  localparam real FREF_HZ   = 15.0e6;
  localparam real HALF_PS   = 1.0e12 / FREF_HZ / 2.0;
  localparam real A = 1.11, B = 2.613, C = 1.0, D = 31.27;
  localparam real FSCALE    = 2.8e9 / ((A * 255.0 + B) / (C * 255.0 + D));
  localparam real TEMPCO    = -0.0015;
  localparam int  LOCK_RUN  = 8;
  localparam int  LOCK_MAX  = 1000;
  localparam real LOCK_PE   = 4.0;   // phase steps

  logic              fref = 1'b0;
  logic              rst_n = 1'b0;
  fcw_t              fcw;
  logic signed [7:0] temp_c;
  logic              tcpc_en, cal_start, coef_valid;
  dco_coef_t         coef;
  cal_sample_t       cal;
  logic              cal_done;
  logic [N_PHASES-1:0] dco_out;
  otw_t              otw;
  logic              init;
  tcpc_state_t       tcpc_state;
  err_t              pfd_out;
  fcw_t              fc_out;
  logic              coarse, latch_err;

  real fit_a, fit_b, fit_d;

  adpll_top dut (.*);

  calib_processor_model u_mcu (
    .fref       (fref),
    .rst_n      (rst_n),
    .cal        (cal),
    .cal_done   (cal_done),
    .coef       (coef),
    .coef_valid (coef_valid),
    .fit_a      (fit_a),
    .fit_b      (fit_b),
    .fit_d      (fit_d)
  );

  always #(HALF_PS) fref = ~fref;

  int checks = 0, failures = 0;
  int n_cal = 0, n_coarse = 0, n_fine = 0, n_tcpc = 0, n_latch = 0, n_lock = 0;
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real nf(input real x);
    return (A * x + B) / (C * x + D);
  endfunction
  function automatic real f_dco(input real x, input int t);
    return FSCALE * nf(x) * (1.0 + TEMPCO * (real'(t) - 25.0));
  endfunction
  // ideal OTW (real, integer LSBs) for a frequency code in Q12.4
  function automatic real otw_ideal(input fcw_t w, input int t);
    real f, n;
    f = real'(w) / 16.0 / 12.0 * FREF_HZ;
    n = f / (FSCALE * (1.0 + TEMPCO * (real'(t) - 25.0)));
    return (D * n - B) / (A - C * n);
  endfunction
  function automatic real fc_expect(input real x, input int t);
    return f_dco(x, t) / FREF_HZ * 12.0 * 16.0;
  endfunction

  // Per-cycle monitor, sampled late in the high phase of F_REF when this cycle's
  // measurement has settled and before the falling edge uses it.
  real pe_sample;
  int  init_run = 0, last_init_run = 0;
  always @(posedge fref) begin
    #(HALF_PS * 0.9);
    cyc++;
    pe_sample = real'(pfd_out) / 16.0;
    if (!init) begin
      if (coarse) n_coarse++; else n_fine++;
    end
    if (latch_err) n_latch++;
    if (init) init_run++;
    else if (init_run != 0) begin
      last_init_run = init_run;
      init_run = 0;
    end
  end
  always @(negedge fref) if (rst_n && cal.valid) begin
    real e, x;
    n_cal++;
    x = real'(cal.otw);
    e = fc_expect(x, int'(temp_c));
    check(real'(cal.fc) > e - 40.0 && real'(cal.fc) < e + 40.0,
          $sformatf("sweep OTW %0d FC %0d expected %0.1f", cal.otw, cal.fc, e));
  end

  // wait for lock: |phase error| <= LOCK_PE steps for LOCK_RUN samples; returns cycles from start
  task automatic wait_lock(output int cycles, input string what);
    int run, start;
    real fsum;
    start = cyc;
    run = 0;
    cycles = -1;
    while (cyc - start < LOCK_MAX && cycles < 0) begin
      @(posedge fref);
      #(HALF_PS * 0.95);
      if (!init && pe_sample <= LOCK_PE && pe_sample >= -LOCK_PE) run++;
      else run = 0;
      if (run == LOCK_RUN) cycles = cyc - start - LOCK_RUN + 1;
    end
    check(cycles >= 0, {what, ": locks"});
    if (cycles >= 0) n_lock++;
    // average frequency over 32 locked cycles equals FCW
    fsum = 0.0;
    for (int i = 0; i < 32; i++) begin
      @(posedge fref);
      #(HALF_PS * 0.95);
      fsum += real'(fc_out);
    end
    check(fsum / 32.0 > real'(fcw) - 8.0 && fsum / 32.0 < real'(fcw) + 8.0,
          $sformatf("%s: mean FC %0.2f vs FCW %0d", what, fsum / 32.0, fcw));
  endtask

  // step FCW with the TCPC on and check its sequence and estimate
  task automatic step_tcpc(input fcw_t w, output int settle, input string what);
    real ideal, got;
    int  t0, t1;
    @(posedge fref);
    fcw = w;
    t0 = cyc;
    wait (init);
    wait (tcpc_state == S_REL);
    @(posedge fref);
    #(HALF_PS * 0.5);
    got   = real'(otw) / 256.0;
    ideal = otw_ideal(w, int'(temp_c));
    n_tcpc++;
    check(got > ideal - 1.0 && got < ideal + 1.0,
          $sformatf("%s: OTW_EST %0.3f ideal %0.3f", what, got, ideal));
    wait (!init);
    @(posedge fref);
    #(HALF_PS * 0.95);
    check(last_init_run == 7, $sformatf("%s: INIT high %0d cycles", what, last_init_run));
    t1 = cyc;
    wait_lock(settle, what);
    if (settle >= 0) settle += t1 - t0;   // counted from the FCW change, TCPC cycles included
    $display("%s: OTW_EST %0.3f (ideal %0.3f), settled in %0d cycles", what, got, ideal, settle);
  endtask

  localparam fcw_t F2400 = fcw_t'(1920 * 16);
  localparam fcw_t F2415 = fcw_t'(1932 * 16);

  initial begin
    int s_tmp;
    real worst;
    fcw        = F2400;
    temp_c     = 8'sd25;
    tcpc_en    = 1'b1;
    cal_start  = 1'b0;
    repeat (3) @(posedge fref);
    rst_n = 1'b1;
    repeat (2) @(posedge fref);
    cal_start = 1'b1;
    @(posedge fref);
    cal_start = 1'b0;
    wait (coef_valid);
    $display("fitted a=%0.4f b=%0.4f c=1 d=%0.4f", fit_a, fit_b, fit_d);
    worst = 0.0;
    for (int x = 8; x < 256; x++) begin
      real nf_fit, nf_true, e;
      nf_fit  = (fit_a * x + fit_b) / (real'(x) + fit_d);
      nf_true = nf(real'(x)) / nf(255.0);
      e = (nf_fit - nf_true) / nf_true;
      if (e < 0) e = -e;
      if (e > worst) worst = e;
    end
    check(worst < 0.003 && fit_d > 0.0 && fit_a > 0.0, $sformatf("fit mismatch %0.4f %%", worst * 100.0));
    wait (tcpc_state == S_REL);
    wait (!init);
    wait_lock(s_tmp, "after calibration");
    step_tcpc(F2415, s_tmp, "25C fitted 2.400->2.415");
    step_tcpc(F2400, s_tmp, "25C fitted 2.415->2.400");
    temp_c = 8'sd10;
    step_tcpc(F2415, s_tmp, "10C fitted 2.400->2.415");
    step_tcpc(F2400, s_tmp, "10C fitted 2.415->2.400");
    temp_c = 8'sd50;
    step_tcpc(F2415, s_tmp, "50C fitted 2.400->2.415");
    step_tcpc(F2400, s_tmp, "50C fitted 2.415->2.400");
    check(n_cal == 256 && n_tcpc == 6, $sformatf("sweep %0d samples, %0d estimates", n_cal, n_tcpc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(HALF_PS * 2.0 * 20000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
