// tb_adpll_top: end-to-end test of the ADPLL at its default parameters.
//
// A 15 MHz reference drives the loop. The test runs the initialization sweep and checks every
// sweep sample against the DCO frequency law computed here; loads the published coefficients
// a, b, c, d = 1.11, 2.613, 1.0, 31.27 (Q6.10); and then steps FCW between 2.4 GHz and
// 2.415 GHz with and without the TCPC, at 25 degC and 50 degC, and with changes every 5 us.
// For every TCPC run it checks that INIT is high for exactly seven reference cycles and that
// OTW_EST is within one OTW LSB of the ideal word worked out here from the DCO law, and for
// every step that the loop locks (|phase error| <= 4 phase steps, a third of a DCO period, for 8 cycles) and settles on
// the right average frequency. It also counts the mechanisms the design has (sweep, coarse and
// fine gains, TCPC sequences, latch error corrections) and fails any that never happened.
`timescale 1ps/1fs
module tb_adpll_top;
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

  adpll_top dut (.*);

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
  function automatic coef_t q610(input real v);
    return coef_t'($rtoi(v * 1024.0 + 0.5));
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

  task automatic step_plain(input fcw_t w, output int settle, input string what);
    @(posedge fref);
    fcw = w;
    wait_lock(settle, what);
    $display("%s: settled in %0d cycles", what, settle);
  endtask

  localparam fcw_t F2400 = fcw_t'(1920 * 16);
  localparam fcw_t F2415 = fcw_t'(1932 * 16);

  int s_w, s_wo, s_tmp;

  initial begin
    fcw        = F2400;
    temp_c     = 8'sd25;
    tcpc_en    = 1'b1;
    cal_start  = 1'b0;
    coef_valid = 1'b0;
    coef.a = q610(A); coef.b = q610(B); coef.c = q610(C); coef.d = q610(D);
    repeat (3) @(posedge fref);
    rst_n = 1'b1;
    repeat (2) @(posedge fref);

    // initialization sweep
    cal_start = 1'b1;
    @(posedge fref);
    cal_start = 1'b0;
    wait (cal_done);
    repeat (2) @(posedge fref);
    check(n_cal == 256, $sformatf("sweep gave %0d samples", n_cal));
    repeat (3) @(posedge fref);
    // the processor's coefficients arrive: first estimate from the last sweep point
    coef_valid = 1'b1;
    wait (tcpc_state == S_REL);
    @(posedge fref);
    #(HALF_PS * 0.5);
    check(real'(otw) / 256.0 > otw_ideal(F2400, 25) - 1.0 && real'(otw) / 256.0 < otw_ideal(F2400, 25) + 1.0,
          $sformatf("first estimate %0.3f ideal %0.3f", real'(otw) / 256.0, otw_ideal(F2400, 25)));
    n_tcpc++;
    wait_lock(s_tmp, "after sweep 2.400 GHz");

    // 2.400 -> 2.415 GHz at 25 degC with and without the TCPC
    step_tcpc(F2415, s_w, "25C w/ TCPC 2.400->2.415");
    tcpc_en = 1'b0;
    step_plain(F2400, s_tmp, "25C w/o TCPC 2.415->2.400");
    step_plain(F2415, s_wo, "25C w/o TCPC 2.400->2.415");
    check(s_w < s_wo, $sformatf("TCPC settles faster: %0d vs %0d cycles", s_w, s_wo));

    // 50 degC: the estimate stays accurate with the same coefficients
    tcpc_en = 1'b1;
    temp_c  = 8'sd50;
    step_tcpc(F2400, s_tmp, "50C w/ TCPC 2.415->2.400");
    step_tcpc(F2415, s_tmp, "50C w/ TCPC 2.400->2.415");

    // repeated changes every 75 reference cycles (5 us) at 25 degC
    temp_c = 8'sd25;
    for (int i = 0; i < 4; i++) begin
      fcw_t w;
      real ideal, got;
      w = (i % 2 == 0) ? F2400 : F2415;
      @(posedge fref);
      fcw = w;
      wait (tcpc_state == S_REL);
      @(posedge fref);
      #(HALF_PS * 0.5);
      got   = real'(otw) / 256.0;
      ideal = otw_ideal(w, 25);
      n_tcpc++;
      check(got > ideal - 1.0 && got < ideal + 1.0,
            $sformatf("repeated change %0d: OTW_EST %0.3f ideal %0.3f", i, got, ideal));
      repeat (75 - 6) @(posedge fref);
    end
    wait_lock(s_tmp, "after repeated changes");

    $display("mechanisms: sweep samples %0d, TCPC runs %0d, coarse cycles %0d, fine cycles %0d, latch corrections %0d, locks %0d",
             n_cal, n_tcpc, n_coarse, n_fine, n_latch, n_lock);
    check(n_cal > 0,    "sweep happened");
    check(n_tcpc > 0,   "TCPC estimation happened");
    check(n_coarse > 0, "coarse loop gain used");
    check(n_fine > 0,   "fine loop gain used");
    check(n_latch > 0,  "latch error corrected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(HALF_PS * 2.0 * 12000.0);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
