// tb_frequency_range: the loop across the published output range, 1.50 to 2.80 GHz. With the
// TCPC on at 25 degC, FCW steps through 2.40, 1.50, 2.00, 2.79, 1.50, 2.79 and 2.40 GHz. Each
// estimate must lie within one OTW LSB of the ideal word, every step must lock on the right
// mean frequency, and the phase error must settle, also for the long jumps where the
// tuning word moves by more than 150 LSBs. 2.79 GHz is used as the top point because the
// model DCO reaches 2.80 GHz at OTW 255, the edge of the tuning range.
`timescale 1ps/1fs
module tb_frequency_range;
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

  localparam int N_F = 7;
  real f_mhz [N_F] = '{2400.0, 1500.0, 2000.0, 2790.0, 1500.0, 2790.0, 2400.0};

  function automatic fcw_t fcw_for(input real mhz);
    return fcw_t'($rtoi(mhz * 1.0e6 / FREF_HZ * 12.0 * 16.0 + 0.5));
  endfunction

  initial begin
    int s_tmp;
    fcw        = fcw_for(2415.0);
    temp_c     = 8'sd25;
    tcpc_en    = 1'b1;
    cal_start  = 1'b0;
    coef_valid = 1'b1;
    coef.a = q610(A); coef.b = q610(B); coef.c = q610(C); coef.d = q610(D);
    repeat (3) @(posedge fref);
    rst_n = 1'b1;
    wait (init);
    wait (!init);
    wait_lock(s_tmp, "start-up");
    for (int i = 0; i < N_F; i++)
      step_tcpc(fcw_for(f_mhz[i]), s_tmp, $sformatf("to %0.0f MHz", f_mhz[i]));
    check(n_tcpc == N_F && n_lock == N_F + 1, $sformatf("%0d estimates, %0d locks", n_tcpc, n_lock));
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
