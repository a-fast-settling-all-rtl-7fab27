// tb_tcpc_controller: the sequencer alone, with a stand-in for the estimator that answers two
// cycles after FLAG_EST. Checks the sweep (256 samples, each OTW held two cycles and reported
// with the FC_OUT of its second cycle), the wait for coefficients, and for FCW changes the
// seven-cycle sequence: INIT high seven cycles, OTW_LOCK and FC_OUT captured at cycles 1 and 3,
// FLAG_EST in cycle 3, FLAG_OTW with OTW_EST on OTW_INIT in cycle 6; no sequence when the
// TCPC is disabled.
`timescale 1ps/1fs
module tb_tcpc_controller;
  import adpll_pkg::*;
  logic fref = 0, rst_n = 1, en = 1, cal_start = 0, coef_valid = 0;
  fcw_t fcw, fc_out;
  otw_t otw_dlf, otw_est;
  logic est_valid = 0;
  tcpc_state_t state;
  logic init, flag_est, flag_otw, cal_done;
  otw_t otw_init, otw_lock;
  fcw_t fc_lock, fcw_target;
  cal_sample_t cal;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;

  tcpc_controller dut (.*);

  always #5000 fref = ~fref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // estimator stand-in: valid two falling edges after FLAG_EST is sampled
  logic [1:0] pipe = 0;
  always @(negedge fref) begin
    pipe      <= {pipe[0], flag_est};
    est_valid <= pipe[0];
    otw_est   <= otw_t'(16'h5a5a);
  end

  // fc_out follows OTW_INIT with a tag of the cycle count so captures can be checked
  int cyc = 0;
  always @(negedge fref) begin
    cyc <= cyc + 1;
  end
  always @(posedge fref) fc_out <= fcw_t'(otw_init[15:8]) * 16 + fcw_t'(cyc % 16);

  initial begin
    int n, k;
    fcw = fcw_t'(30720); otw_dlf = otw_t'(16'h6000);
    #2000 rst_n = 1;
    // sweep
    @(posedge fref); cal_start = 1;
    @(posedge fref); cal_start = 0;
    n = 0;
    while (!cal_done) begin
      @(negedge fref);
      #1;
      if (cal.valid) begin
        check(cal.otw == 8'(n), $sformatf("sweep point %0d reports OTW %0d", n, cal.otw));
        check(cal.fc[15:4] == 12'(n), $sformatf("sweep point %0d FC belongs to OTW %0d", n, cal.fc[15:4]));
        n++;
      end
    end
    check(n == 256, $sformatf("%0d sweep samples", n));
    check(init && otw_init == otw_t'(255 * 256), "holds OTW_MAX after sweep");
    repeat (5) @(posedge fref);
    check(state == S_CAL_WAIT, "waits for coefficients");
    coef_valid = 1;
    wait (state == S_IDLE);
    // FCW changes
    for (int r = 0; r < 6; r++) begin
      int hi;
      bit saw_est, saw_otw;
      @(posedge fref);
      otw_dlf = otw_t'($urandom);
      fcw = fcw + 16'd192;
      hi = 0; k = 0; saw_est = 0; saw_otw = 0;
      @(negedge fref);
      #1;
      check(init, "INIT rises at the first falling edge");
      check(otw_lock == otw_dlf, "OTW_LOCK captured");
      while (init) begin
        hi++;
        if (hi == 3) begin
          check(flag_est, "FLAG_EST in cycle 3");
          check(fc_lock[15:4] == otw_dlf[15:8], "FC_OUT captured at OTW_LOCK");
          saw_est = 1;
        end else check(!flag_est, "FLAG_EST only in cycle 3");
        if (hi == 6) begin
          check(flag_otw && otw_init == otw_t'(16'h5a5a), "FLAG_OTW with OTW_EST in cycle 6");
          saw_otw = 1;
        end
        if (hi < 6) check(otw_init == otw_dlf, "OTW_INIT = OTW_LOCK before the estimate");
        @(negedge fref);
        #1;
      end
      check(hi == 7, $sformatf("INIT high %0d cycles", hi));
      check(saw_est && saw_otw, "flags seen");
      check(fcw_target == fcw, "target FCW");
      repeat (3) @(posedge fref);
    end
    // disabled: no sequence
    en = 0;
    @(posedge fref) fcw = fcw + 16'd192;
    repeat (12) begin
      @(negedge fref);
      #1 check(!init, "no INIT while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
