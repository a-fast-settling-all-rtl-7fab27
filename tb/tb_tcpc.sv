// tb_tcpc: controller and estimator together. After a short sweep check, FCW steps between
// random targets while a fixed locked point is presented; the word put out under FLAG_OTW
// must match Eq. (11) worked out here in floating point, and INIT must be high seven cycles.
`timescale 1ps/1fs
module tb_tcpc;
  import adpll_pkg::*;
  logic fref = 0, rst_n = 1, en = 1, cal_start = 0, coef_valid = 0;
  dco_coef_t coef;
  fcw_t fcw, fc_out;
  otw_t otw_dlf, otw_init, otw_est;
  logic init, flag_est, flag_otw, cal_done;
  tcpc_state_t state;
  cal_sample_t cal;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;

  tcpc dut (.*);

  always #5000 fref = ~fref;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  int n_cal = 0;
  always @(negedge fref) if (cal.valid) n_cal++;

  initial begin
    real a, b, c, d;
    coef.a = 16'd1137; coef.b = 16'd2676; coef.c = 16'd1024; coef.d = 16'd32020;
    a = 1137.0 / 1024; b = 2676.0 / 1024; c = 1.0; d = 32020.0 / 1024;
    fcw = fcw_t'(30720); fc_out = fcw_t'(30720); otw_dlf = otw_t'(97 * 256);
    #2000 rst_n = 1;
    @(posedge fref) cal_start = 1;
    @(posedge fref) cal_start = 0;
    wait (cal_done);
    repeat (2) @(posedge fref);
    check(n_cal == 256, $sformatf("%0d sweep samples", n_cal));
    coef_valid = 1;
    wait (state == S_IDLE);
    for (int i = 0; i < 40; i++) begin
      real x, aa, bb, e, got;
      int hi;
      @(posedge fref);
      otw_dlf = otw_t'($urandom_range(40 * 256, 250 * 256));
      fc_out  = fcw_t'($urandom_range(1600 * 16, 2200 * 16));
      fcw     = fcw_t'(int'(fc_out) + $urandom_range(400) - 200);
      x  = real'(otw_dlf) / 256.0;
      aa = a * x + b;
      bb = c * x + d;
      e  = (d * real'(fcw) * aa - b * real'(fc_out) * bb) / (a * real'(fc_out) * bb - c * real'(fcw) * aa);
      hi = 0;
      got = -1.0;
      @(negedge fref);
      #1;
      while (init) begin
        hi++;
        if (flag_otw) got = real'(otw_init) / 256.0;
        @(negedge fref);
        #1;
      end
      check(hi == 7, $sformatf("INIT high %0d cycles", hi));
      check(got > e - 4.0 / 256 && got < e + 4.0 / 256, $sformatf("OTW_EST %0.4f expected %0.4f", got, e));
      check(otw_est == otw_t'($rtoi(got * 256.0)), "otw_est output");
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
