// tb_tcpc_estimator: random locked points and targets around the 1.5-2.8 GHz range with the
// published coefficients. The expected OTW_EST is Eq. (11) evaluated here in floating point
// from the same Q6.10 coefficient values; the result must agree within 4/256 OTW, and valid
// must rise at the second falling edge counting the one that takes start.
`timescale 1ps/1fs
module tb_tcpc_estimator;
  import adpll_pkg::*;
  logic fref = 0, rst_n = 1, start = 0;
  dco_coef_t coef;
  otw_t otw_lock, otw_est;
  fcw_t fc_out, fcw;
  logic valid;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;

  tcpc_estimator dut (.*);

  always #5000 fref = ~fref;

  function automatic real nf(input real a, b, c, d, x);
    return (a * x + b) / (c * x + d);
  endfunction

  initial begin
    real a, b, c, d;
    coef.a = 16'd1137; coef.b = 16'd2676; coef.c = 16'd1024; coef.d = 16'd32020;
    a = 1137.0 / 1024; b = 2676.0 / 1024; c = 1.0; d = 32020.0 / 1024;
    otw_lock = '0; fc_out = '0; fcw = '0;
    #1000 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      real x, fl, ft, aa, bb, e;
      int lat;
      x  = real'($urandom_range(20 * 256, 255 * 256)) / 256.0;
      fl = real'($urandom_range(1500, 2200) * 16);          // FC_OUT Q12.4
      ft = fl * (0.9 + 0.2 * real'($urandom_range(1000)) / 1000.0);
      @(posedge fref);   // drive between falling edges
      otw_lock = otw_t'($rtoi(x * 256.0));
      x        = real'(otw_lock) / 256.0;
      fc_out   = fcw_t'($rtoi(fl));
      fcw      = fcw_t'($rtoi(ft));
      aa = a * x + b;
      bb = c * x + d;
      e  = (d * real'(fcw) * aa - b * real'(fc_out) * bb) / (a * real'(fc_out) * bb - c * real'(fcw) * aa);
      if (e < 0.0) e = 0.0;
      if (e > 255.996) e = 255.996;
      start = 1;
      @(negedge fref);
      #1 start = 0;
      lat = 0;
      while (!valid && lat < 10) begin
        @(negedge fref);
        #1 lat++;
      end
      checks++;
      if (lat != 1) begin failures++; $display("FAIL latency %0d", lat); end
      checks++;
      if (real'(otw_est) / 256.0 > e + 4.0 / 256 || real'(otw_est) / 256.0 < e - 4.0 / 256) begin
        failures++;
        $display("FAIL x %0.3f fc %0d fcw %0d: est %0.4f expected %0.4f", x, fc_out, fcw, real'(otw_est) / 256.0, e);
      end
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
