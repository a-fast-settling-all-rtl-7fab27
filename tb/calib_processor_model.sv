// calib_processor_model: behavioural model (testbench only) of the external processor that
// fits the DCO model NF = (a*OTW+b)/(c*OTW+d) to the initialization sweep.
//
// It stores the FC_OUT of every sweep sample. When cal_done rises it normalises them by the
// sample at OTW 255, fixes c = 1 (the model has one redundant scale) and solves the linear
// least-squares problem  a*x + b - d*NF = NF*x  over the points with x >= MIN_OTW, by the
// 3x3 normal equations and Cramer's rule. The result is put out as Q6.10 coefficients with
// coef_valid a few cycles later. Real arithmetic, not synthesizable.
`timescale 1ps/1fs
module calib_processor_model
  import adpll_pkg::*;
#(
  parameter int MIN_OTW = 8
) (
  input  logic        fref,
  input  logic        rst_n,
  input  cal_sample_t cal,
  input  logic        cal_done,
  output dco_coef_t   coef,
  output logic        coef_valid,
  output real         fit_a,
  output real         fit_b,
  output real         fit_d
);

  real fc [256];

  function automatic real det3(input real m [9]);
    return m[0] * (m[4] * m[8] - m[5] * m[7]) - m[1] * (m[3] * m[8] - m[5] * m[6])
         + m[2] * (m[3] * m[7] - m[4] * m[6]);
  endfunction

  function automatic coef_t q610(input real v);
    return coef_t'($rtoi(v * 1024.0 + 0.5));
  endfunction

  always @(negedge fref) if (rst_n && cal.valid) fc[cal.otw] = real'(cal.fc);

  initial begin
    coef       = '0;
    coef_valid = 1'b0;
    fit_a = 0.0; fit_b = 0.0; fit_d = 0.0;
    forever begin
      real s_xx, s_x, s_1, s_xn, s_n, s_nn, s_xnx, s_nx, s_nnx;
      real m [9], mm [9], r [3], dt;
      @(posedge cal_done);
      repeat (3) @(negedge fref);   // the last sample is reported with cal_done
      s_xx = 0; s_x = 0; s_1 = 0; s_xn = 0; s_n = 0; s_nn = 0; s_xnx = 0; s_nx = 0; s_nnx = 0;
      for (int i = MIN_OTW; i < 256; i++) begin
        real x, n;
        x = real'(i);
        n = fc[i] / fc[255];
        // columns: a -> x, b -> 1, d -> -n ; target n*x
        s_xx += x * x;  s_x += x;   s_1 += 1.0;
        s_xn += x * n;  s_n += n;   s_nn += n * n;
        s_xnx += x * n * x;  s_nx += n * x;  s_nnx += n * n * x;
      end
      m = '{s_xx, s_x, -s_xn,
            s_x,  s_1, -s_n,
           -s_xn, -s_n, s_nn};
      r = '{s_xnx, s_nx, -s_nnx};
      dt = det3(m);
      mm = m; mm[0] = r[0]; mm[3] = r[1]; mm[6] = r[2];
      fit_a = det3(mm) / dt;
      mm = m; mm[1] = r[0]; mm[4] = r[1]; mm[7] = r[2];
      fit_b = det3(mm) / dt;
      mm = m; mm[2] = r[0]; mm[5] = r[1]; mm[8] = r[2];
      fit_d = det3(mm) / dt;
      coef.a = q610(fit_a);
      coef.b = q610(fit_b);
      coef.c = q610(1.0);
      coef.d = q610(fit_d);
      repeat (4) @(negedge fref);
      coef_valid = 1'b1;
    end
  end

endmodule
