// tb_dco_model: measures the model's DCO_OUT[0] frequency over 100 ns windows for several
// tuning words and temperatures and compares it with F = Fscale*(1+tc*(T-25))*NF(OTW),
// NF = (1.11x+2.613)/(x+31.27), Fscale putting x = 255 at 2.8 GHz. It also checks that phase k
// rises k/12 of a period after phase 0 and that the normalised frequency F(x)/F(255) does not
// depend on temperature.
`timescale 1ps/1fs
module tb_dco_model;
  logic [15:0]       otw;
  logic signed [7:0] temp_c;
  logic [11:0]       dco_out;
  int checks = 0, failures = 0;

  dco_model dut (.*);

  function automatic real f_ref(input real x, input int t);
    real nf, nf255;
    nf    = (1.11 * x + 2.613) / (x + 31.27);
    nf255 = (1.11 * 255.0 + 2.613) / (255.0 + 31.27);
    return 2.8e9 / nf255 * nf * (1.0 - 0.0015 * (real'(t) - 25.0));
  endfunction

  task automatic measure(input int x, input int t, output real f);
    realtime t0, t1;
    int n;
    otw = 16'(x * 256);
    temp_c = 8'(t);
    #2000;
    @(posedge dco_out[0]);
    t0 = $realtime;
    n = 0;
    while ($realtime - t0 < 100000.0) begin
      @(posedge dco_out[0]);
      n++;
    end
    t1 = $realtime;
    f = real'(n) / ((t1 - t0) * 1.0e-12);
    checks++;
    if (f < f_ref(real'(x), t) * 0.999 || f > f_ref(real'(x), t) * 1.001) begin
      failures++;
      $display("FAIL OTW %0d T %0d: %0.4e Hz expected %0.4e", x, t, f, f_ref(real'(x), t));
    end
  endtask

  initial begin
    real f, fmax25, fmax50, fx25, fx50;
    otw = 16'(96 * 256);
    temp_c = 8'sd25;
    measure(20, 25, f);
    measure(96, 25, fx25);
    measure(255, 25, fmax25);
    measure(96, 50, fx50);
    measure(255, 50, fmax50);
    measure(180, 10, f);
    checks++;
    if (fx25 / fmax25 - fx50 / fmax50 > 0.001 || fx50 / fmax50 - fx25 / fmax25 > 0.001) begin
      failures++;
      $display("FAIL normalised frequency moves with temperature");
    end
    // phase order at OTW 96, 25 degC
    otw = 16'(96 * 256);
    temp_c = 8'sd25;
    #2000;
    for (int k = 1; k < 12; k++) begin
      realtime r0, rk;
      real per;
      per = 1.0e12 / f_ref(96.0, 25);
      @(posedge dco_out[0]);
      r0 = $realtime;
      @(posedge dco_out[k]);
      rk = $realtime;
      checks++;
      if (rk - r0 < real'(k) * per / 12.0 - 1.0 || rk - r0 > real'(k) * per / 12.0 + 1.0) begin
        failures++;
        $display("FAIL phase %0d rises %0.1f ps after phase 0", k, rk - r0);
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
