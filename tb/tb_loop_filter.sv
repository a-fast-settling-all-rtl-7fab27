// tb_loop_filter: random frequency and phase errors, compared with a model of the filter
// written here: coarse gains 2^-1 / 2^-3 above 3 phase steps of phase error, fine gains 2^-3 /
// 2^-5 otherwise, one phase step weighted 1/8 OTW LSB, saturation to the OTW range, and
// loading of OTW_INIT while INIT is high. Both gain modes and both saturation ends are hit.
`timescale 1ps/1fs
module tb_loop_filter;
  import adpll_pkg::*;
  logic fref = 0, rst_n = 1, init = 0;
  otw_t otw_init, otw_dlf;
  err_t ferr, pfd_out;
  logic coarse;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;
  int acc = 128 * 256, n_coarse = 0, n_fine = 0;

  loop_filter dut (.*);

  function automatic int asr(input int v, input int s);
    // arithmetic right shift = floor division by 2^s
    int d = 1 << s;
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  task automatic step(input int fe, input int pe, input bit ld, input int ldv);
    bit c;
    int inc;
    ferr = err_t'(fe); pfd_out = err_t'(pe); init = ld; otw_init = otw_t'(ldv);
    #5000;
    c = (pe > 48) || (pe < -48);
    checks++;
    if (coarse != c) begin failures++; $display("FAIL coarse for pe %0d", pe); end
    if (c) n_coarse++; else n_fine++;
    inc = c ? asr(fe * 2, 1) + asr(pe * 2, 3) : asr(fe * 2, 3) + asr(pe * 2, 5);
    if (ld) acc = ldv;
    else begin
      acc += inc;
      if (acc < 0) acc = 0;
      if (acc > 65535) acc = 65535;
    end
    #5000 fref = 1;
    #10000 fref = 0;
    #1;
    checks++;
    if (int'(otw_dlf) != acc) begin
      failures++;
      $display("FAIL fe %0d pe %0d ld %0b: otw %0d expected %0d", fe, pe, ld, otw_dlf, acc);
    end
  endtask

  initial begin
    ferr = '0; pfd_out = '0; otw_init = '0;
    #1000 rst_n = 1;
    step(0, 48, 0, 0);
    step(0, 49, 0, 0);
    step(0, -48, 0, 0);
    step(0, -49, 0, 0);
    for (int i = 0; i < 400; i++)
      step($urandom_range(400) - 200, $urandom_range(300) - 150, (i % 97) == 5, $urandom_range(65535));
    for (int i = 0; i < 40; i++) step(100000, 100000, 0, 0);     // saturate high
    for (int i = 0; i < 40; i++) step(-100000, -100000, 0, 0);   // saturate low
    checks++;
    if (n_coarse == 0 || n_fine == 0) failures++;
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
