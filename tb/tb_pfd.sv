// tb_pfd: random counter differences, fine codes and FCW values are applied before each
// falling edge; FC_OUT = (12*cnt_delta + fd_out)*16, the frequency error and the running
// phase error are computed here and compared, and clear must hold the phase error at zero.
`timescale 1ps/1fs
module tb_pfd;
  import adpll_pkg::*;
  logic fref = 0, rst_n = 1, clear = 0;
  fcw_t fcw;
  logic [9:0] cnt_delta;
  fd_t  fd_out;
  fcw_t fc_out;
  err_t ferr, pfd_out, pe_q;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;
  int pe_ref = 0;

  pfd dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    fcw = fcw_t'(1920 * 16); cnt_delta = 160; fd_out = 0;
    #1000 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      int fc, fe;
      clear     = (i % 50) < 3;
      cnt_delta = 10'($urandom_range(155, 165));
      fd_out    = fd_t'($urandom_range(22) - 11);
      if (i % 40 == 0) fcw = fcw_t'($urandom_range(1800 * 16, 2000 * 16));
      #10000 fref = 1;
      #20000;
      fc = (12 * int'(cnt_delta) + int'(fd_out)) * 16;
      fe = int'(fcw) - fc;
      check(int'(fc_out) == fc, $sformatf("fc %0d vs %0d", fc_out, fc));
      check(int'(ferr) == fe, $sformatf("ferr %0d vs %0d", ferr, fe));
      pe_ref = clear ? 0 : pe_ref + fe;
      check(int'(pfd_out) == pe_ref, $sformatf("pe %0d vs %0d", pfd_out, pe_ref));
      #3000 fref = 0;
      #1;
      check(int'(pe_q) == pe_ref, "registered phase error");
      #10000;
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
