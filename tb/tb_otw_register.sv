// tb_otw_register: the register must take OTW_INIT while INIT is high and the loop filter
// word otherwise, and change only at the reference rising edge.
`timescale 1ps/1fs
module tb_otw_register;
  import adpll_pkg::*;
  logic fref = 0, rst_n = 1, init = 0;
  otw_t otw_init, otw_dlf, otw;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;

  otw_register dut (.*);

  initial begin
    otw_init = '0; otw_dlf = '0;
    #1000;
    checks++;
    if (otw != otw_t'(128 * 256)) failures++;
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      otw_t prev_otw, e;
      init = 1'($urandom); otw_init = otw_t'($urandom); otw_dlf = otw_t'($urandom);
      e = init ? otw_init : otw_dlf;
      prev_otw = otw;
      #5000;
      checks++;
      if (otw != prev_otw) begin failures++; $display("FAIL changed prev_otw the edge"); end
      fref = 1;
      #1;
      checks++;
      if (otw != e) begin failures++; $display("FAIL otw %h expected %h", otw, e); end
      #5000 fref = 0;
      otw_init = ~otw_init; otw_dlf = ~otw_dlf;
      #5000;
      checks++;
      if (otw != e) begin failures++; $display("FAIL changed at the falling edge"); end
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
