// tb_freq_counter: the DCO clock period is an exact fraction of the reference period, so
// every reference period holds a known number of DCO cycles: 160 at 400 ps, 128 at 500 ps
// and 250 at 256 ps (a 64 ns reference). cnt_delta must equal it before every falling edge.
`timescale 1ps/1fs
module tb_freq_counter;
  logic dco_clk = 0, fref = 0, rst_n = 1;
  logic [9:0] cnt_latched, cnt_delta;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;
  real half_dco = 200.0;

  freq_counter dut (.*);

  always #(half_dco) dco_clk = ~dco_clk;
  initial begin
    #100.3;
    forever #32000 fref = ~fref;
  end

  task automatic measure(input real half, input int expect_n, input int n);
    #777.7 half_dco = half;
    repeat (3) @(negedge fref);
    repeat (n) begin
      @(posedge fref);
      #20000;   // cnt_delta is valid from shortly after the rising edge to the falling edge
      checks++;
      if (cnt_delta != 10'(expect_n)) begin
        failures++;
        $display("FAIL period %0.0f ps: %0d counts, expected %0d", half * 2, cnt_delta, expect_n);
      end
    end
  endtask

  initial begin
    #1000 rst_n = 1;
    measure(200.0, 160, 40);
    measure(250.0, 128, 40);
    measure(128.0, 250, 40);
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
