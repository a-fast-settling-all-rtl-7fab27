// tb_edge_detector: a 2.5 GHz DCO clock and an asynchronous 15 MHz reference. Each reference
// rising edge must give exactly one latch_en pulse of one DCO cycle, starting 2 to 3 DCO
// cycles after the edge (SYNC_STAGES = 2), so the latch never falls on the reference edge.
`timescale 1ps/1fs
module tb_edge_detector;
  logic dco_clk = 0, fref = 0, rst_n = 1, latch_en;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;
  realtime t_ref;
  int pulses = 0, edges = 0;

  edge_detector dut (.*);

  always #200 dco_clk = ~dco_clk;
  always #33333.333 fref = ~fref;
  always @(posedge fref) if (rst_n) begin
    edges++;
    t_ref = $realtime;
  end
  always @(posedge dco_clk) if (rst_n && latch_en) begin
    realtime d;
    pulses++;
    d = $realtime - t_ref;
    checks++;
    // latch edge (this DCO edge) is 2..3 DCO cycles after the reference edge, plus one
    if (d < 800.0 || d > 1600.0) begin
      failures++;
      $display("FAIL latch %0.1f ps after reference edge", d);
    end
  end

  initial begin
    #1000 rst_n = 1;
    #(66666.667 * 300);
    checks++;
    if (pulses < edges - 1 || pulses > edges) begin
      failures++;
      $display("FAIL %0d pulses for %0d edges", pulses, edges);
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
