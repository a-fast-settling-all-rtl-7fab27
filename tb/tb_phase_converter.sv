// tb_phase_converter: drives the 12 phase inputs with the pattern of a known sub-period slot
// before each reference rising edge and checks PC_OUT (the slot, counted from the DCO_OUT[0]
// rising edge) and FD_OUT (slot difference to the previous cycle) before the falling edge.
// Some cycles use the pattern of a late phase-6 falling edge right after DCO_OUT[0] rises,
// which must be flagged and corrected.
`timescale 1ps/1fs
module tb_phase_converter;
  logic        fref = 0, rst_n = 1;
  logic [11:0] dco_out;
  logic [3:0]  pc_out;
  logic signed [4:0] fd_out;
  logic        latch_err;
  int checks = 0, failures = 0;

  initial #1 rst_n = 0;

  phase_converter dut (.*);

  // DCO state j/12 of a period after a DCO_OUT[0] rising edge: phases k with
  // (j-k) mod 12 in 0..5 are high
  function automatic logic [11:0] slot(input int j);
    logic [11:0] v;
    for (int k = 0; k < 12; k++) v[k] = ((j - k + 12) % 12) < 6;
    return v;
  endfunction

  int prev = 0;
  task automatic cycle(input int j, input bit skewed);
    int e;
    dco_out = slot(j);
    if (skewed) dco_out[6] = 1'b1;   // phase 6 has not fallen yet
    #10000 fref = 1;
    #20000;
    e = j - prev;
    checks++;
    if (pc_out != 4'(j) || fd_out != 5'(e) || latch_err != skewed) begin
      failures++;
      $display("FAIL slot %0d skew %0d: pc=%0d fd=%0d err=%b", j, skewed, pc_out, fd_out, latch_err);
    end
    #10000 fref = 0;
    prev = j;
    #10000;
  endtask

  initial begin
    dco_out = slot(0);
    #5000 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      int j;
      bit s;
      s = ($urandom_range(4) == 0);
      j = s ? 0 : $urandom_range(11);
      cycle(j, s);
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
