// tb_phase_decoder: checks the decoding table and the latch error correction.
//
// Every clean 12-phase pattern (Phase p: PL[p] = L and PL[p+1..p+6] = H) with a matching
// T_CHECK must decode to p without correction. Patterns whose boundary lies in the half the
// T_CHECK bit rules out must be moved to the nearest code of the right half, and random
// patterns are compared with a reference written here as a nearest-distance search.
`timescale 1ps/1fs
module tb_phase_decoder;
  logic [11:0] pl;
  logic        t_check;
  logic [3:0]  phase, raw_phase;
  logic        corrected;
  int checks = 0, failures = 0;

  phase_decoder dut (.*);

  function automatic logic [11:0] clean(input int p);
    logic [11:0] v = '0;
    for (int i = 1; i <= 6; i++) v[(p + i) % 12] = 1'b1;
    return v;
  endfunction

  // reference: boundaries in the allowed half win (lowest first); otherwise the allowed
  // code nearest (circularly) to the lowest boundary; no boundary: first code of the half
  function automatic int ref_phase(input logic [11:0] v, input logic t, output bit corr);
    int lo, best, bd, dd;
    lo = t ? 6 : 0;
    for (int p = 0; p < 12; p++)
      if (!v[p] && v[(p + 1) % 12] && (p >= lo) && (p < lo + 6)) begin
        corr = 0;
        return p;
      end
    corr = 1;
    for (int p = 0; p < 12; p++)
      if (!v[p] && v[(p + 1) % 12]) begin
        best = lo; bd = 99;
        for (int q = lo; q < lo + 6; q++) begin
          dd = (q - p + 12) % 12;
          if (12 - dd < dd) dd = 12 - dd;
          if (dd < bd) begin bd = dd; best = q; end
        end
        return best;
      end
    return lo;
  endfunction

  task automatic run(input logic [11:0] v, input logic t, input string what);
    int exp_p;
    bit exp_c;
    pl = v;
    t_check = t;
    #10;
    exp_p = ref_phase(v, t, exp_c);
    checks++;
    if (phase != 4'(exp_p) || corrected != exp_c) begin
      failures++;
      $display("FAIL %s: PL=%b T=%b phase=%0d corr=%b expected %0d/%b", what, v, t, phase, corrected, exp_p, exp_c);
    end
  endtask

  initial begin
    // clean patterns, Table 1 rows
    for (int p = 0; p < 12; p++) begin
      run(clean(p), p >= 6, "clean");
      checks++;
      if (phase != 4'(p) || corrected || raw_phase != 4'(p)) begin
        failures++;
        $display("FAIL clean %0d -> %0d", p, phase);
      end
    end
    // boundary in the wrong half
    run(clean(5), 1'b1, "5 with T=1");  checks++; if (phase != 4'd6)  failures++;
    run(clean(0), 1'b1, "0 with T=1");  checks++; if (phase != 4'd11) failures++;
    run(clean(6), 1'b0, "6 with T=0");  checks++; if (phase != 4'd5)  failures++;
    run(clean(11), 1'b0, "11 with T=0"); checks++; if (phase != 4'd0)  failures++;
    run(12'h000, 1'b1, "all low");      checks++; if (phase != 4'd6 || raw_phase != 4'hf) failures++;
    // bubbles
    for (int i = 0; i < 300; i++) begin
      logic [11:0] v;
      int p;
      p = $urandom_range(11);
      v = clean(p);
      v[$urandom_range(11)] ^= 1'b1;
      run(v, (p >= 6) ^ ($urandom_range(3) == 0), "bubble");
    end
    for (int i = 0; i < 300; i++) run(12'($urandom), 1'($urandom), "random");
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
