// phase_converter: the fine, sub-period part of the DCO phase measurement (it replaces a TDC).
//
// At each F_REF rising edge the 12 DCO phases are latched into PL and DCO_OUT[0] into T_CHECK.
// phase_decoder turns them into Phase (0..11), correcting latch errors. PC_OUT is Phase
// rotated by six so that it counts twelfths of a DCO period elapsed since the last DCO_OUT[0]
// rising edge, which is when the frequency counter increments; 12*count + PC_OUT is then one
// consistent DCO phase. FD_OUT = PC_OUT - previous PC_OUT (signed, -11..11) is the fine
// frequency code. The previous PC_OUT is held by a register clocked at the F_REF falling edge,
// so PC_OUT and FD_OUT are valid from the rising edge to the falling edge where the phase
// frequency detector samples them. One phase step is 1/12 of a DCO period (about 35 ps at
// 2.4 GHz). The latch, T_CHECK and decoder follow the published design; the rotation and the
// register split are this design's choice. Reset: asynchronous, active low.
`timescale 1ps/1fs
module phase_converter #(
  parameter int N_PHASES = 12,
  parameter int PHASE_W  = 4,
  parameter int FD_W     = 5
) (
  input  logic                    fref,
  input  logic                    rst_n,
  input  logic [N_PHASES-1:0]     dco_out,
  output logic [PHASE_W-1:0]      pc_out,
  output logic signed [FD_W-1:0]  fd_out,
  output logic                    latch_err
);

  logic [N_PHASES-1:0] pl;
  logic                t_check;
  logic [PHASE_W-1:0]  phase;
  logic [PHASE_W-1:0]  raw_phase;
  logic [PHASE_W-1:0]  pc_prev;

  always_ff @(posedge fref or negedge rst_n) begin
    if (!rst_n) begin
      pl      <= '0;
      t_check <= 1'b0;
    end else begin
      pl      <= dco_out;
      t_check <= dco_out[0];
    end
  end

  phase_decoder #(.N_PHASES(N_PHASES), .PHASE_W(PHASE_W)) u_dec (
    .pl        (pl),
    .t_check   (t_check),
    .phase     (phase),
    .raw_phase (raw_phase),
    .corrected (latch_err)
  );

  always_comb begin
    int unsigned r;
    r      = (int'(phase) + N_PHASES / 2) % N_PHASES;
    pc_out = PHASE_W'(r);
  end

  always_ff @(negedge fref or negedge rst_n) begin
    if (!rst_n) pc_prev <= '0;
    else        pc_prev <= pc_out;
  end

  assign fd_out = FD_W'(signed'({1'b0, pc_out})) - FD_W'(signed'({1'b0, pc_prev}));

endmodule
