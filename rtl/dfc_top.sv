// dfc_top: DTC-based pulse-output digital-to-frequency converter (DFC).
//
// An N-bit phase accumulator adds FCW every clock; its MSB toggles at an
// average f_CK * FCW / 2^N but its edges sit on the clock grid. Each MSB
// edge is delayed by the amount that puts it on the ideal, evenly spaced
// grid, delayed by a fixed latency: a delay word DW computed from the
// accumulator residue selects a coarse delay (one of four clock phases, T_CK/4 apart)
// and a fine delay (two interleaved fine DTCs, one for rising and one for
// falling edges, each with N_DTC-2 bits over T_CK/4). The output is a 50%
// duty-cycle square wave whose residual timing error is below one DTC LSB,
// T_CK / 2^N_DTC.
//
// Blocks: dfc_clock_phases (CK1..CK4 from ck_ref), dfc_phase_accumulator
// (CK1), dfc_delay_word (CK4, pipelined), dfc_coarse_delay (phase
// selection and fine-word steering), two dfc_fine_dtc behavioural models
// (DTC-R, DTC-F) and dfc_edge_combiner.
//
// Interface: ck_ref at 2 f_CK (its period must be T_CK_PS/2 for the DTC
// model's full scale to match); fcw in 0..2^(N-1); out is the output. msb_c
// (raw accumulator MSB) and mr (coarse-retimed MSB) are brought out for
// observation. Timing: an accumulator MSB edge made at a CK1 edge reaches
// out (N_DTC+2)*T_CK + T_OFF_PS + DW*T_CK/2^N_DTC later (ideal DTCs): 3T/4
// to CK4, N_DTC cycles of delay-word pipeline, one cycle in the coarse
// register, T/4 to the first phase, then coarse and fine delay. The
// impairment parameters of the DTC models (INL shape and maximum, full-scale
// of each DTC) default to an ideal DTC.
module dfc_top
  import dfc_pkg::*;
#(
  parameter int unsigned N           = 12,
  parameter int unsigned N_DTC       = N - 1,
  parameter real         T_CK_PS     = 500.0,
  parameter real         T_OFF_PS    = 20.0,
  parameter real         TAU_FS_R_PS = T_CK_PS / 4.0,
  parameter real         TAU_FS_F_PS = T_CK_PS / 4.0,
  parameter inl_shape_e  INL_SHAPE   = INL_NONE,
  parameter real         INL_MAX     = 0.0
) (
  input  logic         ck_ref,
  input  logic         rst_n,
  input  logic [N-1:0] fcw,
  output logic         out,
  output logic         msb_c,
  output logic         mr
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [3:0]       ck;
  logic [N-1:0]     acc, fcw_q;
  logic             msb;
  logic [N_DTC-1:0] dw;
  logic             mrn;
  logic [N_DTC-3:0] dw_fine_r, dw_fine_f;
  logic             o_r, o_f;

  dfc_clock_phases u_phases (
    .ck_ref (ck_ref),
    .rst_n  (rst_n),
    .ck     (ck)
  );

  dfc_phase_accumulator #(.N(N)) u_acc (
    .clk   (ck[0]),
    .rst_n (rst_n),
    .fcw   (fcw),
    .acc   (acc),
    .fcw_q (fcw_q)
  );

  assign msb_c = acc[N-1];

  dfc_delay_word #(.N(N), .N_DTC(N_DTC)) u_dw (
    .clk   (ck[3]),
    .rst_n (rst_n),
    .acc   (acc),
    .fcw   (fcw_q),
    .msb   (msb),
    .dw    (dw)
  );

  dfc_coarse_delay #(.N_DTC(N_DTC)) u_coarse (
    .ck        (ck),
    .rst_n     (rst_n),
    .msb       (msb),
    .dw        (dw),
    .mr        (mr),
    .mrn       (mrn),
    .dw_fine_r (dw_fine_r),
    .dw_fine_f (dw_fine_f)
  );

  dfc_fine_dtc #(
    .NB(N_DTC - 2), .T_CK_PS(T_CK_PS), .TAU_FS_PS(TAU_FS_R_PS), .T_OFF_PS(T_OFF_PS),
    .INL_SHAPE(INL_SHAPE), .INL_MAX(INL_MAX)
  ) u_dtc_r (
    .trig    (mr),
    .dw_fine (dw_fine_r),
    .o       (o_r)
  );

  dfc_fine_dtc #(
    .NB(N_DTC - 2), .T_CK_PS(T_CK_PS), .TAU_FS_PS(TAU_FS_F_PS), .T_OFF_PS(T_OFF_PS),
    .INL_SHAPE(INL_SHAPE), .INL_MAX(INL_MAX)
  ) u_dtc_f (
    .trig    (mrn),
    .dw_fine (dw_fine_f),
    .o       (o_f)
  );

  dfc_edge_combiner u_comb (
    .rst_n (rst_n),
    .o_r   (o_r),
    .o_f   (o_f),
    .out   (out)
  );

endmodule
