// dfc_fine_dtc: behavioural model of one fine digital-to-time converter
// (DTC-R or DTC-F). This is a model of an analog/mixed-signal part, not
// synthesizable logic: the fine DTC of a real converter is a constant-slope,
// variable-current or variable-load delay cell.
//
// On each rising edge of trig the model samples dw_fine and, after
//     t = T_OFF_PS + (dw_fine + INL(dw_fine)) * TAU_FS_PS / 2^NB
// raises o for PW_PS. The model is characterised, as the architecture
// characterises any DTC, only by its number of bits NB (= N_DTC - 2), its
// full-scale TAU_FS_PS (nominally T_CK/4, the span of one coarse phase),
// its INL (shape and maximum, in LSB, see dfc_pkg::inl_lsb) and a fixed
// offset. Full-scale errors and an R/F full-scale mismatch are set through
// TAU_FS_PS of each instance. The offset T_OFF_PS and pulse width PW_PS are
// this model's choices; a constant offset only shifts every output edge.
//
// Interface: trig is MR (DTC-R) or MRN (DTC-F); dw_fine must be stable at
// the trigger edge; o is a pulse whose rising edge carries the timing.
// One conversion at a time: a new trigger must come after the previous
// pulse has ended, which the interleaving guarantees. A delay that would
// be negative (INL larger than the offset covers) is reported with $error
// and clamped to zero.
//
// The delay below draws a ZERODLY warning from Verilator because its value
// is only known at run time. That is the nature of a DTC model; the delay
// is never below zero, and the warning is left to stand (build with
// -Wno-fatal).
module dfc_fine_dtc
  import dfc_pkg::*;
#(
  parameter int unsigned NB         = 9,
  parameter real         T_CK_PS    = 500.0,
  parameter real         TAU_FS_PS  = T_CK_PS / 4.0,
  parameter real         T_OFF_PS   = 20.0,
  parameter real         PW_PS      = T_CK_PS / 8.0,
  parameter inl_shape_e  INL_SHAPE  = INL_NONE,
  parameter real         INL_MAX    = 0.0
) (
  input  logic          trig,
  input  logic [NB-1:0] dw_fine,
  output logic          o
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real LSB_PS = TAU_FS_PS / real'(64'd1 << NB);

  initial o = 1'b0;

  always @(posedge trig) begin : convert
    automatic real delay_ps = T_OFF_PS
        + (real'(dw_fine) + inl_lsb(INL_SHAPE, INL_MAX, 32'(dw_fine), NB)) * LSB_PS;
    // An INL larger than offset allows would need a negative delay.
    if (delay_ps < 0.0) begin
      $error("DTC delay %0.3f ps is negative: raise T_OFF_PS", delay_ps);
      delay_ps = 0.0;
    end
    fork
      begin
        #(delay_ps) o <= 1'b1;
        #(PW_PS)    o <= 1'b0;
      end
    join_none
  end

endmodule
