// dfc_phase_accumulator: the pulse-output DDS core, an N-bit phase
// accumulator with programmable step FCW.
//
// Every rising edge of clk (CK1) the accumulator adds FCW modulo 2^N. Its
// MSB is a square wave whose average frequency is f_CK * FCW / 2^N for
// 0 <= FCW <= 2^(N-1); its edges fall on the clock grid and so carry
// deterministic jitter. The remaining N-1 bits are the residue AR, which at
// an MSB edge tells how far (in units of T_CK/FCW) the edge is late.
//
// Interface: acc is the register contents (acc[N-1] = MSB_C,
// acc[N-2:0] = AR). fcw_q is the step that produced the current acc; the
// delay-word logic divides by it, so a change of FCW takes effect
// phase-continuously and each AR is always paired with its own step.
// Timing: one step per clk; acc and fcw_q change together just after clk.
// Reset to zero follows the text; fcw_q resets to 0 (no output until the
// first step), which is this design's choice.
module dfc_phase_accumulator #(
  parameter int unsigned N = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] fcw,
  output logic [N-1:0] acc,
  output logic [N-1:0] fcw_q
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      fcw_q <= '0;
    end else begin
      acc   <= acc + fcw;
      fcw_q <= fcw;
    end
  end

  // The output frequency formula holds only up to half the clock rate.
  a_fcw_range: assert property (@(posedge clk) fcw <= (N'(1) << (N - 1)))
    else $error("FCW above 2^(N-1)");

endmodule
