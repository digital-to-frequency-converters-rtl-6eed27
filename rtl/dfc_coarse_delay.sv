// dfc_coarse_delay: coarse half of the DTC and the steering of the fine word
// to the two time-interleaved fine DTCs.
//
// The two MSBs of the delay word pick one of the four clock phases CK1..CK4
// to resample the MSB, producing MR: a coarse delay of (c+1)*T_CK/4 after
// the CK4 edge on which the MSB changed, c = dw[N_DTC-1:N_DTC-2]. The
// remaining N_DTC-2 bits are the fine word. Rising MSB edges are converted
// by DTC-R (triggered by MR), falling ones by DTC-F (triggered by MRN), so
// the fine word of a rising edge is held in dw_fine_r and that of a falling
// edge in dw_fine_f until the same edge type comes again, at least two
// clock periods later.
//
// How: a CK4 register stage takes msb and dw and, when the incoming MSB
// differs from the registered one, loads the fine word into the register of
// the DTC that will convert that edge. Four flip-flops, one per phase,
// sample the registered MSB; MR is the one chosen by the registered coarse
// bits. All four flip-flops agree whenever the select changes (at a CK4
// edge, after CK4 has sampled the previous value), so the selection never
// glitches. The phase selection follows the architecture; the register
// stage and this glitch-free mux arrangement are this design's choice.
//
// Interface: ck = {CK4,CK3,CK2,CK1}; msb and dw in the CK4 domain. Latency:
// one CK4 cycle plus the coarse delay. Reset clears everything (MR low).
module dfc_coarse_delay #(
  parameter int unsigned N_DTC = 11
) (
  input  logic [3:0]       ck,
  input  logic             rst_n,
  input  logic             msb,
  input  logic [N_DTC-1:0] dw,
  output logic             mr,
  output logic             mrn,
  output logic [N_DTC-3:0] dw_fine_r,
  output logic [N_DTC-3:0] dw_fine_f
);
  timeunit 1ps;
  timeprecision 1fs;

  logic       msb_q;
  logic [1:0] sel_q;
  logic [3:0] smp;

  always_ff @(posedge ck[3] or negedge rst_n) begin
    if (!rst_n) begin
      msb_q     <= 1'b0;
      sel_q     <= 2'd0;
      dw_fine_r <= '0;
      dw_fine_f <= '0;
    end else begin
      msb_q <= msb;
      sel_q <= dw[N_DTC-1 -: 2];
      if (msb && !msb_q) dw_fine_r <= dw[N_DTC-3:0];
      if (!msb && msb_q) dw_fine_f <= dw[N_DTC-3:0];
    end
  end

  for (genvar k = 0; k < 4; k++) begin : g_phase
    logic s;
    always_ff @(posedge ck[k] or negedge rst_n) begin
      if (!rst_n) s <= 1'b0;
      else        s <= msb_q;
    end
    assign smp[k] = s;
  end

  assign mr  = smp[sel_q];
  assign mrn = ~mr;

endmodule
