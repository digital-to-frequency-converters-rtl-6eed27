// dfc_delay_word: delay-word logic of the DFC, clocked by CK4.
//
// For each accumulator state it computes the DTC delay word that moves an
// MSB edge from its clock-grid position to the ideal position. The ideal
// causal delay is (FCW - AR) * T_CK / FCW, i.e. (FCW - AR) * 2^N_DTC / FCW
// DTC LSBs, which lies in (0, 2^N_DTC]. This module computes
//     DW = 2^N_DTC - 1 - floor(AR * 2^N_DTC / FCW)
// which equals that ideal value quantised upwards and lowered by one fixed
// LSB. The fixed LSB is a rigid shift of every edge and keeps DW within
// N_DTC bits for AR = 0 (the text quantises by truncation, whose
// full-scale value 2^N_DTC would need one more bit); the spur behaviour of
// upward and downward quantisation is the same.
//
// How: the fraction AR/FCW is formed by an N_DTC-stage pipelined restoring
// divider, one quotient bit per CK4 stage, so a new word is produced every
// cycle (an MSB edge can occur every cycle when FCW = 2^(N-1)). The
// quotient is then complemented. MSB_C and FCW travel down the pipeline
// with AR, so msb/dw at the output always belong to the same accumulator
// state: this is the repeated CK4 resampling of MSB_C that matches the
// latency of the logic.
//
// Interface: acc/fcw are the accumulator register and the step that
// produced it (CK1 domain, stable at CK4). Outputs msb and dw are registered
// on CK4. Latency: a state sampled on one CK4 edge reaches msb/dw N_DTC
// edges later (N_DTC + 1 register stages). dw is meaningful
// in cycles where msb differs from its previous value (the edges); in other
// cycles the residue may exceed FCW and dw is don't-care. FCW = 0 gives no
// edges. The divider structure and latency are this design's choices.
module dfc_delay_word #(
  parameter int unsigned N     = 12,
  parameter int unsigned N_DTC = N - 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     acc,
  input  logic [N-1:0]     fcw,
  output logic             msb,
  output logic [N_DTC-1:0] dw
);
  timeunit 1ps;
  timeprecision 1fs;

  typedef struct packed {
    logic             msb;
    logic [N-1:0]     div;  // divisor: FCW of this accumulator state
    logic [N-1:0]     rem;  // partial remainder
    logic [N_DTC-1:0] quo;  // quotient bits produced so far
  } stage_t;

  stage_t st [N_DTC+1];

  // One restoring-division step: shift, compare, subtract.
  function automatic stage_t div_step(stage_t s);
    stage_t   r;
    logic [N:0] sh;
    r  = s;
    sh = {s.rem, 1'b0};
    if (sh >= {1'b0, s.div}) begin
      sh    = sh - {1'b0, s.div};
      r.quo = {s.quo[N_DTC-2:0], 1'b1};
    end else begin
      r.quo = {s.quo[N_DTC-2:0], 1'b0};
    end
    r.rem = sh[N-1:0];
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i <= N_DTC; i++) st[i] <= '0;
    end else begin
      st[0].msb <= acc[N-1];
      st[0].div <= fcw;
      st[0].rem <= {1'b0, acc[N-2:0]};
      st[0].quo <= '0;
      for (int i = 1; i <= N_DTC; i++) st[i] <= div_step(st[i-1]);
    end
  end

  assign msb = st[N_DTC].msb;
  assign dw  = ~st[N_DTC].quo;

endmodule
