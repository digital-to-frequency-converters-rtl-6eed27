// dfc_edge_combiner: merges the outputs of the two interleaved fine DTCs
// into the converter's output square wave.
//
// DTC-R produces an edge for every rising output edge and DTC-F one for
// every falling edge. Each DTC output drives a toggle flip-flop; the output
// is the XOR of the two, so it rises on an o_r edge and falls on an o_f edge,
// with no dependence on the pulse width the DTCs produce. The toggle/XOR
// structure is this design's choice; the text only shows the two outputs
// being combined.
//
// Interface: o_r, o_f are rising-edge events; out is the DFC output.
// Timing: out follows the o_r / o_f rising edges with no clock involved.
// Reset (asynchronous, active low) clears both toggles, so out is low.
module dfc_edge_combiner (
  input  logic rst_n,
  input  logic o_r,
  input  logic o_f,
  output logic out
);
  timeunit 1ps;
  timeprecision 1fs;

  logic t_r, t_f;

  always_ff @(posedge o_r or negedge rst_n) begin
    if (!rst_n) t_r <= 1'b0;
    else        t_r <= ~t_r;
  end

  always_ff @(posedge o_f or negedge rst_n) begin
    if (!rst_n) t_f <= 1'b0;
    else        t_f <= ~t_f;
  end

  assign out = t_r ^ t_f;

endmodule
