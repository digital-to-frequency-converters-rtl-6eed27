// dfc_clock_phases: four-phase clock generator for the DFC.
//
// The reference clock runs at twice the converter clock (f_ref = 2 f_CK).
// A divide-by-2 flip-flop on the rising edge of ck_ref gives CK1; a second
// flip-flop on the falling edge of ck_ref re-times CK1 by half a reference
// period, i.e. a quarter of T_CK, giving CK2. CK3 and CK4 are their
// complements. The result is four phases of f_CK at 0, 90, 180 and 270
// degrees, spaced T_CK/4, which the coarse delay selects between.
//
// Interface: ck[0] = CK1, ck[1] = CK2, ck[2] = CK3, ck[3] = CK4.
// Timing: CK1 rises on the first ck_ref rising edge after reset is released;
// CK2 follows T_CK/4 later. While rst_n is low CK1 and CK2 are low and CK3 and
// CK4 are high. A duty-cycle error of ck_ref moves CK2/CK4 relative to
// CK1/CK3, which is the clock-phase timing error the design is sensitive to.
// The two-flip-flop divider structure is this design's choice; the four
// phases obtained with dividers by 2 and their spacing follow the
// architecture.
module dfc_clock_phases (
  input  logic       ck_ref,
  input  logic       rst_n,
  output logic [3:0] ck
);
  timeunit 1ps;
  timeprecision 1fs;

  logic ph0;  // CK1
  logic ph90; // CK2

  always_ff @(posedge ck_ref or negedge rst_n) begin
    if (!rst_n) ph0 <= 1'b0;
    else        ph0 <= ~ph0;
  end

  always_ff @(negedge ck_ref or negedge rst_n) begin
    if (!rst_n) ph90 <= 1'b0;
    else        ph90 <= ph0;
  end

  assign ck = {~ph90, ~ph0, ph90, ph0};

endmodule
