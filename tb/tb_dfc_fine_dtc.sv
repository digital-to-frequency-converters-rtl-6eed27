// tb_dfc_fine_dtc: checks the behavioural fine-DTC model. Three instances
// are triggered with random 9-bit words (and the end codes): an ideal DTC,
// one with a parabolic INL of 3 LSB and a full-scale 3 LSB long, and one
// with a cubic INL of 10 LSB. The delay from trigger to output edge must
// equal offset + (DW + INL(DW)) * full-scale / 2^9, with the INL written
// out here from its defining polynomials, to within 2 fs. The output pulse
// must end within the pulse width.
module tb_dfc_fine_dtc;
  import dfc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  NB    = 9;
  localparam real T_CK  = 500.0;
  localparam real FS    = T_CK / 4.0;
  localparam real LSB   = FS / 512.0;
  localparam real T_OFF = 20.0;

  logic          trig = 1'b0;
  logic [NB-1:0] dw = '0;
  logic [2:0]    o;
  int checks = 0, failures = 0;

  dfc_fine_dtc #(.NB(NB), .T_CK_PS(T_CK), .T_OFF_PS(T_OFF)) u_ideal (
    .trig(trig), .dw_fine(dw), .o(o[0]));
  dfc_fine_dtc #(.NB(NB), .T_CK_PS(T_CK), .T_OFF_PS(T_OFF), .TAU_FS_PS(FS + 3.0 * LSB),
                 .INL_SHAPE(INL_PARABOLIC), .INL_MAX(3.0)) u_para (
    .trig(trig), .dw_fine(dw), .o(o[1]));
  dfc_fine_dtc #(.NB(NB), .T_CK_PS(T_CK), .T_OFF_PS(T_OFF),
                 .INL_SHAPE(INL_CUBIC), .INL_MAX(10.0)) u_cubic (
    .trig(trig), .dw_fine(dw), .o(o[2]));

  function automatic real rabs(real x); return (x < 0.0) ? -x : x; endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic real expected(int k, real x);
    real h = 256.0, f = 512.0;
    case (k)
      0: return T_OFF + x * LSB;
      1: return T_OFF + (x + (x * (x - f) * 3.0 / (h * h) + 2.0)) * (FS + 3.0 * LSB) / 512.0;
      default: return T_OFF + (x + x * (x - h) * (x - f) * 10.0
                               / ((3.0 - 2.2360679774997896) / 2.0 * h * h * h)) * LSB;
    endcase
  endfunction

  real t_rise [3];
  for (genvar k = 0; k < 3; k++) begin : g_mon
    always @(posedge o[k]) t_rise[k] = $realtime;
  end

  initial begin
    real t0;
    #100;
    for (int i = 0; i < 600; i++) begin
      dw = (i == 0) ? '0 : (i == 1) ? '1 : (i == 2) ? NB'(256) : NB'($urandom);
      t_rise = '{-1.0, -1.0, -1.0};
      #10 trig = 1'b1;
      t0 = $realtime;
      #200 trig = 1'b0;
      #200;
      for (int k = 0; k < 3; k++) begin
        check(rabs(t_rise[k] - t0 - expected(k, real'(dw))) < 0.002,
              $sformatf("DTC %0d dw %0d delay %0.4f expected %0.4f", k, dw,
                        t_rise[k] - t0, expected(k, real'(dw))));
        check(o[k] == 1'b0, "pulse ended");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(1000000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
