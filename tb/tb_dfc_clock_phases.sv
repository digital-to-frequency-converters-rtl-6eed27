// tb_dfc_clock_phases: checks the four-phase generator. A 2 f_CK reference
// is applied; every rising edge of each phase is timed. Checks: the reset
// state, the period of each phase (T_CK), the offset of CK2..CK4 from the
// latest CK1 rise (k*T_CK/4) and the 50% duty cycle of CK1.
module tb_dfc_clock_phases;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_CK = 500.0;

  logic       ck_ref = 1'b0;
  logic       rst_n  = 1'b1;

  // Reset is asserted by a falling edge so the asynchronous clears act at once.
  initial #1 rst_n = 1'b0;
  logic [3:0] ck;
  int checks = 0, failures = 0;
  bit armed = 1'b0;  // monitors start when reset is released

  dfc_clock_phases dut (.ck_ref(ck_ref), .rst_n(rst_n), .ck(ck));

  always #(T_CK / 4.0) ck_ref = ~ck_ref;

  function automatic real rabs(real x); return (x < 0.0) ? -x : x; endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  real last_rise [4];
  int  nrise [4] = '{0, 0, 0, 0};
  real last_fall0 = -1.0;

  for (genvar k = 0; k < 4; k++) begin : g_mon
    always @(posedge ck[k]) if (armed) begin
      if (nrise[k] > 0)
        check(rabs($realtime - last_rise[k] - T_CK) < 0.01, $sformatf("period of CK%0d", k + 1));
      if (k > 0 && nrise[0] > 0)
        check(rabs($realtime - last_rise[0] - k * T_CK / 4.0) < 0.01,
              $sformatf("phase of CK%0d", k + 1));
      last_rise[k] = $realtime;
      nrise[k]++;
    end
  end

  always @(negedge ck[0]) if (armed && nrise[0] > 0) begin
    check(rabs($realtime - last_rise[0] - T_CK / 2.0) < 0.01, "CK1 duty cycle");
    last_fall0 = $realtime;
  end

  initial begin
    #(3.1 * T_CK);
    check(ck == 4'b1100, "reset state");
    @(negedge ck_ref);
    rst_n = 1'b1;
    armed = 1'b1;
    repeat (200) @(posedge ck_ref);
    for (int k = 0; k < 4; k++) check(nrise[k] >= 99, $sformatf("CK%0d toggles", k + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(1000.0 * T_CK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
