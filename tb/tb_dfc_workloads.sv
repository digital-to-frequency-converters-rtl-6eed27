// tb_dfc_workloads: runs the converter in the configurations used to
// characterise it and checks every output edge and the worst spur:
//  - N = 12, N_DTC = 11, FCW = 1792, ideal DTC: about -73 dBc (quantisation),
//    at least 60 dB below the worst sub-harmonic of the raw MSB
//  - same with parabolic INL 3 LSB, 2 LSB clock-phase error, 3 LSB fine
//    full-scale error: about -60 dBc, spurs only at odd h
//  - same plus 3 LSB full-scale mismatch between DTC-R and DTC-F: spurs
//    also at even h
//  - N = 6, N_DTC = 5, FCW = 1..32, ideal DTC, against FCW/(2^N 2^N_DTC)
//  - N = 6, N_DTC = 5, odd FCW (parabolic from 5, cubic from 3), INL of 3 LSB, against
//    FCW (1 + zeta INLmax)/(2^N 2^N_DTC), zeta = 1 and 2/(3 - sqrt 5);
//    the same with an INL of 10 LSB
//  - N = 4, N_DTC = 3, FCW = 1..8 (FCW = 3 is the small worked example)
//  - N = 12, FCW = 1792 with only an R/F mismatch, sized for an average
//    duty cycle of 50 % +0.03 %, -0.03 % and +0.15 %: the second harmonic
//    follows the duty cycle and is below -60 dBc within 0.03 %.
// In every run the simulated spurs are also compared with spurs calculated
// from the quantisation-error expression with the impairments included.
module tb_dfc_workloads;
  import dfc_pkg::*;
  timeunit 1ps;
  timeprecision 1fs;

  int   c [13], f [13];
  logic d [13];

  dfc_spur_harness #(.N(12), .FCW_FIRST(1792), .FCW_LAST(1792), .TOL_DB(2.5), .MIN_GAIN_DB(60.0),
                     .NAME("quantisation N=12"))
    h0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  dfc_spur_harness #(.N(12), .FCW_FIRST(1792), .FCW_LAST(1792), .INL_SHAPE(INL_PARABOLIC), .INL_MAX(3.0),
                     .DUTY_ERR(2.0), .FS_R_ERR(3.0), .FS_F_ERR(3.0), .TARGET_DBC(-60.0), .TOL_DB(4.0),
                     .NAME("impairments N=12"))
    h1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  dfc_spur_harness #(.N(12), .FCW_FIRST(1792), .FCW_LAST(1792), .INL_SHAPE(INL_PARABOLIC), .INL_MAX(3.0),
                     .DUTY_ERR(2.0), .FS_R_ERR(3.0), .FS_F_ERR(6.0), .TARGET_DBC(-60.0), .TOL_DB(6.0),
                     .EVEN_SPURS(1'b1), .NAME("R/F mismatch N=12"))
    h2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  dfc_spur_harness #(.N(6), .FCW_FIRST(1), .FCW_LAST(32), .TOL_DB(2.5), .NAME("sweep N=6"))
    h3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  dfc_spur_harness #(.N(6), .FCW_FIRST(5), .FCW_LAST(31), .FCW_STEP(2), .INL_SHAPE(INL_PARABOLIC),
                     .INL_MAX(3.0), .ZETA(1.0), .TOL_DB(5.0), .NAME("parabolic INL N=6"))
    h4 (.checks(c[4]), .failures(f[4]), .done(d[4]));
  dfc_spur_harness #(.N(6), .FCW_FIRST(3), .FCW_LAST(31), .FCW_STEP(2), .INL_SHAPE(INL_CUBIC),
                     .INL_MAX(3.0), .ZETA(2.618), .TOL_DB(5.0), .NAME("cubic INL N=6"))
    h5 (.checks(c[5]), .failures(f[5]), .done(d[5]));
  dfc_spur_harness #(.N(6), .FCW_FIRST(5), .FCW_LAST(31), .FCW_STEP(2), .INL_SHAPE(INL_PARABOLIC),
                     .INL_MAX(10.0), .ZETA(1.0), .TOL_DB(5.0), .T_OFF(200.0), .NAME("parabolic INL 10 LSB N=6"))
    h8 (.checks(c[8]), .failures(f[8]), .done(d[8]));
  dfc_spur_harness #(.N(6), .FCW_FIRST(3), .FCW_LAST(31), .FCW_STEP(2), .INL_SHAPE(INL_CUBIC),
                     .INL_MAX(10.0), .ZETA(2.618), .TOL_DB(5.0), .T_OFF(200.0), .NAME("cubic INL 10 LSB N=6"))
    h9 (.checks(c[9]), .failures(f[9]), .done(d[9]));
  dfc_spur_harness #(.N(4), .FCW_FIRST(1), .FCW_LAST(8), .TOL_DB(3.0), .NAME("sweep N=4"))
    h6 (.checks(c[6]), .failures(f[6]), .done(d[6]));
  dfc_spur_harness #(.N(4), .FCW_FIRST(3), .FCW_LAST(3), .TOL_DB(3.0), .NAME("example N=4 FCW=3"))
    h7 (.checks(c[7]), .failures(f[7]), .done(d[7]));
  // Average duty cycle set by an R/F full-scale mismatch alone; the second
  // harmonic must follow |cos(pi d)| and stay below -60 dBc within 0.03 %.
  dfc_spur_harness #(.N(12), .FCW_FIRST(1792), .FCW_LAST(1792), .FS_R_ERR(0.0), .FS_F_ERR(2.4),
                     .EVEN_SPURS(1'b1), .CHECK_WORST(1'b0), .NAME("duty +0.03 % N=12"))
    h10 (.checks(c[10]), .failures(f[10]), .done(d[10]));
  dfc_spur_harness #(.N(12), .FCW_FIRST(1792), .FCW_LAST(1792), .FS_R_ERR(2.4), .FS_F_ERR(0.0),
                     .EVEN_SPURS(1'b1), .CHECK_WORST(1'b0), .NAME("duty -0.03 % N=12"))
    h11 (.checks(c[11]), .failures(f[11]), .done(d[11]));
  dfc_spur_harness #(.N(12), .FCW_FIRST(1792), .FCW_LAST(1792), .FS_R_ERR(0.0), .FS_F_ERR(12.0),
                     .EVEN_SPURS(1'b1), .CHECK_WORST(1'b0), .NAME("duty +0.15 % N=12"))
    h12 (.checks(c[12]), .failures(f[12]), .done(d[12]));

  initial begin
    int checks, failures;
    wait (d.and());
    checks = 0; failures = 0;
    for (int i = 0; i < 13; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(100000 * 500);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end
endmodule
