// dfc_spur_harness: runs one dfc_top configuration over a range of FCW
// values and measures the worst sub-harmonic spur of its output.
//
// For each FCW the harness resets the converter (accumulator at zero),
// lets it run, and times the first L = 2*FCW/GCD(2^N, FCW) output edges.
// Each edge is checked against the exact expected time, which includes the
// DTC impairments this instance is built with (INL of the fine word,
// full-scale of DTC-R/DTC-F, and a reference duty-cycle error that moves
// CK2 and CK4). From the edge errors tau_q[l] (after removing the constant
// latency) it forms q_e[l] = (-1)^(l+1) tau_q[l] / LSB, its DFT Q_e[h], and
// the spur strength relative to the fundamental,
//   |X_h| / (A/pi) = pi * |Q_e[h]| / (GRR * 2^N_DTC),  h = 1 .. L/2-1.
// The worst spur is compared with the closed-form estimate
//   FCW * (1 + ZETA * INL_MAX) / (2^N * 2^N_DTC)
// or with TARGET_DBC when that is non-zero, within TOL_DB. EVEN_SPURS says
// whether spurs at even h must be present (R/F mismatch) or absent.
// FCW values that are powers of two (no fractional spurs) are skipped.
//
// Two further checks per FCW:
// * the same DFT applied to q_e calculated from the error expression
//   DW_coarse + (DW_fine + INL) * tau_FS / (T_CK/4) + EW_CKph - DW_ideal
//   must give every spur within 20 dB of the worst to CALC_TOL_DB (the
//   1 fs time resolution limits the agreement to a few hundredths of a dB);
// * the second harmonic of the output, found from the edge times, must
//   follow the average duty cycle d as |cos(pi d)| within 0.5 dB, be below
//   -60 dBc when |d - 50 %| <= 0.03 %, and vanish at exactly 50 %.
// * the exact line spectra of MSB_C and of out, from their edge times: for
//   N_DTC >= 8 the output's worst sub-harmonic must match the q_e result
//   within 0.1 dB, and it must lie MIN_GAIN_DB below that of MSB_C.
// CHECK_WORST = 0 drops the worst-spur comparison for runs that only
// examine the duty cycle.
module dfc_spur_harness
  import dfc_pkg::*;
#(
  parameter int unsigned N          = 6,
  parameter int unsigned N_DTC      = N - 1,
  parameter int unsigned FCW_FIRST  = 1,
  parameter int unsigned FCW_LAST   = 1,
  parameter int unsigned FCW_STEP   = 1,
  parameter inl_shape_e  INL_SHAPE  = INL_NONE,
  parameter real         INL_MAX    = 0.0,
  parameter real         ZETA       = 0.0,
  parameter real         FS_R_ERR   = 0.0,   // LSB
  parameter real         FS_F_ERR   = 0.0,   // LSB
  parameter real         DUTY_ERR   = 0.0,   // LSB, CK2/CK4 late
  parameter real         TARGET_DBC = 0.0,
  parameter real         TOL_DB     = 2.5,
  parameter bit          EVEN_SPURS = 1'b0,
  parameter real         T_OFF      = 20.0,  // ps, DTC offset
  parameter real         CALC_TOL_DB = 0.1,
  parameter bit          CHECK_WORST = 1'b1,
  parameter real         MIN_GAIN_DB = 0.0,   // required spur reduction MSB_C -> out
  parameter string       NAME       = "run"
) (
  output int   checks,
  output int   failures,
  output logic done
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_CK  = 500.0;
  localparam real LSB   = T_CK / real'(64'd1 << N_DTC);
  localparam int  NB    = N_DTC - 2;
  localparam real PI    = 3.141592653589793;

  logic         ck_ref = 1'b0, rst_n = 1'b1;

  // Reset is asserted by a falling edge so the asynchronous clears act at once.
  initial #1 rst_n = 1'b0;
  logic [N-1:0] fcw = '0;
  logic         out, msb_c, mr;

  dfc_top #(
    .N(N), .N_DTC(N_DTC), .T_CK_PS(T_CK), .T_OFF_PS(T_OFF),
    .TAU_FS_R_PS(T_CK / 4.0 + FS_R_ERR * LSB), .TAU_FS_F_PS(T_CK / 4.0 + FS_F_ERR * LSB),
    .INL_SHAPE(INL_SHAPE), .INL_MAX(INL_MAX)
  ) dut (.ck_ref(ck_ref), .rst_n(rst_n), .fcw(fcw), .out(out), .msb_c(msb_c), .mr(mr));

  // Reference clock; a duty-cycle error delays its falling edge.
  initial forever begin
    ck_ref = 1'b1; #(T_CK / 4.0 + DUTY_ERR * LSB);
    ck_ref = 1'b0; #(T_CK / 4.0 - DUTY_ERR * LSB);
  end

  function automatic real rabs(real x); return (x < 0.0) ? -x : x; endfunction
  function automatic real db(real x); return 20.0 * $log10(x); endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%s] %s at %0t", NAME, what, $realtime);
    end
  endtask

  // Independent INL polynomials (same definitions as the DTC is built to).
  function automatic real inl(real x);
    real f = real'(64'd1 << NB), h = f / 2.0;
    case (INL_SHAPE)
      INL_PARABOLIC: return x * (x - f) * INL_MAX / (h * h) + (2.0 / 3.0) * INL_MAX;
      INL_CUBIC:     return x * (x - h) * (x - f) * INL_MAX / ((3.0 - 2.2360679774997896) / 2.0 * h * h * h);
      default:       return 0.0;
    endcase
  endfunction

  typedef struct {
    real  t_ideal;
    real  t_pred;
    real  q_calc;   // DW error from the impairment expression, LSB
    logic pol;
  } edge_t;
  edge_t exp_q[$];
  real   tq[$];
  real   qc[$];
  real   te[$];
  real   tm[$];
  bit    collecting = 1'b0;
  int    ref_count = 0;
  longint unsigned phi = 0, next_thr = 0;
  int    n_edges = 0;
  real   mags[$], cmags[$];
  int    n_duty = 0;
  real   max_dev = 0.0;

  always @(posedge ck_ref) if (rst_n && collecting) begin
    ref_count++;
    if (ref_count % 2 == 1) begin
      phi += 64'(fcw);
      if (phi >= next_thr) begin
        automatic edge_t e;
        automatic longint unsigned ar = phi - next_thr;
        automatic longint unsigned f  = longint'(fcw);
        automatic longint unsigned dw = (64'd1 << N_DTC) - 1 - (ar << N_DTC) / f;
        automatic int unsigned c    = 32'(dw >> NB);
        automatic int unsigned fine = 32'(dw % (64'd1 << NB));
        automatic bit  pol = (n_edges % 2 == 0);
        automatic real fs  = T_CK / 4.0 + (pol ? FS_R_ERR : FS_F_ERR) * LSB;
        e.t_ideal = $realtime - real'(ar) * T_CK / real'(f);
        e.t_pred  = $realtime + (N_DTC + 2) * T_CK + T_OFF + real'(c) * T_CK / 4.0
                  + (real'(fine) + inl(real'(fine))) * fs / real'(64'd1 << NB)
                  + ((c % 2 == 1) ? DUTY_ERR * LSB : 0.0);
        // Error expression: DW_coarse + (DW_fine + INL) * tau_FS / (T_CK/4)
        // + EW_CKph - DW_ideal, all in LSB, with DW_ideal = (FCW - AR) 2^N_DTC / FCW.
        e.q_calc = real'(c) * real'(64'd1 << NB)
                 + (real'(fine) + inl(real'(fine))) * fs / (T_CK / 4.0)
                 + ((c % 2 == 1) ? DUTY_ERR : 0.0)
                 - (real'(f) - real'(ar)) * real'(64'd1 << N_DTC) / real'(f);
        e.pol = pol;
        exp_q.push_back(e);
        n_edges++;
        next_thr += 64'd1 << (N - 1);
      end
    end
  end

  always @(msb_c) if (rst_n && collecting) tm.push_back($realtime);

  // Worst sub-harmonic of a square wave with edge times t (rising first),
  // period p and fundamental at index k0 = L/2, relative to the fundamental:
  // the line at m/p has weight S(m)/m with S(m) = sum of +-exp(-j 2 pi m t / p).
  function automatic real worst_sub(ref real t[$], input int L, input real p);
    real s0, w, sr, si, sg, a;
    w = 0.0;
    s0 = 0.0;
    for (int m = 1; m <= L / 2; m++) begin
      sr = 0.0;
      si = 0.0;
      for (int l = 0; l < L; l++) begin
        sg = (l % 2 == 0) ? 1.0 : -1.0;
        sr += sg * $cos(2.0 * PI * real'(m) * (t[l] - t[0]) / p);
        si -= sg * $sin(2.0 * PI * real'(m) * (t[l] - t[0]) / p);
      end
      a = $sqrt(sr * sr + si * si) / real'(m);
      if (m == L / 2) s0 = a;
      else if (a > w) w = a;
    end
    return w / s0;
  endfunction

  always @(out) if (rst_n && collecting) begin
    if (exp_q.size() == 0) begin
      check(1'b0, "unexpected output edge");
    end else begin
      automatic edge_t e = exp_q.pop_front();
      check(out == e.pol, "output polarity");
      check(rabs($realtime - e.t_pred) < 0.003,
            $sformatf("FCW %0d edge at %0.4f expected %0.4f", fcw, $realtime, e.t_pred));
      tq.push_back($realtime - e.t_ideal - ((N_DTC + 3) * T_CK + T_OFF));
      qc.push_back(e.q_calc);
      te.push_back($realtime);
    end
  end

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    for (int unsigned fv = FCW_FIRST; fv <= FCW_LAST; fv += FCW_STEP) begin
      int unsigned g, L, grr;
      real worst_odd, worst_even, est, lim;
      g = 1;
      while ((fv % (g * 2) == 0) && (g * 2 <= (1 << N))) g *= 2;
      L   = 2 * fv / g;
      grr = (1 << N) / g;
      if (L <= 2) continue;
      // Reset, start from zero with this FCW, time L output edges.
      rst_n = 1'b0; collecting = 1'b0;
      fcw = N'(fv);
      repeat (8) @(posedge ck_ref);
      exp_q.delete(); tq.delete(); qc.delete(); te.delete(); tm.delete();
      phi = 0; next_thr = 64'd1 << (N - 1); n_edges = 0; ref_count = 0;
      @(negedge ck_ref);
      rst_n = 1'b1; collecting = 1'b1;
      while (tq.size() < L) @(posedge ck_ref);
      // DFT of q_e over one period of L edges.
      // The same DFT of the calculated q_e gives the calculated spurs.
      worst_odd = 0.0; worst_even = 0.0;
      mags.delete(); cmags.delete();
      for (int h = 1; h < int'(L) / 2; h++) begin
        real re, im, cre, cim, mag, q, ph;
        re = 0.0;
        im = 0.0;
        cre = 0.0;
        cim = 0.0;
        for (int l = 1; l <= int'(L); l++) begin
          ph = 2.0 * PI * h * l / L;
          q = ((l % 2 == 1) ? 1.0 : -1.0) * tq[l-1] / LSB;
          re += q * $cos(ph);
          im -= q * $sin(ph);
          q = ((l % 2 == 1) ? 1.0 : -1.0) * qc[l-1];
          cre += q * $cos(ph);
          cim -= q * $sin(ph);
        end
        mag = PI * $sqrt(re * re + im * im) / (real'(grr) * real'(64'd1 << N_DTC));
        mags.push_back(mag);
        cmags.push_back(PI * $sqrt(cre * cre + cim * cim) / (real'(grr) * real'(64'd1 << N_DTC)));
        if (h % 2 == 1) begin if (mag > worst_odd)  worst_odd  = mag; end
        else            begin if (mag > worst_even) worst_even = mag; end
      end
      est = (TARGET_DBC != 0.0) ? TARGET_DBC
          : db(real'(fv) * (1.0 + ZETA * INL_MAX) / (real'(64'd1 << N) * real'(64'd1 << N_DTC)));
      lim = (worst_odd > worst_even) ? worst_odd : worst_even;
      $display("[%s] N=%0d N_DTC=%0d FCW=%0d L=%0d GRR=%0d worst spur %0.2f dBc (odd h %0.2f, even h %0.2f), estimate %0.2f dBc",
               NAME, N, N_DTC, fv, L, grr, db(lim + 1e-30), db(worst_odd + 1e-30),
               db(worst_even + 1e-30), est);
      if (CHECK_WORST) check(rabs(db(lim + 1e-30) - est) <= TOL_DB,
            $sformatf("FCW %0d worst spur %0.2f dBc vs %0.2f dBc", fv, db(lim + 1e-30), est));
      // Simulated against calculated spurs, for every spur within 20 dB
      // of the worst one.
      begin
        real dev;
        dev = 0.0;
        foreach (mags[i]) if (db(mags[i] + 1e-30) > db(lim + 1e-30) - 20.0) begin
          if (rabs(db(mags[i]) - db(cmags[i] + 1e-30)) > dev)
            dev = rabs(db(mags[i]) - db(cmags[i] + 1e-30));
        end
        check(dev <= CALC_TOL_DB,
              $sformatf("FCW %0d simulated and calculated spurs differ by %0.4f dB", fv, dev));
        if (dev > max_dev) max_dev = dev;
      end
      // Second harmonic of the output against its average duty cycle d:
      // a square wave with duty d has |X_2| / |X_1| = |cos(pi d)|.
      begin
        real hi, d, p, s1r, s1i, s2r, s2i, sg, h2, h2_pred;
        hi = 0.0; s1r = 0.0; s1i = 0.0; s2r = 0.0; s2i = 0.0;
        p = real'(grr) * T_CK;
        for (int l = 0; l < int'(L); l++) begin
          if (l % 2 == 1) hi += te[l] - te[l-1];
          sg = (l % 2 == 0) ? 1.0 : -1.0;
          s1r += sg * $cos(2.0 * PI * real'(L / 2) * (te[l] - te[0]) / p);
          s1i -= sg * $sin(2.0 * PI * real'(L / 2) * (te[l] - te[0]) / p);
          s2r += sg * $cos(2.0 * PI * real'(L) * (te[l] - te[0]) / p);
          s2i -= sg * $sin(2.0 * PI * real'(L) * (te[l] - te[0]) / p);
        end
        d  = hi / p;
        h2 = $sqrt(s2r * s2r + s2i * s2i) / (2.0 * $sqrt(s1r * s1r + s1i * s1i));
        h2_pred = rabs($cos(PI * d));
        $display("[%s] FCW=%0d duty %0.5f %%, second harmonic %0.2f dBc (from duty %0.2f dBc)",
                 NAME, fv, 100.0 * d, db(h2 + 1e-30), db(h2_pred + 1e-30));
        if (rabs(d - 0.5) > 1e-6) begin
          check(rabs(db(h2) - db(h2_pred)) <= 0.5,
                $sformatf("FCW %0d second harmonic %0.2f dBc, duty predicts %0.2f dBc",
                          fv, db(h2), db(h2_pred)));
          if (rabs(d - 0.5) <= 0.0003) check(db(h2) < -60.0, "second harmonic below -60 dBc within 0.03 % duty error");
          n_duty++;
        end else begin
          check(h2 < 1e-4, "no second harmonic at 50 % duty");
        end
      end
      // Exact line spectra of the raw MSB and of the output.
      begin
        real w_out, w_msb;
        w_out = worst_sub(te, int'(L), real'(grr) * T_CK);
        w_msb = worst_sub(tm, int'(L), real'(grr) * T_CK);
        $display("[%s] FCW=%0d exact worst sub-harmonic: MSB_C %0.2f dBc, out %0.2f dBc (reduction %0.1f dB)",
                 NAME, fv, db(w_msb), db(w_out + 1e-30), db(w_msb) - db(w_out + 1e-30));
        check(tm.size() >= L, "MSB_C edges collected");
        if (N_DTC >= 8) check(rabs(db(w_out) - db(lim)) <= 0.1,
                              $sformatf("FCW %0d exact %0.3f dBc vs q_e estimate %0.3f dBc",
                                        fv, db(w_out), db(lim)));
        if (MIN_GAIN_DB > 0.0) check(db(w_msb) - db(w_out) >= MIN_GAIN_DB,
                                     $sformatf("FCW %0d spur reduction %0.1f dB", fv, db(w_msb) - db(w_out)));
      end
      if (EVEN_SPURS) check(db(worst_even + 1e-30) > db(worst_odd + 1e-30) - 30.0 && L >= 8,
                            "even-h spurs present with R/F mismatch");
      else if (L >= 6) check(db(worst_even + 1e-30) < db(worst_odd + 1e-30) - 40.0,
                             "half-wave symmetry: no even-h spurs");
      collecting = 1'b0;
    end
    $display("[%s] simulated vs calculated spurs: largest difference %0.4f dB", NAME, max_dev);
    done = 1'b1;
  end
endmodule
