// tb_dfc_top: end-to-end test of the DTC-based pulse-output DFC at its
// default size (N = 12, N_DTC = 11, T_CK = 500 ps, ideal DTCs).
//
// The testbench keeps its own unwrapped phase accumulator, stepped on each
// CK1 rise (every second ck_ref rise after reset). Whenever the phase
// crosses a multiple of 2^(N-1) it records one output edge: the ideal
// edge time t_ideal = t_k - AR*T_CK/FCW (t_k the clock edge of the step, AR
// the overshoot) and the exact expected output time
//   t_k + (N_DTC+2)*T_CK + T_OFF + DW*T_CK/2^N_DTC,
//   DW = 2^N_DTC - 1 - floor(AR*2^N_DTC/FCW).
// Each output transition must match its polarity and expected time (2 fs),
// and its distance from the ideal edge must be a constant latency plus a
// quantisation error in [0, 1 LSB): the deterministic jitter of the raw
// MSB (up to one clock period) is removed down to one DTC LSB.
//
// Workload: FCW = 1792 (16-cycle repetition), 1365 over a full 4096-cycle
// repetition, 2048 (an edge every clock), 1024 (edges on the clock grid),
// 3, then random phase-continuous FCW switches. Mechanisms counted, each
// must occur: every coarse phase on rising and on falling edges, AR = 0
// edges, edges on consecutive clocks, FCW switches, raw MSB edges off the
// ideal grid by more than one LSB.
module tb_dfc_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N     = 12;
  localparam int  N_DTC = 11;
  localparam real T_CK  = 500.0;
  localparam real LSB   = T_CK / 2048.0;
  localparam real T_OFF = 20.0;
  localparam real K_LAT = (N_DTC + 3) * T_CK + T_OFF - LSB;

  logic         ck_ref = 1'b0, rst_n = 1'b1;

  // Reset is asserted by a falling edge so the asynchronous clears act at once.
  initial #1 rst_n = 1'b0;
  logic [N-1:0] fcw = N'(1792);
  logic         out, msb_c, mr;
  int checks = 0, failures = 0;
  bit armed = 1'b0;  // monitors start when reset is released

  dfc_top dut (.ck_ref(ck_ref), .rst_n(rst_n), .fcw(fcw), .out(out), .msb_c(msb_c), .mr(mr));

  always #(T_CK / 4.0) ck_ref = ~ck_ref;

  function automatic real rabs(real x); return (x < 0.0) ? -x : x; endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  typedef struct {
    real  t_ideal;
    real  t_pred;
    logic pol;
  } edge_t;
  edge_t exp_q[$];

  longint unsigned phi = 0, next_thr = 1 << (N - 1);
  int  n_edges = 0, ck1_count = 0, ref_count = 0;
  int  n_coarse [2][4];
  int  n_ar0 = 0, n_consec = 0, n_switch = 0, n_raw_off = 0, n_out = 0;
  int  last_edge_ck = -10;
  real max_err = 0.0, min_err = 1.0e9;

  // Reference model of the accumulator and of the ideal output edges.
  always @(posedge ck_ref) if (armed) begin
    ref_count++;
    if (ref_count % 2 == 1) begin
      ck1_count++;
      phi += fcw;
      if (phi >= next_thr) begin
        automatic edge_t e;
        automatic longint unsigned ar = phi - next_thr;
        automatic longint unsigned f  = longint'(fcw);
        automatic longint unsigned dw = (64'd1 << N_DTC) - 1 - (ar << N_DTC) / f;
        automatic int c = int'(dw >> (N_DTC - 2));
        e.t_ideal = $realtime - real'(ar) * T_CK / real'(f);
        e.t_pred  = $realtime + (N_DTC + 2) * T_CK + T_OFF + real'(dw) * LSB;
        e.pol     = (n_edges % 2 == 0);
        exp_q.push_back(e);
        n_coarse[e.pol][c]++;
        if (ar == 0) n_ar0++;
        if (ck1_count == last_edge_ck + 1) n_consec++;
        if (real'(ar) * T_CK / real'(f) > LSB) n_raw_off++;
        last_edge_ck = ck1_count;
        n_edges++;
        next_thr += 1 << (N - 1);
      end
    end
  end

  // Output edges against the model.
  always @(out) if (armed) begin
    automatic real t = $realtime;
    n_out++;
    if (exp_q.size() == 0) begin
      check(1'b0, "unexpected output edge");
    end else begin
      automatic edge_t e = exp_q.pop_front();
      automatic real err = t - e.t_ideal - K_LAT;
      check(out == e.pol, "output polarity");
      check(rabs(t - e.t_pred) < 0.002,
            $sformatf("edge at %0.4f expected %0.4f", t, e.t_pred));
      check(err > -0.002 && err < LSB + 0.002,
            $sformatf("residual error %0.4f ps outside one LSB", err));
      if (err > max_err) max_err = err;
      if (err < min_err) min_err = err;
    end
  end

  task automatic run(int cycles);
    repeat (2 * cycles) @(posedge ck_ref);
  endtask

  task automatic set_fcw(int unsigned f);
    @(negedge ck_ref);
    if (N'(f) != fcw) n_switch++;
    fcw = N'(f);
  endtask

  initial begin
    #(5.3 * T_CK);
    check(out == 1'b0 && mr == 1'b0, "reset state");
    @(negedge ck_ref) rst_n = 1'b1;
    armed = 1'b1;
    run(300);
    set_fcw(1365);  run(4200);
    set_fcw(2048);  run(200);
    set_fcw(1024);  run(200);
    set_fcw(3);     run(1500);
    for (int i = 0; i < 60; i++) begin
      set_fcw($urandom_range(1, 1 << (N - 1)));
      run($urandom_range(5, 60));
    end
    set_fcw(0);     run(N_DTC + 6);
    check(exp_q.size() == 0, $sformatf("%0d expected output edges missing", exp_q.size()));
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < 4; c++)
        check(n_coarse[p][c] > 0, $sformatf("coarse phase %0d on %s edges", c, p ? "rising" : "falling"));
    check(n_ar0 > 0, "edges with AR = 0");
    check(n_consec > 0, "edges on consecutive clocks");
    check(n_switch >= 10, "FCW switches");
    check(n_raw_off > 0, "raw MSB edges off the ideal grid");
    $display("edges %0d (out %0d), AR=0 %0d, consecutive %0d, switches %0d, raw off-grid %0d",
             n_edges, n_out, n_ar0, n_consec, n_switch, n_raw_off);
    $display("coarse use rise %0d %0d %0d %0d fall %0d %0d %0d %0d",
             n_coarse[1][0], n_coarse[1][1], n_coarse[1][2], n_coarse[1][3],
             n_coarse[0][0], n_coarse[0][1], n_coarse[0][2], n_coarse[0][3]);
    $display("residual timing error after correction: %0.4f .. %0.4f ps (LSB %0.4f ps)",
             min_err, max_err, LSB);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(20000 * T_CK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
