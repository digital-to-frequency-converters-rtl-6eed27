// tb_dfc_coarse_delay: checks the coarse phase selection and fine-word
// steering. The testbench makes the four clock phases itself and, after
// every CK4 edge, applies a random MSB (toggling about half the time) and a
// random delay word. A change of MSB applied after CK4 edge e must appear
// on MR at t(e) + T_CK + (c+1)*T_CK/4, c = two MSBs of the word, with no
// other MR transitions; at an MR rise dw_fine_r, and at a fall dw_fine_f,
// must hold the fine bits of that word. MRN must be the complement of MR.
// Every coarse value 0..3 must be exercised on both edge polarities.
module tb_dfc_coarse_delay;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N_DTC = 11;
  localparam real T_CK  = 500.0;

  logic [3:0]       ck = 4'b1100;
  logic             rst_n = 1'b1;

  // Reset is asserted by a falling edge so the asynchronous clears act at once.
  initial #1 rst_n = 1'b0;
  logic             msb = 1'b0;
  logic [N_DTC-1:0] dw = '0;
  logic             mr, mrn;
  logic [N_DTC-3:0] dw_fine_r, dw_fine_f;
  int checks = 0, failures = 0;
  bit armed = 1'b0;  // monitors start when reset is released

  dfc_coarse_delay #(.N_DTC(N_DTC)) dut (
    .ck(ck), .rst_n(rst_n), .msb(msb), .dw(dw), .mr(mr), .mrn(mrn),
    .dw_fine_r(dw_fine_r), .dw_fine_f(dw_fine_f));

  // CK1 rises at 0, CK2 at T/4, CK3 at T/2, CK4 at 3T/4 (modulo T).
  initial begin
    forever begin
      ck[0] = 1'b1; ck[2] = 1'b0; #(T_CK / 4.0);
      ck[1] = 1'b1; ck[3] = 1'b0; #(T_CK / 4.0);
      ck[0] = 1'b0; ck[2] = 1'b1; #(T_CK / 4.0);
      ck[1] = 1'b0; ck[3] = 1'b1; #(T_CK / 4.0);
    end
  end

  function automatic real rabs(real x); return (x < 0.0) ? -x : x; endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  typedef struct {
    real              t;
    logic             val;
    logic [N_DTC-3:0] fine;
  } exp_t;
  exp_t exp_q[$];
  int   seen [2][4];

  always @(posedge ck[3]) if (armed) begin
    automatic real te = $realtime;
    automatic logic nm;
    #1;
    nm = ($urandom_range(0, 1) == 1) ? ~msb : msb;
    dw = N_DTC'($urandom);
    if (nm != msb) begin
      automatic exp_t e;
      automatic int   c = int'(dw[N_DTC-1 -: 2]);
      e.t    = te + T_CK + real'(c + 1) * T_CK / 4.0;
      e.val  = nm;
      e.fine = dw[N_DTC-3:0];
      exp_q.push_back(e);
      seen[nm][c]++;
    end
    msb = nm;
  end

  always @(mr) if (armed) begin
    exp_t e;
    #0.001;
    if (exp_q.size() == 0) begin
      check(1'b0, "unexpected MR transition");
    end else begin
      e = exp_q.pop_front();
      check(rabs($realtime - 0.001 - e.t) < 0.01,
            $sformatf("MR edge time %0.3f expected %0.3f", $realtime - 0.001, e.t));
      check(mr == e.val, "MR polarity");
      check(mrn == ~mr, "MRN");
      if (e.val) check(dw_fine_r == e.fine, "fine word for DTC-R");
      else       check(dw_fine_f == e.fine, "fine word for DTC-F");
    end
  end

  initial begin
    #(3.3 * T_CK);
    check(mr == 1'b0 && mrn == 1'b1, "reset state");
    rst_n = 1'b1;
    armed = 1'b1;
    repeat (3000) @(posedge ck[0]);
    for (int p = 0; p < 2; p++)
      for (int c = 0; c < 4; c++) check(seen[p][c] > 0, $sformatf("coarse %0d pol %0d used", c, p));
    check(exp_q.size() <= 2, "all expected MR edges seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(5000 * T_CK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
