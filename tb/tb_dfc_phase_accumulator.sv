// tb_dfc_phase_accumulator: checks the N-bit phase accumulator against an
// integer reference model with random and boundary FCW values, and checks
// that the MSB toggles at the rate f_CK*FCW/2^N (count of MSB edges over a
// whole number of accumulator periods).
module tb_dfc_phase_accumulator;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 12;

  logic         clk = 1'b0, rst_n = 1'b1;

  // Reset is asserted by a falling edge so the asynchronous clears act at once.
  initial #1 rst_n = 1'b0;
  logic [N-1:0] fcw = '0;
  logic [N-1:0] acc, fcw_q;
  int checks = 0, failures = 0;

  dfc_phase_accumulator #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .fcw(fcw), .acc(acc), .fcw_q(fcw_q));

  always #250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  longint unsigned model;

  task automatic step_and_check();
    @(posedge clk);
    model = (model + fcw) % (64'd1 << N);
    #1;
    check(acc == N'(model), $sformatf("acc %0d vs %0d", acc, model));
    check(fcw_q == fcw, "fcw_q");
  endtask

  initial begin
    int edges;
    logic prev;
    model = 0;
    #1000;
    check(acc == '0, "reset value");
    @(negedge clk) rst_n = 1'b1;
    // random words
    for (int i = 0; i < 400; i++) begin
      @(negedge clk) fcw = N'($urandom_range(0, 1 << (N - 1)));
      step_and_check();
    end
    // fixed word over a full period 2^N cycles: 2*FCW MSB edges
    for (int j = 0; j < 3; j++) begin
      @(negedge clk) fcw = (j == 0) ? N'(1792) : (j == 1) ? N'(3) : N'(2048);
      edges = 0;
      prev  = acc[N-1];
      for (int i = 0; i < (1 << N); i++) begin
        step_and_check();
        if (acc[N-1] != prev) edges++;
        prev = acc[N-1];
      end
      check(edges == 2 * int'(fcw), $sformatf("MSB edges %0d for FCW %0d", edges, fcw));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(40000 * 500);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
