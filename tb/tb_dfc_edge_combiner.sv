// tb_dfc_edge_combiner: checks that the output rises on each DTC-R pulse
// and falls on each DTC-F pulse, at the pulse's rising edge, with random
// pulse widths and spacings, and that reset clears the output.
module tb_dfc_edge_combiner;
  timeunit 1ps;
  timeprecision 1fs;

  logic rst_n = 1'b1, o_r = 1'b0, o_f = 1'b0;

  // Reset is asserted by a falling edge so the asynchronous clears act at once.
  initial #1 rst_n = 1'b0;
  logic out;
  int checks = 0, failures = 0;

  dfc_edge_combiner dut (.rst_n(rst_n), .o_r(o_r), .o_f(o_f), .out(out));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic pulse(bit rise);
    int w = $urandom_range(5, 100);
    #($urandom_range(1, 300));
    check(out == !rise, "level before edge");
    if (rise) o_r = 1'b1; else o_f = 1'b1;
    #0.01;
    check(out == rise, rise ? "rise on DTC-R edge" : "fall on DTC-F edge");
    #(w);
    o_r = 1'b0;
    o_f = 1'b0;
    #0.01;
    check(out == rise, "level holds after pulse");
  endtask

  initial begin
    #10;
    check(out == 1'b0, "reset state");
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      pulse(1'b1);
      pulse(1'b0);
    end
    pulse(1'b1);
    rst_n = 1'b0;
    #1;
    check(out == 1'b0, "reset clears output");
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
