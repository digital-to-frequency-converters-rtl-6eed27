// tb_dfc_delay_word: checks the pipelined delay-word logic. Every cycle a
// random accumulator state (MSB, residue AR < FCW) and a random FCW in
// 1..2^(N-1) are applied; N_DTC cycles after the sampling edge the outputs
// must hold that state's MSB and DW = 2^N_DTC - 1 - floor(AR*2^N_DTC/FCW),
// computed here with 64-bit integers. This checks the value and the latency
// (a new word every cycle). Boundary cases AR = 0, AR = FCW-1, FCW = 1 and
// FCW = 2^(N-1) are included.
module tb_dfc_delay_word;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 12;
  localparam int N_DTC = N - 1;
  localparam int LAT = N_DTC;  // sampling edge to output, in clock edges

  logic             clk = 1'b0, rst_n = 1'b1;

  // Reset is asserted by a falling edge so the asynchronous clears act at once.
  initial #1 rst_n = 1'b0;
  logic [N-1:0]     acc = '0, fcw = '0;
  logic             msb;
  logic [N_DTC-1:0] dw;
  int checks = 0, failures = 0;

  dfc_delay_word #(.N(N), .N_DTC(N_DTC)) dut (
    .clk(clk), .rst_n(rst_n), .acc(acc), .fcw(fcw), .msb(msb), .dw(dw));

  always #250 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  logic             exp_msb [int];
  logic [N_DTC-1:0] exp_dw  [int];
  int cyc = 0;

  function automatic logic [N_DTC-1:0] ref_dw(longint unsigned ar, longint unsigned f);
    return N_DTC'((64'd1 << N_DTC) - 1 - (ar << N_DTC) / f);
  endfunction

  initial begin
    longint unsigned f, ar;
    #1000;
    check(msb == 1'b0 && dw == '1, "reset outputs");
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      case (i % 8)
        0: begin f = 1; ar = 0; end
        1: begin f = 1 << (N - 1); ar = 0; end
        2: begin f = $urandom_range(1, 1 << (N - 1)); ar = 0; end
        3: begin f = $urandom_range(1, 1 << (N - 1)); ar = f - 1; end
        default: begin f = $urandom_range(1, 1 << (N - 1)); ar = $urandom_range(0, int'(f) - 1); end
      endcase
      acc = {1'($urandom), (N - 1)'(ar)};
      fcw = N'(f);
      @(posedge clk);
      cyc++;
      exp_msb[cyc] = acc[N-1];
      exp_dw[cyc]  = ref_dw(ar, f);
      #1;
      if (exp_dw.exists(cyc - LAT)) begin
        check(msb == exp_msb[cyc - LAT], "msb alignment");
        check(dw == exp_dw[cyc - LAT], $sformatf("dw %0d expected %0d", dw, exp_dw[cyc - LAT]));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #(10000 * 500);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
