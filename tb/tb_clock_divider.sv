// tb_clock_divider: checks the divide-by-8 CCD clock.
// After reset the phase must count 0,1,...,7,0,... one step per main-clock
// cycle, CLK must be low in phases 0..3 and high in 4..7, and each CLK
// period measured between rising edges must be 8 main-clock cycles.
module tb_clock_divider;
  timeunit 1ns; timeprecision 1ps;
  import ccd_pkg::*;

  logic   ckin = 1'b0, rst_n = 1'b0;
  phase_t phase;
  logic   ckccd;
  int     checks = 0, failures = 0;

  clock_divider dut (.ckin, .rst_n, .phase, .ckccd);

  always #141.24 ckin = ~ckin;   // 3.54 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge ckin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0;
    int last_rise = -1;
    logic prev_ck;
    repeat (3) @(posedge ckin);
    #1 check(phase == 0 && ckccd == 0, "reset state");
    @(negedge ckin) rst_n = 1'b1;
    prev_ck = ckccd;
    repeat (1000) begin
      @(posedge ckin); #1;
      cyc++;
      check(phase == phase_t'(cyc % 8), "phase sequence");
      check(ckccd == ((cyc % 8) >= 4), "CLK level");
      if (ckccd && !prev_ck) begin
        if (last_rise >= 0) check(cyc - last_rise == 8, "CLK period 8 cycles");
        last_rise = cyc;
      end
      prev_ck = ckccd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
