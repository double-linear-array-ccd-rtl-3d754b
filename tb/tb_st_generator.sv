// tb_st_generator: checks the alignment of the CCD start pulse.
// The testbench runs its own phase counter and issues readout requests at
// random phases. Each request must give exactly one ST pulse that starts on
// entry into phase 6 (the first one at least one cycle after the request),
// lasts 4 main-clock cycles (phases 6, 7, 0, 1) and so covers one CLK
// falling edge; the latency from request to ST falling must be 1..8 cycles.
// A request made while ST is low must be ignored.
module tb_st_generator;
  timeunit 1ns; timeprecision 1ps;
  import ccd_pkg::*;

  logic   ckin = 1'b0, rst_n = 1'b0;
  phase_t phase = '0;
  logic   req = 1'b0;
  logic   st, pending;
  int     checks = 0, failures = 0;
  int     cyc = 0;

  st_generator dut (.ckin, .rst_n, .phase, .req, .st, .pending);

  always #141.24 ckin = ~ckin;
  always @(posedge ckin) begin
    phase <= phase + 1'b1;
    cyc   <= cyc + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge ckin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected cycle (counter value seen after the edge) at which ST is first
  // seen low. The request is registered on the edge that ends cycle req_cyc;
  // ST can fall at the earliest on the edge after that one, and only on an
  // edge that enters phase 6.
  function automatic int expected_fall(input int req_cyc, input phase_t req_ph);
    int d = (6 - int'(req_ph) + 8) % 8;
    if (d < 2) d += 8;
    return req_cyc + d;
  endfunction

  initial begin
    int pulses = 0;
    repeat (5) @(negedge ckin);
    rst_n = 1'b1;
    check(st == 1'b1, "ST idle high after reset");
    for (int k = 0; k < 200; k++) begin
      int rc, fc, efc, low_len;
      phase_t rph;
      repeat ($urandom_range(2, 30)) @(negedge ckin);
      req = 1'b1;
      rc = cyc; rph = phase;        // values the DUT samples at the next edge
      @(negedge ckin) req = 1'b0;
      // wait for ST to fall
      while (st) @(negedge ckin);
      fc  = cyc;
      efc = expected_fall(rc, rph);
      check(fc == efc, $sformatf("ST falls on entry into phase 6 (req phase %0d)", rph));
      check(fc - (rc + 1) >= 1 && fc - (rc + 1) <= 8, "request-to-ST latency 1..8 cycles");
      check(phase == 3'd6, "ST falls in phase 6");
      // a request while ST is low is ignored
      low_len = 0;
      if (k % 4 == 0) begin
        req = 1'b1;
        low_len++;
        @(negedge ckin) req = 1'b0;
      end
      while (!st) begin
        check(phase inside {3'd6, 3'd7, 3'd0, 3'd1}, "ST low only in phases 6,7,0,1");
        low_len++;
        @(negedge ckin);
      end
      check(low_len == 4, "ST low for 4 cycles");
      check(phase == 3'd2, "ST rises in phase 2");
      pulses++;
      // no second pulse
      repeat (12) begin
        @(negedge ckin);
        check(st, "exactly one ST pulse per request");
      end
    end
    check(pulses == 200, "200 ST pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
