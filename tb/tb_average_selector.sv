// tb_average_selector: checks the one-in-n trigger selection.
// For each of the four AV settings a stream of trigger pulses is applied and
// the readout requests are compared with a reference: with n = 100, 50, 20
// and 1 a request must follow exactly the n-th, 2n-th, ... trigger, one
// cycle after it. After each request ST is emulated (clr high a few cycles
// later), as the real ST generator does. A second part checks that clr
// restarts the count and that a reduced table (parameters) is honoured.
module tb_average_selector;
  timeunit 1ns; timeprecision 1ps;
  import ccd_pkg::*;

  logic     ckin = 1'b0, rst_n = 1'b0;
  logic     trig = 1'b0, clr = 1'b0;
  ave_sel_e ave = AVE_SEL3;
  logic     req;
  int       checks = 0, failures = 0;

  average_selector dut (.ckin, .rst_n, .trig, .ave, .clr, .req);

  always #141.24 ckin = ~ckin;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge ckin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one trigger pulse; returns whether a request followed in the next cycle
  task automatic pulse(output bit got);
    @(negedge ckin) trig = 1'b1;
    @(negedge ckin) trig = 1'b0;
    got = req;
    @(negedge ckin) check(!req, "request lasts one cycle");
    if (got) begin            // emulate the ST pulse that follows a request
      repeat (3) @(negedge ckin);
      clr = 1'b1;
      repeat (4) @(negedge ckin);
      clr = 1'b0;
    end
    repeat ($urandom_range(0, 5)) @(negedge ckin);
  endtask

  initial begin
    int n_tab[4] = '{100, 50, 20, 1};
    bit got;
    repeat (3) @(negedge ckin);
    rst_n = 1'b1;
    for (int m = 0; m < 4; m++) begin
      int n, nreq;
      n = n_tab[m];
      nreq = 0;
      ave = ave_sel_e'(m);
      for (int t = 1; t <= 3 * n + n / 2; t++) begin
        pulse(got);
        check(got == (t % n == 0), $sformatf("mode %0d trigger %0d", m, t));
        nreq += got;
      end
      check(nreq == 3, $sformatf("mode %0d: 3 readouts", m));
      // finish the partial average so the next mode starts from zero
      while (!got) pulse(got);
    end
    // clr in the middle of an average restarts it
    ave = AVE_SEL2;
    for (int t = 0; t < 7; t++) pulse(got);
    @(negedge ckin) clr = 1'b1;
    @(negedge ckin) clr = 1'b0;
    for (int t = 1; t <= 20; t++) begin
      pulse(got);
      check(got == (t == 20), "count restarted by clr");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
