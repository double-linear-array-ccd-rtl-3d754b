// tb_sync_discriminator: checks the discriminator flag behind syncout.
// The testbench drives its own phase counter, trigger pulses, syncin and a
// pixel count. A reference flag is kept alongside: it is set when syncin is
// 1 on the 32nd CLK rising edge after the trigger input went low, and is
// cleared while the pixel count is 224..255. syncout is compared with it
// every cycle. Directed parts check that the set happens exactly on the
// 32nd CLK rising edge, that syncin = 0 does not set it, that a set from
// one pulse survives later pulses (sticky average) and that the clear
// window, and only it, clears the flag.
module tb_sync_discriminator;
  timeunit 1ns; timeprecision 1ps;
  import ccd_pkg::*;

  logic       ckin = 1'b0, rst_n = 1'b0;
  phase_t     phase = '0;
  logic       trin = 1'b0, syncin = 1'b0;
  logic [8:0] pixel = 9'd256;
  logic       syncout;
  int         checks = 0, failures = 0;

  sync_discriminator dut (.ckin, .rst_n, .phase, .trin, .syncin, .pixel, .syncout);

  always #141.24 ckin = ~ckin;
  always @(posedge ckin) phase <= phase + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge ckin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: CLK rising edges counted since trin was last high
  int  rises = 0;
  bit  ref_flag = 0;
  int  strobes = 0;
  always @(posedge ckin) if (rst_n) begin
    bit strobe_now;
    strobe_now = 0;
    if (trin) rises = 0;
    else if (phase == 3'd3) begin       // this edge makes CLK rise
      rises++;
      strobe_now = (rises == 32);
    end
    if (strobe_now) strobes++;
    if (pixel >= 224 && pixel <= 255) ref_flag = 0;
    else if (strobe_now && syncin)    ref_flag = 1;
  end

  always @(negedge ckin) if (rst_n) check(syncout == ref_flag, "syncout matches reference");

  task automatic trigger(input int high_cycles);
    @(negedge ckin) trin = 1'b1;
    repeat (high_cycles) @(negedge ckin);
    trin = 1'b0;
  endtask

  task automatic clear_window();
    for (int p = 200; p <= 256; p++) begin
      pixel = 9'(p);
      repeat (8) @(negedge ckin);
    end
  endtask

  initial begin
    int edges;
    repeat (5) @(negedge ckin);
    rst_n = 1'b1;
    check(syncout == 1'b0, "flag clear after reset");

    // 1) exact position: count CLK rising edges from trin low to syncout
    syncin = 1'b1;
    trigger($urandom_range(3, 40));
    edges = 0;
    do begin
      @(negedge ckin);
      if (phase == 3'd4) edges++;     // the last edge made CLK rise
    end while (!syncout);
    check(edges == 32, $sformatf("set on the 32nd CLK rising edge (got %0d)", edges));
    clear_window();
    check(syncout == 1'b0, "clear window clears the flag");

    // 2) syncin = 0 at the sampling point does not set the flag
    syncin = 1'b0;
    trigger(10);
    repeat (400) @(negedge ckin);
    check(syncout == 1'b0, "valid pulse leaves flag clear");

    // 3) sticky: one invalid pulse in an average of 5 keeps the flag set
    for (int t = 0; t < 5; t++) begin
      syncin = (t == 1);
      trigger($urandom_range(3, 40));
      repeat (400) @(negedge ckin);
      if (t >= 1) check(syncout == 1'b1, "flag sticky over the average");
      syncin = ~syncin;               // toggling away from the strobe is ignored
      repeat (100) @(negedge ckin);
    end
    // pixels below the window do not clear
    for (int p = 0; p < 224; p += 16) begin
      pixel = 9'(p);
      repeat (8) @(negedge ckin);
    end
    check(syncout == 1'b1, "no clear before pixel 224");
    clear_window();
    check(syncout == 1'b0, "cleared at end of readout");

    // 4) random traffic against the reference
    for (int t = 0; t < 30; t++) begin
      syncin = 1'($urandom_range(0, 1));
      trigger($urandom_range(1, 60));
      repeat ($urandom_range(350, 600)) @(negedge ckin);
      if ($urandom_range(0, 2) == 0) clear_window();
    end
    check(strobes == 37, $sformatf("discriminator sampled once per trigger (%0d)", strobes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
