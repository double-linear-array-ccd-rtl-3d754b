// tb_ccd_frontend: end-to-end test of the front end at its default sizes.
//
// A 3.54 MHz main clock drives the front end and two CCD array models on
// the shared CLK/ST/VG lines. Laser triggers arrive every 1 ms (3540 main
// clock cycles, with a little jitter) as 10 us high pulses. The test walks
// through all four averaging settings (1, 20, 50, 100 triggers per
// readout), changing the setting in the middle of an average once, and
// gives each trigger a random discriminator verdict on syncin.
// Checked against references kept in the testbench:
//   - CLK is the main clock divided by 8;
//   - a readout starts exactly on the triggers the averaging rule selects,
//     5..12 main-clock cycles after the trigger edge, and never otherwise;
//   - both arrays see every ST pulse and read out all 256 pixels;
//   - each readout gets exactly 256 SAMPLE pulses, pulse k lying in the
//     eighth of a CLK period just before pixel k appears, and the readout
//     ends well inside the 1 ms trigger period;
//   - at the middle of each readout syncout is the OR of the verdicts of
//     the triggers of that average, and it is 0 after the readout;
//   - the gain line reaches the arrays.
// Every mechanism (each averaging mode, a skipped trigger, a flagged and an
// unflagged average, the flag clear, a gain change, a mode change in the
// middle of an average) is counted and must occur at least once.
module tb_ccd_frontend;
  timeunit 1ns; timeprecision 1ps;

  localparam int PIXELS  = 256;
  localparam int PERIOD  = 3540;            // main-clock cycles per 1 ms

  logic       ckin = 1'b0, rst_n = 1'b0;
  logic       trin = 1'b0, gin = 1'b0, syncin = 1'b0;
  logic [1:0] ave = 2'd3;
  logic       ckccd, trccd, gout, sample, syncout;

  int   video1, video3, reads1, reads3;
  logic eos1, eos3, gain1, gain3;

  int checks = 0, failures = 0;

  ccd_frontend dut (.ckin, .rst_n, .trin, .gin, .ave, .syncin,
                    .ckccd, .trccd, .gout, .sample, .syncout);

  ccd_s8377_model #(.N(PIXELS)) ic1 (.clk(ckccd), .st(trccd), .vg(gout),
    .video_pixel(video1), .eos(eos1), .readouts(reads1), .gain_high(gain1));
  ccd_s8377_model #(.N(PIXELS)) ic3 (.clk(ckccd), .st(trccd), .vg(gout),
    .video_pixel(video3), .eos(eos3), .readouts(reads3), .gain_high(gain3));

  always #141.24 ckin = ~ckin;              // 3.54 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge ckin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- cycle counter and CLK period ------------------------------------
  int   cyc = 0;
  int   last_ck_rise = -1;
  logic ck_prev = 1'b0;
  always @(posedge ckin) cyc <= cyc + 1;
  always @(negedge ckin) if (rst_n) begin
    if (ckccd && !ck_prev) begin
      if (last_ck_rise >= 0) check(cyc - last_ck_rise == 8, "CLK = main clock / 8");
      last_ck_rise = cyc;
    end
    ck_prev = ckccd;
  end

  // ---- ST pulses and SAMPLE pulses --------------------------------------
  int   st_pulses = 0, st_fall_cyc = 0;
  int   n_sample = 0, last_sample_cyc = 0;
  logic st_prev = 1'b1, sample_prev = 1'b0;
  always @(negedge ckin) if (rst_n) begin
    if (!trccd && st_prev) begin
      st_pulses++;
      st_fall_cyc = cyc;
      n_sample    = 0;
    end
    if (sample && !sample_prev) begin
      n_sample++;
      last_sample_cyc = cyc;
      // pixel k follows on the CLK rising edge that ends this pulse
      check(video1 == n_sample - 1 && !ckccd, "SAMPLE just before pixel appears");
    end
    if (!sample && sample_prev)
      check(ckccd && video1 == n_sample && video3 == n_sample,
            "SAMPLE ends on the CLK edge that outputs its pixel");
    st_prev     = trccd;
    sample_prev = sample;
  end

  // ---- stimulus and references -----------------------------------------
  int  n_of[4] = '{100, 50, 20, 1};
  int  since = 0;                 // reference: triggers in the current average
  bit  verdict_or = 0;            // reference: OR of syncin over the average
  int  readouts_in_mode[4] = '{0, 0, 0, 0};
  int  skipped = 0, flagged = 0, unflagged = 0, flag_clears = 0;
  int  gain_changes = 0, mode_changes_mid = 0;

  // one trigger; returns whether it must start a readout
  task automatic fire_trigger(input bit verdict, output bit expect_read);
    int t0, pulses0;
    since++;
    verdict_or |= verdict;
    expect_read = (since >= n_of[ave]);
    @(negedge ckin);
    syncin  = verdict;
    trin    = 1'b1;
    t0      = cyc;
    pulses0 = st_pulses;
    repeat (35) @(negedge ckin);            // ~10 us pulse
    trin = 1'b0;
    check((st_pulses - pulses0) == int'(expect_read),
          $sformatf("readout decision, mode %0d, trigger %0d of %0d", ave, since, n_of[ave]));
    if (expect_read) begin
      check(st_fall_cyc - t0 >= 5 && st_fall_cyc - t0 <= 12, "ST 5..12 cycles after trigger");
      readouts_in_mode[ave]++;
    end else skipped++;
  endtask

  // rest of one 1 ms trigger period, checking the readout if there is one
  task automatic finish_period(input bit was_read, input bit expect_flag);
    int rest = PERIOD - 36 + $urandom_range(0, 20) - 10;
    if (was_read) begin
      // middle of the readout: flag must show the whole average
      while (n_sample < PIXELS / 2) begin @(negedge ckin); rest--; end
      check(syncout == expect_flag, "syncout = OR of the average's verdicts");
      if (expect_flag) flagged++; else unflagged++;
      while (n_sample < PIXELS && rest > 0) begin @(negedge ckin); rest--; end
      repeat (16) begin @(negedge ckin); rest--; end
      check(n_sample == PIXELS, $sformatf("256 SAMPLE pulses (got %0d)", n_sample));
      check(last_sample_cyc - st_fall_cyc < PERIOD, "readout ends within the trigger period");
      check(reads1 == st_pulses && reads3 == st_pulses, "both arrays started by every ST");
      check(syncout == 1'b0, "flag cleared at the end of the readout");
      if (expect_flag) flag_clears++;
    end
    repeat (rest) @(negedge ckin);
  endtask

  task automatic run_triggers(input int count, input int bad_every);
    bit rd, fl;
    for (int t = 0; t < count; t++) begin
      bit verdict = (bad_every > 0) && ($urandom_range(1, bad_every) == 1);
      fire_trigger(verdict, rd);
      fl = verdict_or;
      if (rd) begin since = 0; verdict_or = 0; end
      finish_period(rd, fl);
    end
  endtask

  int eos_seen = 0;
  always @(negedge eos1) eos_seen++;

  initial begin
    repeat (10) @(negedge ckin);
    rst_n = 1'b1;
    repeat (100) @(negedge ckin);
    check(trccd && !sample && !syncout, "idle after reset");

    // no averaging: every trigger read out, syncout copies syncin
    ave = 2'd3;
    run_triggers(6, 2);
    // gain change reaches both arrays
    gin = 1'b1;
    repeat (20) @(negedge ckin);
    check(gout && gain1 && gain3, "gain high reaches the arrays");
    gain_changes++;
    // 20 averages
    ave = 2'd2;
    run_triggers(45, 30);
    // change to 50 in the middle of an average
    if (since != 0) mode_changes_mid++;
    ave = 2'd1;
    run_triggers(95, 60);
    // 100 averages, with an unflagged one guaranteed at the end
    gin = 1'b0;
    repeat (20) @(negedge ckin);
    check(!gout && !gain1, "gain low reaches the arrays");
    gain_changes++;
    ave = 2'd0;
    while (since != 0) run_triggers(1, 0);   // finish the pending average
    run_triggers(100, 40);
    run_triggers(100, 0);

    for (int m = 0; m < 4; m++)
      check(readouts_in_mode[m] > 0, $sformatf("mode %0d read out (%0d times)", m, readouts_in_mode[m]));
    check(skipped > 0,          $sformatf("triggers skipped by averaging: %0d", skipped));
    check(flagged > 0,          $sformatf("flagged averages: %0d", flagged));
    check(unflagged > 0,        $sformatf("unflagged averages: %0d", unflagged));
    check(flag_clears > 0,      $sformatf("flag clears: %0d", flag_clears));
    check(gain_changes == 2,    "gain changes");
    check(mode_changes_mid > 0, "mode change in the middle of an average");
    check(eos_seen == st_pulses, $sformatf("end of scan after every readout (%0d)", eos_seen));
    $display("readouts per mode (ave=0..3): %0d %0d %0d %0d, skipped %0d, flagged %0d, unflagged %0d",
             readouts_in_mode[0], readouts_in_mode[1], readouts_in_mode[2], readouts_in_mode[3],
             skipped, flagged, unflagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
