// tb_workload_arrays: readout time of each array length against the 1 ms
// laser period.
//
// Four front ends, built for 128, 256, 512 and 1024 pixels, get the same
// single trigger. For each, the time from the fall of ST to the end of the
// last SAMPLE pulse is measured in main-clock cycles and compared with
// PIXELS x 8 - 2 (ST falls in phase 6, the first pulse is in phase 3 five
// cycles later, then one pulse every 8 cycles, the last one ending a cycle
// after it starts). The measured time is then compared
// with the 3540 cycles (1 ms at 3.54 MHz) between laser pulses: 128 and 256
// pixels must fit, 512 and 1024 must not. Each instance must also give
// exactly PIXELS SAMPLE pulses.
module tb_workload_arrays;
  timeunit 1ns; timeprecision 1ps;

  localparam int PERIOD = 3540;
  localparam int NI = 4;
  localparam int PIX [NI] = '{128, 256, 512, 1024};

  logic ckin = 1'b0, rst_n = 1'b0, trin = 1'b0;
  logic [NI-1:0] ckccd, trccd, gout, sample, syncout;
  int checks = 0, failures = 0;
  int cyc = 0;

  for (genvar i = 0; i < NI; i++) begin : g_fe
    ccd_frontend #(.PIXELS(PIX[i])) dut (
      .ckin, .rst_n, .trin, .gin(1'b0), .ave(2'd3), .syncin(1'b0),
      .ckccd(ckccd[i]), .trccd(trccd[i]), .gout(gout[i]),
      .sample(sample[i]), .syncout(syncout[i]));
  end

  always #141.24 ckin = ~ckin;
  always @(posedge ckin) cyc <= cyc + 1;

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

  int st_fall [NI];
  int last_end [NI];
  int pulses [NI];
  logic [NI-1:0] st_prev = '1, s_prev = '0;

  always @(negedge ckin) if (rst_n) begin
    for (int i = 0; i < NI; i++) begin
      if (!trccd[i] && st_prev[i]) st_fall[i] = cyc;
      if (sample[i] && !s_prev[i]) pulses[i]++;
      if (!sample[i] && s_prev[i]) last_end[i] = cyc;
    end
    st_prev = trccd;
    s_prev  = sample;
  end

  initial begin
    for (int i = 0; i < NI; i++) begin
      pulses[i] = 0; st_fall[i] = 0; last_end[i] = 0;
    end
    repeat (10) @(negedge ckin);
    rst_n = 1'b1;
    repeat (10) @(negedge ckin);
    trin = 1'b1;
    repeat (35) @(negedge ckin);
    trin = 1'b0;
    repeat (1024 * 8 + 100) @(negedge ckin);
    for (int i = 0; i < NI; i++) begin
      int dur;
      bit fits;
      dur  = last_end[i] - st_fall[i];
      fits = (dur + 12) < PERIOD;          // plus the worst trigger latency
      check(pulses[i] == PIX[i], $sformatf("%0d pixels: %0d SAMPLE pulses", PIX[i], pulses[i]));
      check(dur == PIX[i] * 8 - 2, $sformatf("%0d pixels: readout %0d cycles", PIX[i], dur));
      check(fits == (PIX[i] <= 256), $sformatf("%0d pixels: fits 1 ms = %0b", PIX[i], fits));
      $display("%0d pixels: readout %0d cycles = %0d us, %s the 1 ms laser period",
               PIX[i], dur, (dur * 1000) / 3540, fits ? "inside" : "longer than");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
