// tb_sample_generator: checks the SAMPLE pulse train of a readout.
// The testbench runs its own phase counter and makes ST pulses the way the
// ST generator does (low in phases 6, 7, 0, 1). Two instances are checked:
// the default one (256 pixels, pulse in phase 3) and one with 16 pixels and
// the pulse moved to phase 5. After each ST pulse each instance must give
// exactly PIXELS one-cycle pulses, the first in the first cycle of its
// phase after ST rises, then one every 8 cycles, with the pixel count
// following the pulses; no pulse may appear outside a readout.
module tb_sample_generator;
  timeunit 1ns; timeprecision 1ps;
  import ccd_pkg::*;

  localparam int unsigned PIX_A = 256, PIX_B = 16;
  localparam phase_t      PH_A  = 3'd3, PH_B = 3'd5;

  logic   ckin = 1'b0, rst_n = 1'b0;
  phase_t phase = '0;
  logic   st = 1'b1;
  int     cyc = 0;
  logic   sample_a, sample_b, active_a, active_b;
  logic [$clog2(PIX_A+1)-1:0] pixel_a;
  logic [$clog2(PIX_B+1)-1:0] pixel_b;
  int     checks = 0, failures = 0;

  sample_generator dut_a (.ckin, .rst_n, .phase, .st, .sample(sample_a),
                          .pixel(pixel_a), .active(active_a));
  sample_generator #(.PIXELS(PIX_B), .SAMPLE_PHASE(PH_B)) dut_b (
    .ckin, .rst_n, .phase, .st, .sample(sample_b), .pixel(pixel_b), .active(active_b));

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
    repeat (40000) @(posedge ckin);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-readout bookkeeping, reset at each ST pulse
  int n_a, n_b, last_a, last_b, rise_cyc;
  bit in_readout;

  always @(negedge ckin) if (rst_n) begin
    if (sample_a) begin
      check(in_readout, "A: no SAMPLE outside a readout");
      check(phase == PH_A, "A: SAMPLE in phase 3");
      if (n_a == 0) check(cyc == rise_cyc + 1, "A: first SAMPLE right after ST rise");
      else          check(cyc - last_a == 8, "A: SAMPLE every 8 cycles");
      n_a++;
      last_a = cyc;
      check(pixel_a == n_a, "A: pixel count follows SAMPLE");
    end
    if (sample_b) begin
      check(in_readout, "B: no SAMPLE outside a readout");
      check(phase == PH_B, "B: SAMPLE in phase 5");
      if (n_b == 0) check(cyc == rise_cyc + 3, "B: first SAMPLE in first phase 5");
      else          check(cyc - last_b == 8, "B: SAMPLE every 8 cycles");
      n_b++;
      last_b = cyc;
      check(pixel_b == n_b, "B: pixel count follows SAMPLE");
    end
  end

  initial begin
    repeat (5) @(negedge ckin);
    rst_n = 1'b1;
    repeat (300) @(negedge ckin);     // nothing before the first ST
    for (int r = 0; r < 3; r++) begin
      while (phase != 3'd6) @(negedge ckin);
      // emulate the ST generator: low in phases 6, 7, 0, 1
      st = 1'b0;
      in_readout = 1'b1;
      n_a = 0; n_b = 0;
      repeat (4) @(negedge ckin);
      st = 1'b1;
      rise_cyc = cyc;
      repeat (PIX_A * 8 + 40) @(negedge ckin);
      check(n_a == PIX_A, $sformatf("A: %0d SAMPLE pulses (got %0d)", PIX_A, n_a));
      check(n_b == PIX_B, $sformatf("B: %0d SAMPLE pulses (got %0d)", PIX_B, n_b));
      check(!active_a && !active_b, "readout finished");
      in_readout = 1'b0;
      repeat ($urandom_range(10, 200)) @(negedge ckin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
