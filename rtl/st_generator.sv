// st_generator: drives the CCD start (ST) line in step with the CCD clock.
//
// The arrays sample ST on the falling edge of CLK; ST low at that edge
// starts a readout-reset cycle. A readout request from the averaging logic
// can arrive at any time, so this block holds it as "pending" and turns it
// into an ST pulse aligned to the CCD clock: ST goes low on entering phase
// FALL_PHASE (6, CLK high) and returns high on entering phase RISE_PHASE
// (2, CLK low). With the defaults ST is low for phases 6, 7, 0 and 1, half a
// CLK period centred on the falling edge between phases 7 and 0, so the
// array sees a clean low level with 2 main-clock cycles of setup and hold.
// Both phases are the board's; they are parameters for other clock ratios.
//
// As on the board, a request that arrives while ST is already low is
// dropped: the pending flag is held clear during the ST pulse.
//
// Ports: phase from the clock divider, req (one-cycle readout request),
// st (ST line, active low, idle high), pending (request waiting for phase).
// Timing: ST falls 1 to 8 main-clock cycles after req and stays low for
// ((RISE_PHASE - FALL_PHASE) mod 8) cycles, 4 with the defaults.
module st_generator
  import ccd_pkg::*;
#(
  parameter phase_t FALL_PHASE = 3'd6,
  parameter phase_t RISE_PHASE = 3'd2
) (
  input  logic   ckin,
  input  logic   rst_n,
  input  phase_t phase,
  input  logic   req,
  output logic   st,
  output logic   pending
);

  logic start;

  assign start = pending && st && (phase == phase_before(FALL_PHASE));

  always_ff @(posedge ckin or negedge rst_n) begin
    if (!rst_n) begin
      st      <= 1'b1;
      pending <= 1'b0;
    end else begin
      // a request waits for the phase; none is taken while ST is low
      pending <= st && ((pending && !start) || req);
      if (start)
        st <= 1'b0;
      else if (!st && phase == phase_before(RISE_PHASE))
        st <= 1'b1;
    end
  end

  // ST must be low at the CLK falling edge it is meant for
  st_low_at_clk_fall : assert property (
    @(posedge ckin) disable iff (!rst_n)
      $fell(st) |-> ##[1:7] (phase == PH_LAST_HIGH && !st)
  );

endmodule
