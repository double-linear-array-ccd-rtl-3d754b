// clock_divider: divides the main clock by 8 to make the CCD clock CLK.
//
// A free-running 3-bit counter advances on every rising edge of the main
// clock. Its value is the phase (0..7) of the current CCD clock period and
// is handed to the other blocks, which place their own events at chosen
// phases. CLK is the counter's most significant bit, a registered signal, so
// it is glitch free with a 50 % duty cycle: low in phases 0..3, high in
// phases 4..7. With the board's 3.54 MHz crystal CLK runs at 442.5 kHz,
// below the 500 kHz the arrays accept.
//
// Ports: ckin (main clock), rst_n (asynchronous active-low reset, which the
// original programmable chip does not have: it relies on power-up state),
// phase (current phase), ckccd (CCD CLK).
// Timing: phase and ckccd change only on rising edges of ckin; ckccd has a
// period of 8 ckin cycles.
module clock_divider
  import ccd_pkg::*;
(
  input  logic   ckin,
  input  logic   rst_n,
  output phase_t phase,
  output logic   ckccd
);

  always_ff @(posedge ckin or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + phase_t'(1);
  end

  assign ckccd = phase[PHASE_W-1];

endmodule
