// sync_discriminator: validity flag from an external window discriminator.
//
// An external discriminator can judge each laser pulse and present its TTL
// verdict on syncin. DELAY (32) CCD clock periods after the trigger input
// returns low, syncin is sampled into a flag that drives syncout. The flag
// behaves like a J-K flip-flop with K tied low: a sampled 1 sets it, a
// sampled 0 leaves it as it is. It is cleared while the readout is in its
// last pixels, pixel counts CLR_FIRST..CLR_LAST (224..255 by default). So:
//   - without averaging, every trigger is read out and syncout is just the
//     sampled syncin of that pulse, held until the clear window;
//   - with averaging, a single pulse with syncin = 1 keeps syncout = 1 for
//     the rest of the average, marking the whole averaged readout.
// The flag is cleared late in the readout, after the host has had most of
// the readout to read it, and long before the next pulse is sampled.
// The 32-edge delay, the set-only flag and the 224..255 clear window are the
// original board's; the synchronous counter and the clear taking priority
// over a set in the same cycle are this design's choices.
//
// How it works: a delay counter is held at zero while the synchronized
// trigger input is high and, once it is low, counts CLK rising edges up to
// DELAY, where it stops. The edge on which it reaches DELAY samples syncin.
// The clear has priority over a set in the same cycle.
//
// Ports: phase (clock divider), trin (synchronized trigger level), syncin
// (synchronized discriminator level), pixel (pixel count of the sample
// generator), syncout (the flag, registered).
// Timing: the sampling takes place on the main-clock edge that is the
// DELAY-th CLK rising edge after trin was seen low.
module sync_discriminator
  import ccd_pkg::*;
#(
  parameter int unsigned DELAY     = 32,
  parameter int unsigned PIX_W     = 9,
  parameter int unsigned CLR_FIRST = 224,
  parameter int unsigned CLR_LAST  = 255,
  localparam int unsigned DLY_W    = $clog2(DELAY + 1)
) (
  input  logic             ckin,
  input  logic             rst_n,
  input  phase_t           phase,
  input  logic             trin,
  input  logic             syncin,
  input  logic [PIX_W-1:0] pixel,
  output logic             syncout
);

  logic [DLY_W-1:0] dly;
  logic             clk_rise;   // this edge is a CLK rising edge
  logic             strobe;     // this edge samples syncin
  logic             clr;

  assign clk_rise = (phase == PH_LAST_LOW);
  assign strobe   = !trin && clk_rise && (dly == DLY_W'(DELAY - 1));
  assign clr      = (pixel >= PIX_W'(CLR_FIRST)) && (pixel <= PIX_W'(CLR_LAST));

  always_ff @(posedge ckin or negedge rst_n) begin
    if (!rst_n) begin
      dly     <= '0;
      syncout <= 1'b0;
    end else begin
      if (trin)
        dly <= '0;
      else if (clk_rise && dly != DLY_W'(DELAY))
        dly <= dly + DLY_W'(1);

      if (clr)
        syncout <= 1'b0;
      else if (strobe && syncin)
        syncout <= 1'b1;
    end
  end

endmodule
