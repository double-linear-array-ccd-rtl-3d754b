// ccd_frontend: digital core of a front end for two Hamamatsu S8377-256
// CCD linear arrays read out after every n-th pulse of a ~1 kHz laser.
//
// Everything digital on the board lives in one small programmable chip;
// this module is that chip. From the 3.54 MHz main clock it
//   - makes the CCD clock CLK (main clock / 8, clock_divider),
//   - counts laser triggers and requests a readout on every n-th one, n set
//     by the AV1:AV0 lines (100, 50, 20 or 1; average_selector),
//   - turns a request into a CCD start pulse ST aligned to CLK
//     (st_generator),
//   - gives the ADC board one SAMPLE pulse per pixel, 256 per readout, at a
//     phase adjustable in 1/8 CLK steps (sample_generator),
//   - samples an external discriminator 32 CLK periods after each trigger
//     and flags an invalid pulse on syncout until late in the next readout
//     (sync_discriminator),
//   - passes the gain line from the PC to the arrays' VG input unchanged.
// Both arrays share CLK, ST and VG, so their two video outputs are read in
// parallel by the simultaneous-sampling ADC board.
//
// The block structure, the phases, counts and averaging table follow the
// original board. Differences that are this design's own choices: the
// whole chip is synchronous to the main clock (the original clocks some
// flip-flops from decoded counter outputs and from the trigger itself), the
// asynchronous inputs trin, syncin and ave pass through two-flip-flop
// synchronizers (2 main-clock cycles of extra latency), and there is an
// active-low reset rst_n.
//
// Ports (board pin names): ckin main clock; trin trigger input, a readout
// cycle is started by its rising edge; gin gain select, copied to gout
// (CCD VG); ave[1:0] average select; syncin discriminator verdict; ckccd
// CCD CLK; trccd CCD ST (active low); sample ADC trigger; syncout flag.
// Timing: ST falls 5 to 12 main-clock cycles after a qualifying rising edge
// of trin (2 synchronizer stages, edge detection, request and pending
// registers, then up to 8 cycles waiting for phase 6); a readout lasts PIXELS CLK periods (256 x 8 = 2048 main-clock
// cycles, 579 us at 3.54 MHz), within the 1 ms between laser pulses.
module ccd_frontend
  import ccd_pkg::*;
#(
  parameter int unsigned PIXELS       = 256,
  parameter phase_t      SAMPLE_PHASE = 3'd3,
  parameter int unsigned AVE_N0       = 100,
  parameter int unsigned AVE_N1       = 50,
  parameter int unsigned AVE_N2       = 20,
  parameter int unsigned AVE_N3       = 1,
  parameter int unsigned SYNC_DELAY   = 32,
  parameter int unsigned SYNC_CLR     = 224,
  localparam int unsigned PIX_W       = $clog2(PIXELS + 1)
) (
  input  logic       ckin,
  input  logic       rst_n,
  input  logic       trin,
  input  logic       gin,
  input  logic [1:0] ave,
  input  logic       syncin,
  output logic       ckccd,
  output logic       trccd,
  output logic       gout,
  output logic       sample,
  output logic       syncout
);

  phase_t           phase;
  logic             trin_s, trin_d, syncin_s;
  logic [1:0]       ave_s;
  logic             trig;
  logic             req;
  logic             st_pending;
  logic [PIX_W-1:0] pixel;
  logic             sampling;

  // gain select: a plain buffer to the arrays' VG inputs
  assign gout = gin;

  clock_divider u_div (
    .ckin  (ckin),
    .rst_n (rst_n),
    .phase (phase),
    .ckccd (ckccd)
  );

  sync2 #(.W(1)) u_sync_trin (
    .clk (ckin), .rst_n (rst_n), .d (trin), .q (trin_s)
  );
  sync2 #(.W(1)) u_sync_syncin (
    .clk (ckin), .rst_n (rst_n), .d (syncin), .q (syncin_s)
  );
  sync2 #(.W(2), .RESET_VAL(2'b11)) u_sync_ave (
    .clk (ckin), .rst_n (rst_n), .d (ave), .q (ave_s)
  );

  // a trigger event is a rising edge of the synchronized trigger input
  always_ff @(posedge ckin or negedge rst_n) begin
    if (!rst_n) trin_d <= 1'b0;
    else        trin_d <= trin_s;
  end
  assign trig = trin_s && !trin_d;

  average_selector #(
    .CNT_W (7),
    .N0    (AVE_N0),
    .N1    (AVE_N1),
    .N2    (AVE_N2),
    .N3    (AVE_N3)
  ) u_ave (
    .ckin  (ckin),
    .rst_n (rst_n),
    .trig  (trig),
    .ave   (ave_sel_e'(ave_s)),
    .clr   (!trccd),
    .req   (req)
  );

  st_generator #(
    .FALL_PHASE (3'd6),
    .RISE_PHASE (3'd2)
  ) u_st (
    .ckin    (ckin),
    .rst_n   (rst_n),
    .phase   (phase),
    .req     (req),
    .st      (trccd),
    .pending (st_pending)
  );

  sample_generator #(
    .PIXELS       (PIXELS),
    .SAMPLE_PHASE (SAMPLE_PHASE)
  ) u_sample (
    .ckin   (ckin),
    .rst_n  (rst_n),
    .phase  (phase),
    .st     (trccd),
    .sample (sample),
    .pixel  (pixel),
    .active (sampling)
  );

  sync_discriminator #(
    .DELAY     (SYNC_DELAY),
    .PIX_W     (PIX_W),
    .CLR_FIRST (SYNC_CLR),
    .CLR_LAST  (PIXELS - 1)
  ) u_disc (
    .ckin    (ckin),
    .rst_n   (rst_n),
    .phase   (phase),
    .trin    (trin_s),
    .syncin  (syncin_s),
    .pixel   (pixel),
    .syncout (syncout)
  );

  // a request only waits while ST is high
  pending_only_when_idle : assert property (
    @(posedge ckin) disable iff (!rst_n) st_pending |-> trccd
  );

  // a new readout is never requested while one is still sampling: at the
  // board's 1 kHz trigger rate the 579 us readout always ends first
  no_overlap : assert property (
    @(posedge ckin) disable iff (!rst_n) $fell(trccd) |-> !$past(sampling)
  );

endmodule
