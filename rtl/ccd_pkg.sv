// ccd_pkg: constants and types shared by the CCD front-end logic.
//
// The front end runs from one main clock (3.54 MHz crystal). The CCD clock
// CLK is that clock divided by 8, so every CCD clock period is split into
// eight "phases" numbered 0..7 by a 3-bit counter. CLK is the counter's top
// bit: low in phases 0..3, high in phases 4..7. CLK therefore rises on the
// main-clock edge that takes the phase from 3 to 4 and falls on the edge
// that takes it from 7 to 0. All timing in the design (ST window, SAMPLE
// position, discriminator delay) is expressed in these phases.
//
// The divide-by-8 ratio, the 3.54 MHz clock, the 256-pixel arrays and the
// averaging factors 100/50/20/1 are those of the original board; the
// encoding of the average selection follows the board's AV1:AV0 lines.
package ccd_pkg;

  // log2 of the main-clock / CCD-clock ratio (divide by 8)
  localparam int unsigned PHASE_W = 3;
  localparam int unsigned PHASES  = 1 << PHASE_W;

  typedef logic [PHASE_W-1:0] phase_t;

  // Phase in which CLK is still low but will rise on the next main-clock
  // edge, and the phase after which it falls.
  localparam phase_t PH_LAST_LOW  = phase_t'(PHASES/2 - 1); // 3
  localparam phase_t PH_LAST_HIGH = phase_t'(PHASES - 1);   // 7

  // Hardware-average selection, as set on the AV1:AV0 lines by the host PC.
  typedef enum logic [1:0] {
    AVE_SEL0 = 2'd0,   // one readout every 100 triggers (default table)
    AVE_SEL1 = 2'd1,   // one readout every 50 triggers
    AVE_SEL2 = 2'd2,   // one readout every 20 triggers
    AVE_SEL3 = 2'd3    // every trigger is read out (no averaging)
  } ave_sel_e;

  // Phase that comes right before phase p (the main-clock edge at the end
  // of the returned phase is the one that enters phase p).
  function automatic phase_t phase_before(input phase_t p);
    return p - phase_t'(1);
  endfunction

endpackage
