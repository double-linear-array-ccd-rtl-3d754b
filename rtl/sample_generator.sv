// sample_generator: SAMPLE trigger pulses for the ADC board, one per pixel.
//
// After a start pulse the arrays put out one pixel per CLK period. The ADC
// board converts both analog outputs simultaneously on each SAMPLE pulse,
// so this block emits exactly PIXELS pulses (256 for the S8377-256), one per
// CCD clock period, each one main-clock cycle (1/8 of CLK) long. The pulse
// sits in phase SAMPLE_PHASE of the CCD clock period; moving it changes the
// delay between CLK and SAMPLE in 1/8 CLK steps, which is how the sampling
// point is placed on the settled video level. The default phase 3 is the
// board's: the pulse is the last eighth of the CLK-low half, ending on the
// CLK rising edge.
//
// How it works: while ST is low the pixel counter is cleared and the block
// is armed. Once ST is high again, every entry into SAMPLE_PHASE produces a
// pulse and advances the counter; when the counter reaches PIXELS the block
// disarms until the next ST pulse. No pulse is produced while ST is low.
//
// Ports: phase (clock divider), st (ST line, active low), sample (to the
// ADC board, registered), pixel (number of SAMPLE pulses so far in this
// readout, PIXELS once it is complete), active (armed and not yet done).
// Timing: the first pulse is in the first SAMPLE_PHASE after ST rises; the
// pulses are 8 main-clock cycles apart.
module sample_generator
  import ccd_pkg::*;
#(
  parameter int unsigned PIXELS       = 256,
  parameter phase_t      SAMPLE_PHASE = 3'd3,
  localparam int unsigned PIX_W       = $clog2(PIXELS + 1)
) (
  input  logic             ckin,
  input  logic             rst_n,
  input  phase_t           phase,
  input  logic             st,
  output logic             sample,
  output logic [PIX_W-1:0] pixel,
  output logic             active
);

  logic armed;
  logic done;

  assign done   = (pixel == PIX_W'(PIXELS));
  assign active = armed && !done;

  always_ff @(posedge ckin or negedge rst_n) begin
    if (!rst_n) begin
      armed  <= 1'b0;
      pixel  <= '0;
      sample <= 1'b0;
    end else begin
      sample <= 1'b0;
      if (!st) begin
        armed <= 1'b1;
        pixel <= '0;
      end else if (armed && done) begin
        armed <= 1'b0;
      end else if (armed && phase == phase_before(SAMPLE_PHASE)) begin
        sample <= 1'b1;
        pixel  <= pixel + PIX_W'(1);
      end
    end
  end

  // a SAMPLE pulse always lies in the chosen phase
  sample_in_phase : assert property (
    @(posedge ckin) disable iff (!rst_n) sample |-> phase == SAMPLE_PHASE
  );

endmodule
