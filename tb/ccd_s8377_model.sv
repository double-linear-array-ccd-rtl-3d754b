// ccd_s8377_model: behavioural model of the digital side of a Hamamatsu
// S8377/S8378 CCD linear array, for testbenches only (not synthesizable
// logic of the front end; the real part is an analog sensor with on-chip
// CMOS drive logic).
//
// ST is sampled on each falling edge of CLK. If it is low a readout-reset
// cycle starts: the next N rising edges of CLK put pixels 1..N on the video
// output (modelled here as the pixel number, 0 when no pixel is out) and the
// (N+1)-th rising edge drives EOS low for one CLK period. Reading resets the
// pixels, so the model also counts readouts. VG (gain) is only recorded.
module ccd_s8377_model #(
  parameter int unsigned N = 256
) (
  input  logic clk,
  input  logic st,
  input  logic vg,
  output int   video_pixel,
  output logic eos,
  output int   readouts,
  output logic gain_high
);

  bit started = 0;
  int next_pix = 0;

  initial begin
    video_pixel = 0;
    eos         = 1'b1;
    readouts    = 0;
    gain_high   = 1'b0;
  end

  always @(negedge clk) begin
    if (!st) begin
      started  = 1;
      next_pix = 1;
      readouts++;
    end
  end

  always @(posedge clk) begin
    gain_high = vg;
    eos       = 1'b1;
    if (started) begin
      if (next_pix <= int'(N)) begin
        video_pixel = next_pix;
        next_pix++;
      end else begin
        video_pixel = 0;
        eos         = 1'b0;
        started     = 0;
      end
    end
  end

endmodule
