// average_selector: hardware averaging, one readout request per n triggers.
//
// The CCD integrates light between two readouts, so reading the array only
// once every n laser pulses sums n pulses in the pixels themselves. Two TTL
// lines from the host PC (AV1:AV0) pick n from a table of four values:
//   ave = 0 -> N0 = 100, ave = 1 -> N1 = 50, ave = 2 -> N2 = 20, ave = 3 -> N3 = 1.
// The defaults are the board's; they are parameters so the table can be
// changed as easily as on the original programmable chip.
//
// How it works: a trigger counter (CNT_W = 7 bits, as on the board) counts
// trigger events. On the trigger that would make it reach n it issues a
// one-cycle readout request and restarts from zero. As on the board, the
// counter is also cleared while the CCD ST line is low (input clr), so every
// readout starts a fresh average. The board compares the count for equality
// with n-1; here a count that is already at or past n-1 (possible only if
// ave changes in the middle of an average) also fires, so a late change of
// ave never stalls the readouts for a counter wrap.
//
// Ports: trig is a one-cycle pulse per trigger event (rising edge of the
// synchronized trigger input), ave the synchronized selection, clr the
// "ST is low" level, req the one-cycle readout request.
// Timing: req is registered; it is high in the cycle after the trig pulse
// that completes the average.
module average_selector
  import ccd_pkg::*;
#(
  parameter int unsigned CNT_W = 7,
  parameter int unsigned N0    = 100,
  parameter int unsigned N1    = 50,
  parameter int unsigned N2    = 20,
  parameter int unsigned N3    = 1
) (
  input  logic     ckin,
  input  logic     rst_n,
  input  logic     trig,
  input  ave_sel_e ave,
  input  logic     clr,
  output logic     req
);

  typedef logic [CNT_W-1:0] cnt_t;

  // every n must be at least 1 and its n-1 must fit the counter
  if (N0 < 1 || N1 < 1 || N2 < 1 || N3 < 1 ||
      N0 > (1 << CNT_W) || N1 > (1 << CNT_W) ||
      N2 > (1 << CNT_W) || N3 > (1 << CNT_W)) begin : g_bad_table
    $error("average_selector: averaging factors must be 1..2**CNT_W");
  end

  cnt_t count;
  cnt_t last;      // n-1 for the selected mode
  logic hit;

  always_comb begin
    unique case (ave)
      AVE_SEL0:  last = cnt_t'(N0 - 1);
      AVE_SEL1:  last = cnt_t'(N1 - 1);
      AVE_SEL2:  last = cnt_t'(N2 - 1);
      default: last = cnt_t'(N3 - 1);
    endcase
  end

  assign hit = trig && (count >= last);

  always_ff @(posedge ckin or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      req   <= 1'b0;
    end else begin
      req <= hit && !clr;
      if (clr || hit) count <= '0;
      else if (trig)  count <= count + cnt_t'(1);
    end
  end

endmodule
