// sync2: two-flip-flop synchronizer for asynchronous inputs.
//
// Brings a level from outside (trigger, discriminator, PC lines) into the
// main-clock domain. Each bit passes through two flip-flops clocked by the
// main clock, so the output is a clean, registered copy of the input,
// delayed by two clock cycles. The bits are synchronized independently;
// multi-bit use is only for quasi-static lines such as the average select.
// Resetting to RESET_VAL keeps the output defined right after reset.
// The original board used these inputs directly as clocks and clears; the
// synchronizers are this design's addition for a fully synchronous chip.
module sync2 #(
  parameter int unsigned W         = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
