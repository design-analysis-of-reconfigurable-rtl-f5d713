// clock_divider: reconfigurable clock-rate generator for the counter.
//
// A free-running prescaler, an 8-bit binary counter, advances on every input
// clock. Bit k of it is a square wave with period 2^(k+1) clock cycles, so the
// rate code picks one bit as the divided clock, clk_div. Rather than clocking
// the counter from that derived signal, the divider also produces tick, a
// one-cycle strobe in the cycle before each rising edge of clk_div (prescaler
// bits k..0 all ones). The counter uses tick as a clock enable and so advances
// exactly once per divided-clock period while staying in the one clock domain.
// That the divider is what sets the counter's rate is the design's; the
// prescaler structure, the power-of-two ratios and the clock-enable form are
// this design's own choices.
//
// Interface:
//   clk, rst  input clock; synchronous active-high reset clears the prescaler
//   sel       rate code (rcr_pkg::rate_sel_e), divide ratio 2^(sel+1)
//   tick      one-cycle strobe, once every 2^(sel+1) cycles
//   clk_div   divided clock, 50 % duty, period 2^(sel+1) cycles, registered
// Timing: after reset the first tick comes 2^(sel+1) - 1 cycles later. A new
// sel takes effect at once; the period in progress then ends at the next
// point where the low sel+1 prescaler bits are all ones, which may be sooner
// than a full new period.
module clock_divider #(
  parameter int unsigned SEL_W = rcr_pkg::SEL_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [SEL_W-1:0] sel,
  output logic             tick,
  output logic             clk_div
);

  localparam int unsigned PRE_W = 1 << SEL_W;  // one prescaler bit per code

  logic [PRE_W-1:0] pre;
  logic [PRE_W-1:0] low_mask;

  always_ff @(posedge clk) begin
    if (rst) pre <= '0;
    else     pre <= pre + 1'b1;
  end

  // low_mask has ones in bits sel..0.
  always_comb begin
    low_mask = '0;
    for (int unsigned k = 0; k < PRE_W; k++) begin
      if (k <= sel) low_mask[k] = 1'b1;
    end
  end

  assign tick    = ((pre & low_mask) == low_mask);
  assign clk_div = pre[sel];

endmodule
