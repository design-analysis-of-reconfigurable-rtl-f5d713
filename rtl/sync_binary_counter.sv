// sync_binary_counter: WIDTH-bit synchronous binary up counter.
//
// Every flip-flop is clocked by the same clock, so all bits change together
// and the output never shows the transient wrong values of a ripple counter.
// The next-state logic is the classic toggle form the design describes: bit 0
// toggles whenever counting is enabled, and bit i toggles when counting is
// enabled and bits i-1..0 are all high. The toggle condition is built as an
// AND chain, t[i] = t[i-1] & q[i-1], so the chain of "all lower bits are one"
// signals is the counter's carry path.
//
// Interface:
//   clk, rst   common clock; synchronous, active-high reset clears q to zero
//              (the reset style is this design's choice)
//   en         count enable; q advances by one on each rising edge with en high
//   q          count value, registered
//   carry_out  combinational: en high and q all ones, i.e. the count wraps to
//              zero at the coming edge (this output is this design's addition,
//              usable to cascade counters)
// Timing: one increment per enabled clock edge, no latency beyond the register.
module sync_binary_counter #(
  parameter int unsigned WIDTH = rcr_pkg::COUNT_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] q,
  output logic             carry_out
);

  // t[i]: bit i toggles at the next edge. all_ones runs along the chain,
  // holding en & q[i-1] & ... & q[0] when it reaches bit i.
  logic [WIDTH-1:0] t;

  always_comb begin
    logic all_ones;
    all_ones = en;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      t[i]     = all_ones;
      all_ones = all_ones & q[i];
    end
    carry_out = all_ones;
  end

  always_ff @(posedge clk) begin
    if (rst) q <= '0;
    else     q <= q ^ t;
  end

endmodule
