// rcr_counter_top: reconfigurable-clock-rate synchronous binary counter.
//
// A clock divider turns the input clock into a slower counting rate selected
// at run time by sel1..sel3, and a 128-bit synchronous binary counter advances
// at that rate while count is high. Running the wide counter at a lower,
// selectable rate is the design's idea: its long carry chain then has several
// input clock cycles to settle, and it switches less often, which saves power.
//
// Ports (the names are the design's; their widths and meanings beyond the
// names are this design's reading):
//   clk        input clock
//   rst        synchronous active-high reset: counter and divider to zero
//   count      count enable
//   sel1..3    rate code {sel3, sel2, sel1}: the counter advances once every
//              2^(code+1) clock cycles (divide-by-2 .. divide-by-256)
//   out1       WIDTH-bit count value
//   out2       divided clock from the divider (the counter's rate)
//   out3       carry out: high for the one cycle in which the counter, being
//              all ones, is about to wrap to zero
// Timing: with count held high the count rises by one on the clock edge that
// ends each tick cycle, i.e. at every rising edge of out2. With code c the
// first increment after reset comes on edge 2^(c+1).
module rcr_counter_top #(
  parameter int unsigned WIDTH = rcr_pkg::COUNT_W,
  parameter int unsigned SEL_W = rcr_pkg::SEL_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             count,
  input  logic             sel1,
  input  logic             sel2,
  input  logic             sel3,
  output logic [WIDTH-1:0] out1,
  output logic             out2,
  output logic             out3
);

  logic [SEL_W-1:0] sel;
  logic             tick;

  assign sel = SEL_W'({sel3, sel2, sel1});

  clock_divider #(.SEL_W(SEL_W)) u_div (
    .clk     (clk),
    .rst     (rst),
    .sel     (sel),
    .tick    (tick),
    .clk_div (out2)
  );

  sync_binary_counter #(.WIDTH(WIDTH)) u_cnt (
    .clk       (clk),
    .rst       (rst),
    .en        (count & tick),
    .q         (out1),
    .carry_out (out3)
  );

endmodule
