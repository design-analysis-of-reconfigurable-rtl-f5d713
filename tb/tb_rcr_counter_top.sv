// tb_rcr_counter_top: end-to-end test of the reconfigurable-rate counter.
//
// The counter is narrowed to 8 bits so that it overflows within the run; the
// divider and the select decoding are as in the full design. The test first
// holds each of the eight rate codes with count high and checks the number of
// increments in a fixed window against the selected ratio, then runs a random
// phase in which count and sel1..sel3 change freely. Every cycle out1, out2
// and out3 are compared with a model built from the number of clock cycles
// since reset: with ratio P the divided clock is high in the second half of
// each P-cycle period, and the count advances on the edge ending the last
// cycle of a period when count is high. The mechanisms of the design are
// counted and each must occur: every rate code in use, a rate change without
// reset, a tick blocked by count low, and a counter overflow. A watchdog ends
// a hung run.
module tb_rcr_counter_top;

  localparam int unsigned W     = 8;
  localparam int unsigned SEL_W = rcr_pkg::SEL_W;

  logic clk = 1'b0;
  logic rst;
  logic count;
  logic sel1, sel2, sel3;
  logic [W-1:0] out1;
  logic out2, out3;

  logic [W-1:0] ref_q;
  int unsigned  n;          // cycles since reset

  int checks   = 0;
  int failures = 0;
  int code_seen [1 << SEL_W];
  int n_rate_changes = 0;
  int n_holds        = 0;
  int n_overflows    = 0;

  always #5 clk = ~clk;

  rcr_counter_top #(.WIDTH(W)) dut (
    .clk(clk), .rst(rst), .count(count),
    .sel1(sel1), .sel2(sel2), .sel3(sel3),
    .out1(out1), .out2(out2), .out3(out3)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int unsigned ratio();
    return 2 << {sel3, sel2, sel1};
  endfunction

  // One clock cycle: inputs are already set; check outputs, then advance the
  // model across the rising edge and wait for the falling edge.
  task automatic step();
    int unsigned p;
    bit          strobe;
    #1;
    p      = ratio();
    strobe = ((n + 1) % p) == 0;
    code_seen[{sel3, sel2, sel1}]++;
    check(out1 == ref_q, $sformatf("out1 %0d != %0d", out1, ref_q));
    check(out2 == ((n % p) >= p / 2), $sformatf("out2 n %0d p %0d", n, p));
    check(out3 == (count && strobe && ref_q == '1), "out3");
    if (strobe && !count) n_holds++;
    if (strobe && count) begin
      if (ref_q == '1) n_overflows++;
      ref_q = ref_q + 1'b1;
    end
    @(negedge clk);
    n++;
  endtask

  task automatic set_code(input int unsigned code);
    if (code != {sel3, sel2, sel1}) n_rate_changes++;
    {sel3, sel2, sel1} = SEL_W'(code);
  endtask

  initial begin
    int unsigned start_q;
    int unsigned p;

    rst   = 1'b1;
    count = 1'b0;
    {sel3, sel2, sel1} = '0;
    @(negedge clk);
    @(negedge clk);
    rst   = 1'b0;
    n     = 0;
    ref_q = '0;

    // Rate check: with count high, K periods of code c give K increments.
    count = 1'b1;
    for (int unsigned code = 0; code < (1 << SEL_W); code++) begin
      // Realign to a period boundary with a reset so the window is exact.
      rst = 1'b1;
      set_code(code);
      @(negedge clk);
      rst   = 1'b0;
      n     = 0;
      ref_q = '0;
      p = ratio();
      start_q = out1;
      repeat (3 * p) step();
      check(out1 - start_q == W'(3),
            $sformatf("code %0d: %0d increments in %0d cycles, want 3",
                      code, out1 - start_q, 3 * p));
    end

    // Random phase: count and rate change freely, no reset.
    repeat (30000) begin
      if ($urandom_range(0, 199) == 0) set_code($urandom_range(0, 1));
      else if ($urandom_range(0, 999) == 0) set_code($urandom_range(0, 7));
      if ($urandom_range(0, 9) == 0) count = ~count;
      step();
    end

    for (int c = 0; c < (1 << SEL_W); c++)
      check(code_seen[c] > 0, $sformatf("rate code %0d never used", c));
    check(n_rate_changes > 0, "no rate change");
    check(n_holds > 0, "count never held a tick");
    check(n_overflows > 0, "counter never overflowed");
    $display("rate changes %0d, held ticks %0d, overflows %0d",
             n_rate_changes, n_holds, n_overflows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
