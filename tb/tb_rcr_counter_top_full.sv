// tb_rcr_counter_top_full: the counter at its full 128-bit width and default
// parameters, taken through one complete operation: reset, counting at every
// one of the eight selectable rates in turn (changing the rate without reset),
// a pause with count low, and a final reset. out1 is compared every cycle with
// a 128-bit reference advanced once per selected period; out2 with the
// divided-clock waveform; out3 must stay low because a 128-bit count cannot
// reach all ones in a simulation. A watchdog ends a hung run.
module tb_rcr_counter_top_full;

  logic clk = 1'b0;
  logic rst;
  logic count;
  logic sel1, sel2, sel3;
  logic [127:0] out1;
  logic out2, out3;

  logic [127:0] ref_q;
  int unsigned  n;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rcr_counter_top dut (
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

  task automatic step();
    int unsigned p;
    bit          strobe;
    #1;
    p      = 2 << {sel3, sel2, sel1};
    strobe = ((n + 1) % p) == 0;
    check(out1 == ref_q, $sformatf("out1 %h != %h", out1, ref_q));
    check(out2 == ((n % p) >= p / 2), "out2");
    check(out3 == 1'b0, "out3");
    if (strobe && count) ref_q = ref_q + 1'b1;
    @(negedge clk);
    n++;
  endtask

  initial begin
    rst   = 1'b1;
    count = 1'b0;
    {sel3, sel2, sel1} = 3'd0;
    @(negedge clk);
    @(negedge clk);
    rst   = 1'b0;
    n     = 0;
    ref_q = '0;

    count = 1'b1;
    for (int unsigned code = 0; code < 8; code++) begin
      {sel3, sel2, sel1} = 3'(code);
      repeat (10 * (2 << code)) step();
    end
    // Each code ran for ten of its periods, so it gave exactly ten ticks.
    check(out1 == 128'd80, $sformatf("total count %0d, want 80", out1));

    count = 1'b0;
    repeat (600) step();
    check(out1 == 128'd80, "count moved while count was low");

    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check(out1 == '0, "reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
