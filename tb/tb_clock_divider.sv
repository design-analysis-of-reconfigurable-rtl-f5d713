// tb_clock_divider: self-checking test of the reconfigurable clock divider.
//
// For every rate code the divider is reset and run for several periods; its
// tick and clk_div outputs are compared every cycle with values derived from
// the number of cycles since reset: for ratio P = 2^(code+1), tick is high
// when (n+1) is a multiple of P and clk_div is high in the second half of
// each period. The tick period and the cycle of the first tick are checked
// as counts. A final phase changes the code at random without reset, where
// the same cycle-count rule must still hold. A watchdog ends a hung run.
module tb_clock_divider;

  import rcr_pkg::*;

  logic clk = 1'b0;
  logic rst;
  logic [SEL_W-1:0] sel;
  logic tick;
  logic clk_div;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  clock_divider dut (
    .clk(clk), .rst(rst), .sel(sel), .tick(tick), .clk_div(clk_div)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit exp_tick(int unsigned n, int unsigned p);
    return ((n + 1) % p) == 0;
  endfunction

  function automatic bit exp_div(int unsigned n, int unsigned p);
    return (n % p) >= (p / 2);
  endfunction

  initial begin
    int unsigned n;
    int unsigned p;
    int unsigned first_tick;
    int unsigned last_tick;
    int unsigned ticks;

    for (int code = 0; code < (1 << SEL_W); code++) begin
      p = div_ratio(rate_sel_e'(code));
      check(p == (2 << code), "div_ratio");
      rst = 1'b1;
      sel = SEL_W'(code);
      @(negedge clk);
      @(negedge clk);
      rst = 1'b0;
      n = 0;
      ticks = 0;
      first_tick = 0;
      last_tick = 0;
      repeat (6 * p) begin
        check(tick == exp_tick(n, p),
              $sformatf("tick code %0d n %0d", code, n));
        check(clk_div == exp_div(n, p),
              $sformatf("clk_div code %0d n %0d", code, n));
        if (tick) begin
          if (ticks == 0) first_tick = n;
          else check(n - last_tick == p,
                     $sformatf("tick period %0d, want %0d", n - last_tick, p));
          last_tick = n;
          ticks++;
        end
        @(negedge clk);
        n++;
      end
      check(first_tick == p - 1,
            $sformatf("first tick code %0d at %0d", code, first_tick));
      check(ticks == 6, $sformatf("code %0d ticks %0d", code, ticks));
    end

    // Random reconfiguration without reset.
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    n = 0;
    repeat (4000) begin
      if ($urandom_range(0, 49) == 0) sel = SEL_W'($urandom);
      #1;
      p = 2 << sel;
      check(tick == exp_tick(n, p), $sformatf("tick random n %0d", n));
      check(clk_div == exp_div(n, p), $sformatf("clk_div random n %0d", n));
      @(negedge clk);
      n++;
    end

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
