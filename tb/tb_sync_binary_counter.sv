// tb_sync_binary_counter: self-checking test of the synchronous binary counter.
//
// Two instances run side by side from the same random enable: one at the
// full 128-bit width and one narrowed to 8 bits so that it wraps many times.
// Each is compared every cycle with a reference count kept by plain integer
// addition, and carry_out is compared with "enabled and all ones". The test
// also checks that reset clears the count and that the count holds while the
// enable is low. A watchdog ends the run if it hangs.
module tb_sync_binary_counter;

  localparam int unsigned W_FULL  = 128;
  localparam int unsigned W_SMALL = 8;
  localparam int unsigned CYCLES  = 3000;

  logic clk = 1'b0;
  logic rst;
  logic en;

  logic [W_FULL-1:0]  q_full;
  logic               co_full;
  logic [W_SMALL-1:0] q_small;
  logic               co_small;

  logic [W_FULL-1:0]  ref_full;
  logic [W_SMALL-1:0] ref_small;

  int checks   = 0;
  int failures = 0;
  int wraps    = 0;

  always #5 clk = ~clk;

  sync_binary_counter dut_full (
    .clk(clk), .rst(rst), .en(en), .q(q_full), .carry_out(co_full)
  );

  sync_binary_counter #(.WIDTH(W_SMALL)) dut_small (
    .clk(clk), .rst(rst), .en(en), .q(q_small), .carry_out(co_small)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Compare outputs with the reference; inputs change on the falling edge.
  task automatic compare();
    check(q_full == ref_full, $sformatf("q_full %h != %h", q_full, ref_full));
    check(q_small == ref_small, $sformatf("q_small %h != %h", q_small, ref_small));
    check(co_full == (en && ref_full == '1), "carry_out full");
    check(co_small == (en && ref_small == '1), "carry_out small");
  endtask

  initial begin
    rst = 1'b1;
    en  = 1'b1;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst       = 1'b0;
    en        = 1'b0;
    ref_full  = '0;
    ref_small = '0;
    compare();

    for (int unsigned n = 0; n < CYCLES; n++) begin
      // Mostly enabled, with runs of hold cycles.
      en = ($urandom_range(0, 3) != 0);
      #1;
      check(co_full == (en && ref_full == '1), "carry_out full");
      check(co_small == (en && ref_small == '1), "carry_out small");
      if (co_small) wraps++;
      @(posedge clk);
      if (en) begin
        ref_full  = ref_full + 1'b1;
        ref_small = ref_small + 1'b1;
      end
      @(negedge clk);
      compare();
    end

    // Reset in mid-count clears both counters.
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    en  = 1'b0;
    ref_full  = '0;
    ref_small = '0;
    compare();

    check(wraps >= 5, $sformatf("small counter wrapped only %0d times", wraps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
