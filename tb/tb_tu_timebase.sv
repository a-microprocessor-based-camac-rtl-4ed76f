// tb_tu_timebase: checks that the TU tick comes every TU_CYCLES clocks,
// one clock wide, first one TU_CYCLES clocks after reset, and that clr
// restarts the time unit.
module tb_tu_timebase;
  localparam int TU = 7;
  logic clk = 0, rst_n = 0, clr = 0, tick;
  int checks = 0, failures = 0;
  int cyc = 0, last = 0, nticks = 0;

  tu_timebase #(.TU_CYCLES(TU)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1;
    // cycle counter counts rising edges since reset release
    for (int k = 1; k <= 10 * TU; k++) begin
      @(negedge clk);
      cyc = k;
      if (k % TU == 0) begin
        check(tick == 1'b1, $sformatf("tick expected at %0d", k));
        nticks++;
      end else
        check(tick == 1'b0, $sformatf("no tick expected at %0d", k));
    end
    check(nticks == 10, "ten ticks");
    // restart with clr in the middle of a TU
    repeat (3) @(negedge clk);
    clr = 1; @(negedge clk); clr = 0;
    for (int k = 1; k <= TU; k++) begin
      @(negedge clk);
      check(tick == (k == TU), $sformatf("after clr, cycle %0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
