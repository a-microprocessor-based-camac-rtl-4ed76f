// tb_cmd_fifo: self-checking test of the 16-word command FIFO.
// Fills the FIFO to full (checking that `full` rises exactly at DEPTH words
// and that further writes are refused), drains it checking order, then runs
// random simultaneous writes and reads against a queue model, and checks
// that clr empties it. Never writes when full or reads when empty, so the
// FIFO's own assertions stay quiet.
module tb_cmd_fifo;
  localparam int W = 20, D = 16;
  logic clk = 0, rst_n = 0, clr = 0, wr = 0, rd = 0;
  logic [W-1:0] wdata = '0, rdata;
  logic full, present;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  cmd_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!present && !full, "empty after reset");
    for (int i = 0; i < D; i++) begin
      check(!full, "not full before word");
      wr = 1; wdata = W'(32'h5A000 + i); model.push_back(wdata);
      @(negedge clk);
    end
    wr = 0;
    check(full, "full after DEPTH writes");
    check(present, "present when full");
    while (model.size() > 0) begin
      check(rdata == model[0], $sformatf("order: got %h exp %h", rdata, model[0]));
      void'(model.pop_front());
      rd = 1; @(negedge clk); rd = 0;
    end
    check(!present && !full, "empty after drain");
    // random traffic
    for (int k = 0; k < 3000; k++) begin
      wr = !full && ($urandom_range(0, 1) == 1);
      rd = present && ($urandom_range(0, 2) != 0);
      wdata = W'($urandom);
      if (present) check(rdata == model[0], "random order");
      @(posedge clk);
      if (rd) void'(model.pop_front());
      if (wr) model.push_back(wdata);
      @(negedge clk);
      check(present == (model.size() > 0), "present flag");
      check(full == (model.size() == D), "full flag");
    end
    wr = 0; rd = 0;
    clr = 1; @(negedge clk); clr = 0;
    model.delete();
    check(!present && !full, "clr empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
