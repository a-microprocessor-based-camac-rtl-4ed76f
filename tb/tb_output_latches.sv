// tb_output_latches: random bit-wise writes against a model, plus clear.
module tb_output_latches;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [31:0] we = '0, d = '0, q, model = '0;
  int checks = 0, failures = 0;

  output_latches #(.N(32)) dut (.*);

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
    @(negedge clk);
    check(q == 32'h0, "all off after reset");
    for (int k = 0; k < 500; k++) begin
      we = $urandom; d = $urandom;
      clr = ($urandom_range(0, 40) == 0);
      @(negedge clk);
      model = clr ? 32'h0 : ((model & ~we) | (d & we));
      check(q == model, $sformatf("q %h exp %h", q, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
