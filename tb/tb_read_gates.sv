// tb_read_gates: checks the R-line layout of group reads, status read and
// the idle case for random latch and status values.
module tb_read_gates;
  import idom_pkg::*;
  rsel_e rsel;
  logic [31:0] latches;
  logic c9_ok_j1, c9_ok_j2, fifo_full, fifo_present;
  logic [19:0] r, exp_r;
  logic [3:0] st;
  int checks = 0, failures = 0;
  logic clk = 0;

  read_gates dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      latches = $urandom;
      {c9_ok_j1, c9_ok_j2, fifo_full, fifo_present} = 4'($urandom);
      rsel = rsel_e'(k % 4);
      #1;
      // R17: J1 below +12 V, R18: J2 below, R19: full, R20: data present
      st = {fifo_present, fifo_full, ~c9_ok_j2, ~c9_ok_j1};
      case (k % 4)
        1: exp_r = {st, latches[15:0]};
        2: exp_r = {st, latches[31:16]};
        3: exp_r = {16'h0, st};
        default: exp_r = '0;
      endcase
      checks++;
      if (r !== exp_r) begin
        failures++;
        $display("FAIL: sel %0d r %h exp %h", k % 4, r, exp_r);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
