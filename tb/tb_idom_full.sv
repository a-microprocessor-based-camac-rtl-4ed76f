// tb_idom_full: the module at its default parameters (25 ms TU at 12 MHz,
// i.e. 300000 clocks; default width 10 TU = 250 ms; 16-word FIFO; 600-clock
// command time). Runs one complete operation through the dataway: a group
// write read back at once, a default-width pulse (checked to last between
// 9 and 10 TU in clocks), then the five-channel pulse-transfer sequence
// 18 -> 3 -> 7 -> 24 -> 23 loaded with deferred presets and started by one
// selective-pulse command, checking each width and each hand-over.
module tb_idom_full;
  localparam longint TU = 300000;
  localparam int     DW = 10;

  logic clk = 0, rst_n = 0;
  logic n = 0, s1 = 0, s2 = 0, z = 0;
  logic [4:0] f = '0;
  logic [3:0] a = '0;
  logic [15:0] w = '0;
  logic [19:0] r;
  logic x, q;
  logic c9_ok_j1 = 1, c9_ok_j2 = 1;
  logic [31:0] out;
  int checks = 0, failures = 0;

  idom_top dut (.*);

  always #5 clk = ~clk;

  longint cycle = 0;
  longint rise_cyc[32], fall_cyc[32];
  logic [31:0] out_d = '0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    for (int i = 0; i < 32; i++) begin
      if (out[i] && !out_d[i]) rise_cyc[i] = cycle;
      if (!out[i] && out_d[i]) fall_cyc[i] = cycle;
    end
    out_d <= out;
  end

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic camac(input int fi, input int ai, input logic [15:0] wd,
                       output logic xo, output logic qo, output logic [19:0] ro);
    @(negedge clk);
    n = 1; f = 5'(fi); a = 4'(ai); w = wd;
    repeat (2) @(negedge clk);
    xo = x; qo = q; ro = r;
    s1 = 1; repeat (2) @(negedge clk); s1 = 0;
    s2 = 1; repeat (2) @(negedge clk); s2 = 0;
    n = 0;
  endtask

  logic xx, qq;
  logic [19:0] rr;

  task automatic cmd(input int fi, input int ai, input logic [15:0] wd);
    camac(fi, ai, wd, xx, qq, rr);
    check(xx && qq, $sformatf("F%0d A%0d accepted", fi, ai));
  endtask

  task automatic wait_idle();
    do camac(1, 0, 16'h0, xx, qq, rr); while (rr[3]);
  endtask

  function automatic logic [15:0] wdef(int ch, logic pol, int width);
    return 16'(ch) | (16'(pol) << 6) | (16'(1) << 7) | (16'(width) << 8);
  endfunction
  function automatic logic [15:0] wxfer(int ch, logic at_start, int target);
    return 16'(ch) | (16'(at_start) << 7) | (16'(target) << 8);
  endfunction

  task automatic check_width(int ch, int wtu, longint st, longint en);
    longint d = en - st;
    check(d > (wtu - 1) * TU && d <= wtu * TU,
          $sformatf("ch%0d lasted %0d clocks for %0d TU", ch, d, wtu));
  endtask

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin rise_cyc[i] = 0; fall_cyc[i] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;
    cmd(16, 0, 16'h0088); cmd(16, 1, 16'h0000);
    wait_idle();
    camac(0, 0, 0, xx, qq, rr);
    check(xx && qq && rr == 20'h00088, "read back group 0");
    // default-width pulse on channel 0
    cmd(19, 0, 16'h0001);
    wait_idle();
    check(out[0] == 1, "pulse started");
    repeat (int'(DW * TU)) @(negedge clk);
    check(out[0] == 0, "pulse over");
    check_width(0, DW, rise_cyc[0], fall_cyc[0]);
    // Pulse transfer sequence
    cmd(17, 0, wdef(18, 1, 2));
    cmd(17, 0, wdef(3, 0, 3));
    cmd(17, 0, wdef(7, 0, 2));
    cmd(17, 0, wdef(24, 1, 1));
    cmd(17, 0, wdef(23, 1, 2));
    cmd(17, 1, wxfer(18, 0, 3));
    cmd(17, 1, wxfer(3, 1, 7));
    cmd(17, 1, wxfer(7, 0, 24));
    cmd(17, 1, wxfer(24, 1, 23));
    wait_idle();
    cmd(19, 1, 16'h0004);
    repeat (int'(8 * TU)) @(negedge clk);
    check_width(18, 2, rise_cyc[18], fall_cyc[18]);
    check_width(3, 3, fall_cyc[3], rise_cyc[3]);
    check_width(7, 2, fall_cyc[7], rise_cyc[7]);
    check_width(24, 1, rise_cyc[24], fall_cyc[24]);
    check_width(23, 2, rise_cyc[23], fall_cyc[23]);
    check(fall_cyc[3] - fall_cyc[18] == 1, "18 end -> 3 start");
    check(fall_cyc[7] - fall_cyc[3] == 1, "3 start -> 7 start");
    check(rise_cyc[24] - rise_cyc[7] == 1, "7 end -> 24 start");
    check(rise_cyc[23] - rise_cyc[24] == 1, "24 start -> 23 start");
    check(out == 32'h0000_0088, "sequence finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
