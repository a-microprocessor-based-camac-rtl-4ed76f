// tb_idom_top: end-to-end test of the whole module through the CAMAC
// dataway, at a short time unit (TU_CYCLES = 50) and a slow executor
// (EXEC_CYCLES = 40) so that a burst of commands overfills the FIFO.
//
// Each dataway cycle is: N, F, A, W set; X, Q, R sampled two clocks later;
// S1 high for two clocks; S2 high for two clocks; one idle clock.
// Mechanisms exercised and counted (each must happen at least once):
//   immediate reads of both groups and of status, Q=0 on a full FIFO with
//   the refused command dropped, the "FIFO full" and "data present" status
//   bits, Q=0 and status bits on a lost connector supply, test status,
//   group write, selective set and clear, group clear, pulse on and off at
//   the default width, preset width, immediate width, delayed transition,
//   start- and end-edge pulse transfer, F9 clear with commands pending,
//   Z*S2 clear, and X=0 for unimplemented codes.
// Pulse lengths are checked in clocks: a width of w TU must last more than
// (w-1)*TU and at most w*TU clocks.
module tb_idom_top;
  import idom_pkg::*;
  localparam int TU   = 50;
  localparam int EXEC = 40;
  localparam int DW   = 10;

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

  idom_top #(.TU_CYCLES(TU), .DEFAULT_WIDTH(8'(DW)), .FIFO_DEPTH(16), .EXEC_CYCLES(EXEC)) dut (.*);

  always #5 clk = ~clk;

  // edge recorder
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

  // mechanism counters
  typedef enum int {
    M_READ0, M_READ1, M_STATUS, M_FULL_Q0, M_FULL_BIT, M_PRESENT_BIT, M_SUPPLY_Q0,
    M_TEST, M_WRITE, M_SET_CLR, M_GRP_CLR, M_PULSE_ON, M_PULSE_OFF, M_PRESET,
    M_IMMEDIATE, M_DELAYED, M_XFER_START, M_XFER_END, M_F9, M_Z, M_NOX, M_COUNT
  } mech_e;
  int mech[M_COUNT];

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

  // write command that must be accepted
  task automatic cmd(input int fi, input int ai, input logic [15:0] wd);
    camac(fi, ai, wd, xx, qq, rr);
    check(xx && qq, $sformatf("F%0d A%0d accepted", fi, ai));
  endtask

  task automatic wait_idle();
    logic xo, qo;
    logic [19:0] ro;
    do camac(1, 0, 16'h0, xo, qo, ro); while (ro[3]);
  endtask

  function automatic logic [15:0] wdef(int ch, logic pol, logic defer, int width);
    return 16'(ch) | (16'(pol) << 6) | (16'(defer) << 7) | (16'(width) << 8);
  endfunction
  function automatic logic [15:0] wxfer(int ch, logic at_start, int target);
    return 16'(ch) | (16'(at_start) << 7) | (16'(target) << 8);
  endfunction

  task automatic check_width(int ch, int width_tu, longint st, longint en, string what);
    longint d = en - st;
    check(d > longint'((width_tu - 1) * TU) && d <= longint'(width_tu * TU),
          $sformatf("%s: ch%0d lasted %0d clocks for %0d TU", what, ch, d, width_tu));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] last_ok;
  int nq0;
  initial begin
    for (int i = 0; i < 32; i++) begin rise_cyc[i] = 0; fall_cyc[i] = 0; end
    foreach (mech[i]) mech[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // --- DC control and immediate reads
    cmd(16, 0, 16'hBEEF); cmd(16, 1, 16'h1357);
    wait_idle();
    camac(0, 0, 0, xx, qq, rr);
    check(xx && qq && rr[15:0] == 16'hBEEF && rr[19:16] == 4'b0000, "read group 0"); mech[M_READ0]++;
    camac(0, 1, 0, xx, qq, rr);
    check(xx && qq && rr[15:0] == 16'h1357, "read group 1"); mech[M_READ1]++;
    check(out == 32'h1357_BEEF, "outputs after write"); mech[M_WRITE]++;
    cmd(18, 0, 16'h0010); cmd(21, 1, 16'h0007); wait_idle();
    check(out == 32'h1350_BEFF, $sformatf("set/clear %h", out)); mech[M_SET_CLR]++;
    cmd(10, 1, 16'h0); wait_idle();
    check(out == 32'h0000_BEFF, "group 1 clear"); mech[M_GRP_CLR]++;
    cmd(10, 0, 16'h0); wait_idle();
    check(out == 32'h0, "group 0 clear");

    // --- FIFO overrun: a burst of group writes, faster than the executor
    nq0 = 0; last_ok = '0;
    for (int k = 1; k <= 24; k++) begin
      camac(16, 0, 16'(k), xx, qq, rr);
      if (qq) last_ok = 16'(k); else nq0++;
      if (k == 16) check(nq0 == 0, "first 16 commands of a burst all accepted");
      if (k == 20) begin
        camac(1, 0, 0, xx, qq, rr);
        check(xx && qq, "status read X=Q=1");
        if (rr[2]) mech[M_FULL_BIT]++;
        if (rr[3]) mech[M_PRESENT_BIT]++;
        mech[M_STATUS]++;
        camac(27, 0, 0, xx, qq, rr);
        check(xx && !qq, "test status Q=0 with full FIFO");
      end
    end
    check(nq0 > 0, "some writes refused with Q=0");
    if (nq0 > 0) mech[M_FULL_Q0]++;
    wait_idle();
    check(out[15:0] == last_ok, $sformatf("last accepted write wins: %h vs %h", out[15:0], last_ok));

    // --- connector supply lost on J2
    c9_ok_j2 = 0;
    camac(18, 0, 16'h8000, xx, qq, rr);
    check(xx && !qq, "write refused when supply low");
    camac(0, 0, 0, xx, qq, rr);
    check(xx && !qq && rr[17] && !rr[16], "read: Q=0 and R18 set");
    camac(27, 0, 0, xx, qq, rr);
    check(xx && !qq, "test status Q=0 on low supply"); mech[M_SUPPLY_Q0]++;
    c9_ok_j2 = 1;
    camac(27, 0, 0, xx, qq, rr);
    check(xx && qq, "test status Q=1"); mech[M_TEST]++;
    wait_idle();
    check(out[15] == 0, "refused write had no effect");
    camac(2, 0, 0, xx, qq, rr);
    check(!xx && !qq, "F2: X=Q=0");
    camac(16, 2, 0, xx, qq, rr);
    check(!xx && !qq, "F16 A2: X=Q=0"); mech[M_NOX]++;

    // --- pulses at the default width
    cmd(16, 0, 16'h0000); cmd(16, 1, 16'h0002); wait_idle();   // ch17 on
    cmd(19, 0, 16'h0001);          // pulse on ch0
    cmd(23, 1, 16'h0002);          // pulse off ch17
    wait_idle();
    repeat ((DW + 1) * TU) @(negedge clk);
    check(out[0] == 0 && out[17] == 1, "default pulses ended");
    check_width(0, DW, rise_cyc[0], fall_cyc[0], "pulse on");   mech[M_PULSE_ON]++;
    check_width(17, DW, fall_cyc[17], rise_cyc[17], "pulse off"); mech[M_PULSE_OFF]++;
    // preset width used once, then the default again
    cmd(17, 0, wdef(1, 1, 1, 3));
    cmd(19, 0, 16'h0002);
    repeat (5 * TU) @(negedge clk);
    check_width(1, 3, rise_cyc[1], fall_cyc[1], "preset width"); mech[M_PRESET]++;
    cmd(19, 0, 16'h0002);
    repeat ((DW + 1) * TU) @(negedge clk);
    check_width(1, DW, rise_cyc[1], fall_cyc[1], "preset used once");
    // immediate width and delayed transition (ch4 already on, pulse on)
    cmd(18, 0, 16'h0010); wait_idle();
    cmd(17, 0, wdef(4, 1, 0, 2)); wait_idle();
    check(out[4] == 1, "delayed: still on"); mech[M_IMMEDIATE]++;
    repeat (3 * TU) @(negedge clk);
    check(out[4] == 0, "delayed: off after 2 TU"); mech[M_DELAYED]++;

    // --- pulse transfer chain 18 -> 3 -> 7 -> 24 -> 23
    cmd(16, 0, 16'h0088); cmd(16, 1, 16'h0000);
    cmd(17, 0, wdef(18, 1, 1, 2));
    cmd(17, 0, wdef(3, 0, 1, 4));
    cmd(17, 0, wdef(7, 0, 1, 3));
    cmd(17, 0, wdef(24, 1, 1, 2));
    cmd(17, 0, wdef(23, 1, 1, 2));
    cmd(17, 1, wxfer(18, 0, 3));
    cmd(17, 1, wxfer(3, 1, 7));
    cmd(17, 1, wxfer(7, 0, 24));
    cmd(17, 1, wxfer(24, 1, 23));
    wait_idle();
    check(out == 32'h0000_0088, "chain armed");
    cmd(19, 1, 16'h0004);
    repeat (14 * TU) @(negedge clk);
    check_width(18, 2, rise_cyc[18], fall_cyc[18], "chain 18");
    check_width(3, 4, fall_cyc[3], rise_cyc[3], "chain 3");
    check_width(7, 3, fall_cyc[7], rise_cyc[7], "chain 7");
    check_width(24, 2, rise_cyc[24], fall_cyc[24], "chain 24");
    check_width(23, 2, rise_cyc[23], fall_cyc[23], "chain 23");
    check(fall_cyc[3] - fall_cyc[18] == 1, "18 end -> 3 start");
    if (fall_cyc[3] - fall_cyc[18] == 1) mech[M_XFER_END]++;
    check(fall_cyc[7] - fall_cyc[3] == 1, "3 start -> 7 start");
    if (fall_cyc[7] - fall_cyc[3] == 1) mech[M_XFER_START]++;
    check(rise_cyc[24] - rise_cyc[7] == 1, "7 end -> 24 start");
    check(rise_cyc[23] - rise_cyc[24] == 1, "24 start -> 23 start");
    check(out == 32'h0000_0088, "chain finished");

    // --- F9 with commands still queued
    for (int k = 0; k < 6; k++) cmd(18, 1, 16'hFFFF);
    cmd(19, 0, 16'hFF00);
    camac(9, 0, 0, xx, qq, rr);
    check(xx && qq, "F9 X=Q=1");
    camac(1, 0, 0, xx, qq, rr);
    check(rr[3:2] == 2'b00, "F9 emptied FIFO");
    repeat (2 * EXEC) @(negedge clk);
    check(out == 32'h0, "F9 cleared outputs, queued commands dropped"); mech[M_F9]++;

    // --- Z*S2
    cmd(16, 0, 16'h00FF); cmd(19, 1, 16'h0F00); wait_idle();
    check(out != 0, "outputs set before Z");
    @(negedge clk); z = 1; s1 = 1; repeat (2) @(negedge clk); s1 = 0;
    s2 = 1; repeat (2) @(negedge clk); s2 = 0; z = 0;
    check(out == 32'h0, "Z*S2 cleared outputs");
    repeat ((DW + 1) * TU) @(negedge clk);
    check(out == 32'h0, "no pulse survives Z"); mech[M_Z]++;

    for (int i = 0; i < M_COUNT; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s never happened", mech_e'(i)));
      $display("mechanism %-14s %0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
