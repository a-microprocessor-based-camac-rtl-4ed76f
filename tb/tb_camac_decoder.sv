// tb_camac_decoder: checks X and Q for every F and A code against the
// module's command list, under all four FIFO-full/supply-good combinations;
// checks the read selection, that queued commands reach the FIFO only on
// the rising edge of S1 and only with Q=1 (with the right opcode, group and
// data), and that F9 A0 at S1 and Z with S2 raise clear_all.
module tb_camac_decoder;
  import idom_pkg::*;
  logic clk = 0, rst_n = 0;
  logic n = 0, s1 = 0, s2 = 0, z = 0, fifo_full = 0, c9_ok = 1;
  logic [4:0] f = '0;
  logic [3:0] a = '0;
  logic [15:0] w = '0;
  logic x, q, fifo_wr, clear_all;
  rsel_e rsel;
  cmd_t fifo_wdata;
  int checks = 0, failures = 0;

  camac_decoder dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Expected responses, written from the command list.
  typedef struct {
    logic x, q, queue, init;
    rsel_e rs;
    op_e op;
  } exp_t;

  function automatic exp_t expect_of(int fi, int ai, logic full, logic ok);
    exp_t e;
    e.x = 0; e.q = 0; e.queue = 0; e.init = 0; e.rs = RSEL_NONE; e.op = OP_WRITE;
    if (fi == 0 && ai <= 1) begin
      e.x = 1; e.q = ok; e.rs = (ai == 1) ? RSEL_GROUP1 : RSEL_GROUP0;
    end else if (fi == 1 && ai == 0) begin
      e.x = 1; e.q = 1; e.rs = RSEL_STATUS;
    end else if (fi == 9 && ai == 0) begin
      e.x = 1; e.q = 1; e.init = 1;
    end else if (fi == 10 && ai <= 1) begin
      e.x = 1; e.q = !full; e.queue = 1; e.op = OP_CLR_GROUP;
    end else if ((fi == 16 || fi == 17 || fi == 18 || fi == 19 || fi == 21 || fi == 23) && ai <= 1) begin
      e.x = 1; e.q = !full && ok; e.queue = 1;
      case (fi)
        16: e.op = OP_WRITE;
        17: e.op = (ai == 1) ? OP_XFER : OP_WIDTH;
        18: e.op = OP_SET;
        19: e.op = OP_PULSE_ON;
        21: e.op = OP_CLEAR;
        default: e.op = OP_PULSE_OFF;
      endcase
    end else if (fi == 27 && ai == 0) begin
      e.x = 1; e.q = !full && ok;
    end
    return e;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nwr, nclr;
  exp_t e;

  initial begin
    @(negedge clk); rst_n = 1;
    for (int cond = 0; cond < 4; cond++) begin
      fifo_full = cond[0];
      c9_ok     = cond[1];
      for (int fi = 0; fi < 32; fi++) begin
        for (int ai = 0; ai < 16; ai++) begin
          // one dataway cycle: N/F/A, then S1 (2 clocks), then S2 (2 clocks)
          f = 5'(fi); a = 4'(ai); n = 1; w = 16'($urandom);
          e = expect_of(fi, ai, fifo_full, c9_ok);
          nwr = 0; nclr = 0;
          @(negedge clk);
          check(x == e.x && q == e.q,
                $sformatf("F%0d A%0d full=%0d ok=%0d: X=%0d Q=%0d exp %0d %0d",
                          fi, ai, fifo_full, c9_ok, x, q, e.x, e.q));
          check(rsel == e.rs, $sformatf("F%0d A%0d rsel", fi, ai));
          check(!fifo_wr && !clear_all, "nothing before S1");
          s1 = 1;
          for (int k = 0; k < 2; k++) begin
            #1;
            if (fifo_wr) begin
              nwr++;
              check(fifo_wdata.op == e.op && fifo_wdata.grp == a[0] && fifo_wdata.data == w,
                    $sformatf("F%0d A%0d fifo word", fi, ai));
            end
            if (clear_all) nclr++;
            @(negedge clk);
          end
          s1 = 0; s2 = 1;
          for (int k = 0; k < 2; k++) begin
            #1; if (fifo_wr) nwr++; if (clear_all) nclr++;
            @(negedge clk);
          end
          s2 = 0; n = 0;
          check(nwr == ((e.queue && e.q) ? 1 : 0), $sformatf("F%0d A%0d write count %0d", fi, ai, nwr));
          check(nclr == (e.init ? 1 : 0), $sformatf("F%0d A%0d clear count %0d", fi, ai, nclr));
          // X and Q need N
          @(negedge clk);
          check(!x && !q && rsel == RSEL_NONE, "no response without N");
        end
      end
    end
    // Z with S2 and no N clears the module, Z with S1 alone does not
    f = 5'd0; a = 4'd0; n = 0; z = 1; nclr = 0;
    @(negedge clk);
    s1 = 1; #1; if (clear_all) nclr++; @(negedge clk); s1 = 0;
    check(nclr == 0, "Z with S1 does not clear");
    s2 = 1; #1; if (clear_all) nclr++; @(negedge clk);
    #1; if (clear_all) nclr++; @(negedge clk); s2 = 0; z = 0;
    check(nclr == 1, "Z with S2 clears once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
