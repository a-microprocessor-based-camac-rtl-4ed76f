// camac_decoder: CAMAC command decoding, X/Q responses and FIFO loading.
//
// In the module this is done by field programmable logic arrays. For every
// dataway cycle addressed to the station (N high) it decodes the function
// F and sub-address A and
//   * answers X and Q at once, from the present FIFO and supply state;
//   * for reads (F0 A0/A1, F1 A0) selects what the read gates drive;
//   * for queued commands (F10, F16-F19, F21, F23 with A0/A1) writes one
//     cmd_t word into the FIFO at the leading edge of strobe S1, but only
//     when Q is 1 (FIFO has room and, for F16-F23, both connector supplies
//     are above +12 V);
//   * for F9 A0 clears everything (outputs, FIFO, executor) at S1;
//   * for dataway Z with S2 (no N needed) clears everything too.
// C and I have no effect on this module and are not inputs.
//
// Q rules: F0 -> both supplies good; F1 A0, F9 A0 -> 1; F10 -> FIFO not
// full; F16-F23 and F27 A0 -> FIFO not full and both supplies good. Any
// other F/A gives X=Q=0.
//
// Timing: all inputs are taken to be synchronous to clk (synchronisers sit
// outside this block). X, Q and rsel are combinational and valid while
// N/F/A are stable; they are meant to be sampled at S1 as the dataway does.
// S1 and S2 may be any number of clocks long; only their rising edges act.
module camac_decoder
  import idom_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        n,
  input  logic [4:0]  f,
  input  logic [3:0]  a,
  input  logic        s1,
  input  logic        s2,
  input  logic        z,
  input  logic [15:0] w,
  input  logic        fifo_full,
  input  logic        c9_ok,      // both connectors' C9 above +12 V
  output logic        x,
  output logic        q,
  output rsel_e       rsel,
  output logic        fifo_wr,
  output cmd_t        fifo_wdata,
  output logic        clear_all
);

  logic s1_q, s2_q, s1_rise, s2_rise;
  logic a01, queue, init;
  op_e  op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= 1'b0;
      s2_q <= 1'b0;
    end else begin
      s1_q <= s1;
      s2_q <= s2;
    end
  end

  assign s1_rise = s1 && !s1_q;
  assign s2_rise = s2 && !s2_q;
  assign a01     = (a[3:1] == 3'b000);

  always_comb begin
    x     = 1'b0;
    q     = 1'b0;
    rsel  = RSEL_NONE;
    queue = 1'b0;
    init  = 1'b0;
    op    = OP_WRITE;
    if (n) begin
      unique case (f)
        F_READ: if (a01) begin
          x = 1'b1; q = c9_ok;
          rsel = a[0] ? RSEL_GROUP1 : RSEL_GROUP0;
        end
        F_STATUS: if (a == 4'd0) begin
          x = 1'b1; q = 1'b1; rsel = RSEL_STATUS;
        end
        F_INIT: if (a == 4'd0) begin
          x = 1'b1; q = 1'b1; init = 1'b1;
        end
        F_CLR_GROUP: if (a01) begin
          x = 1'b1; q = !fifo_full; queue = 1'b1; op = OP_CLR_GROUP;
        end
        F_WRITE, F_PRESET, F_SET, F_PULSE_ON, F_CLEAR, F_PULSE_OFF: if (a01) begin
          x = 1'b1; q = !fifo_full && c9_ok; queue = 1'b1;
          unique case (f)
            F_WRITE:     op = OP_WRITE;
            F_PRESET:    op = a[0] ? OP_XFER : OP_WIDTH;
            F_SET:       op = OP_SET;
            F_PULSE_ON:  op = OP_PULSE_ON;
            F_CLEAR:     op = OP_CLEAR;
            default:     op = OP_PULSE_OFF;
          endcase
        end
        F_TEST: if (a == 4'd0) begin
          x = 1'b1; q = !fifo_full && c9_ok;
        end
        default: ;
      endcase
    end
  end

  assign fifo_wr         = queue && q && s1_rise;
  assign fifo_wdata.op   = op;
  assign fifo_wdata.grp  = a[0];
  assign fifo_wdata.data = w;
  assign clear_all       = (init && s1_rise) || (z && s2_rise);

endmodule
