// cmd_fifo: command FIFO between the CAMAC decoder and the command executor.
//
// Write commands arrive at dataway speed and are executed much more slowly,
// so they are queued here. The FIFO is DEPTH words deep (16 in the module)
// and first-word-fall-through: while `present` is high the oldest word is on
// `rdata`, which is the "command ready" signal that interrupts the executor.
// The executor pulses `rd` once it has finished with that word. `full` makes
// the decoder answer Q=0 and drop the command. `clr` (module clear) empties
// the FIFO in one cycle.
//
// Timing: a write in cycle t is visible on rdata/present in cycle t+1. A
// read and a write may happen in the same cycle. Writes while full and reads
// while empty are ignored (and flagged by assertions).
// Depth follows the original module; width, fall-through output and the
// pointer-based storage are this design's choices.
module cmd_fifo #(
  parameter int unsigned WIDTH = 20,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             present
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      count;
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full    = (count == (AW+1)'(DEPTH));
  assign present = (count != '0);
  assign do_wr   = wr && !full;
  assign do_rd   = rd && present;
  assign rdata   = mem[rptr];

  function automatic logic [AW-1:0] bump(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else if (clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= bump(wptr);
      if (do_rd) rptr <= bump(rptr);
      count <= count + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wdata;
  end

  // The decoder never writes a full FIFO and the executor never reads an
  // empty one.
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n || clr) wr |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n || clr) rd |-> present);

endmodule
