// read_gates: puts latch contents and module status on the CAMAC R lines.
//
// Reads are answered within the dataway cycle, straight from the output
// latches, so they show the outputs as they are at that moment, not pending
// commands. Bit layout (R1 = r[0]):
//   RSEL_GROUP0/1  R1-R16 = channels 0-15 / 16-31 (1 = on),
//                  R17 = J1 C9 below +12 V, R18 = J2 C9 below +12 V,
//                  R19 = FIFO full, R20 = FIFO holds a command
//   RSEL_STATUS    R1-R4 = the same four status bits
//   RSEL_NONE      all lines 0
// Purely combinational. The bit layout follows the module's command list.
module read_gates
  import idom_pkg::*;
(
  input  rsel_e       rsel,
  input  logic [31:0] latches,
  input  logic        c9_ok_j1,
  input  logic        c9_ok_j2,
  input  logic        fifo_full,
  input  logic        fifo_present,
  output logic [19:0] r
);

  logic [3:0] status;

  assign status = {fifo_present, fifo_full, !c9_ok_j2, !c9_ok_j1};

  always_comb begin
    unique case (rsel)
      RSEL_GROUP0: r = {status, latches[15:0]};
      RSEL_GROUP1: r = {status, latches[31:16]};
      RSEL_STATUS: r = {16'h0000, status};
      default:     r = '0;
    endcase
  end

endmodule
