// alu: the execute-stage ALU of the Data Prefetching Processor.
//
// Computes one of the dpp_pkg::alu_op_e operations on two W-bit operands and
// raises zero when operand A equals zero; the pipeline uses that flag to
// resolve BEQZ/BNEZ. Shifts take their amount from the low bits of operand
// B; SLT compares as signed numbers and returns 1 or 0.
//
// The scheme names the ALU and its Zero output only; the operation set
// and the width W (the 16-bit width of the DPT target value) are this
// design's choices. Purely combinational.
module alu
  import dpp_pkg::*;
#(
  parameter int unsigned W = XLEN
) (
  input  alu_op_e        op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [W-1:0]   y,
  output logic           zero
);
  localparam int unsigned SW = $clog2(W);
  logic [SW-1:0] sh;
  assign sh = b[SW-1:0];

  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_SLL: y = a << sh;
      ALU_SRL: y = a >> sh;
      ALU_SRA: y = W'($signed(a) >>> sh);
      ALU_SLT: y = W'($signed(a) < $signed(b));
      default: y = '0;
    endcase
  end

  assign zero = (a == '0);

endmodule
