// pc_unit: program counter and next-PC logic of the Data Prefetching
// Processor.
//
// Holds the byte address of the instruction being fetched. Each cycle in
// which advance is high it moves to PC + 4 (the "+4" adder), unless redirect
// is high, in which case it loads the target computed by the second adder as
// base + offset, where base is the PC + 4 of the branch or jump and offset its
// sign-extended displacement; the multiplexer between the two is the
// next-PC mux. pc_plus4 is exported for the pipeline.
//
// Following the scheme: program counter, +4 adder, target adder and
// multiplexer. Own choices: redirect takes priority over a stalled
// advance; synchronous active-low reset to RESET_PC.
module pc_unit
  import dpp_pkg::*;
#(
  parameter logic [PCW-1:0] RESET_PC = '0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           advance,
  input  logic           redirect,
  input  logic [PCW-1:0] base,
  input  logic [PCW-1:0] offset,
  output logic [PCW-1:0] pc,
  output logic [PCW-1:0] pc_plus4,
  output logic [PCW-1:0] target
);
  logic [PCW-1:0] pc_q;

  assign pc       = pc_q;
  assign pc_plus4 = pc_q + PCW'(4);
  assign target   = base + offset;

  always_ff @(posedge clk) begin
    if (!rst_n)        pc_q <= RESET_PC;
    else if (redirect) pc_q <= target;
    else if (advance)  pc_q <= pc_plus4;
  end

endmodule
