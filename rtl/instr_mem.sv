// instr_mem: instruction memory of the Data Prefetching Processor.
//
// DEPTH words of 32 bits, read combinationally by the fetch stage with a byte
// address (the two low bits are ignored, addresses wrap at DEPTH words) and
// written one word per clock through a load port used to place a program
// before the processor runs.
//
// The scheme names the instruction memory only (its size is not
// given); the depth and the load port are this design's choices. The memory
// has no reset; whatever is fetched must have been loaded.
module instr_mem
  import dpp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [PCW-1:0]           addr,
  output logic [ILEN-1:0]          rdata,
  input  logic                     load_en,
  input  logic [$clog2(DEPTH)-1:0] load_addr,  // word address
  input  logic [ILEN-1:0]          load_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [ILEN-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (load_en) mem[load_addr] <= load_data;
  end

  assign rdata = mem[addr[AW+1:2]];

endmodule
