// data_mem: data memory of the Data Prefetching Processor's MEM stage.
//
// DEPTH words of W bits, addressed by word (the effective address computed
// by the ALU, wrapping at DEPTH). Loads read combinationally so the loaded
// value can be written into the Data Prefetching Table in the same MEM
// cycle; stores write on the rising clock edge. A second read port serves
// debugging.
//
// The scheme names the data memory and its MEMR/MEMW controls; the
// word addressing, the depth and the absence of a cache in front of it are
// this design's choices. The memory has no reset.
module data_mem
  import dpp_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     mem_read,
  input  logic                     mem_write,
  input  logic [W-1:0]             addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata,
  input  logic [$clog2(DEPTH)-1:0] dbg_addr,
  output logic [W-1:0]             dbg_rdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (mem_write) mem[addr[AW-1:0]] <= wdata;
  end

  assign rdata     = mem_read ? mem[addr[AW-1:0]] : '0;
  assign dbg_rdata = mem[dbg_addr];

endmodule
