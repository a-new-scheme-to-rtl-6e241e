// regfile: the general register file of the Data Prefetching Processor.
//
// NREGS registers of W bits; register 0 always reads as zero. Two
// combinational read ports serve the decode stage and a third serves
// debugging; one write port, used by the write-back stage, updates on the
// rising clock edge. A read of the register written in the same cycle returns
// the old value: the Data Prefetching Table, not the register file, supplies
// results still in flight.
//
// The scheme only names the register file; size, ports and reset are
// this design's choices (32 registers as in DLX, cleared by the synchronous
// active-low reset).
module regfile
  import dpp_pkg::*;
#(
  parameter int unsigned W     = XLEN,
  parameter int unsigned NR    = NREGS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [$clog2(NR)-1:0]  ra1,
  input  logic [$clog2(NR)-1:0]  ra2,
  input  logic [$clog2(NR)-1:0]  ra3,
  output logic [W-1:0]           rd1,
  output logic [W-1:0]           rd2,
  output logic [W-1:0]           rd3,
  input  logic                   we,
  input  logic [$clog2(NR)-1:0]  wa,
  input  logic [W-1:0]           wd
);
  logic [W-1:0] r_q [NR];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NR; i++) r_q[i] <= '0;
    end else if (we && wa != '0) begin
      r_q[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : r_q[ra1];
  assign rd2 = (ra2 == '0) ? '0 : r_q[ra2];
  assign rd3 = (ra3 == '0) ? '0 : r_q[ra3];

endmodule
