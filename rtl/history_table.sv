// history_table: the History Table (HT) of the Data Prefetching Processor.
//
// The HT sits in the decode (ID) stage and remembers the target register
// addresses of the last DEPTH instructions that left ID. Every cycle it
// compares both source fields of the instruction now in ID (bits 25..21 and
// 20..16) with all valid entries; a match on a source raises that source's
// "reusing" signal, which travels with the instruction to the execute stage
// and tells the Data Prefetching Table (DPT) to hand the stored result to the
// ALU instead of the stale register-file value.
//
// Following the scheme: 16 entries kept as a FIFO; each entry holds a
// valid bit, a 4-bit counter and the 5-bit target address (16-bit layout:
// reserved 15..10, valid 9, counter 8..5, target 4..0); two equality
// comparators, one per source field. Own choices: the FIFO is a circular
// buffer whose oldest entry is overwritten by each push; the counter is the
// entry's age in pushes (0 = most recent instruction), so the youngest match
// is also reported as a dependency distance; an instruction that writes no
// register (or writes r0) still takes a slot, pushed with valid = 0, so the
// window always spans the last DEPTH instructions.
//
// Interface and timing: the comparison is combinational from src1/src2 to
// reuse1/reuse2 and dist1/dist2; push/push_valid/push_taddr are sampled on
// the rising clock edge. Synchronous, active-low reset clears all entries.
module history_table #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned AW    = 5,
  parameter int unsigned CNT_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction leaving ID: its target register address
  input  logic              push,
  input  logic              push_valid,
  input  logic [AW-1:0]     push_taddr,
  // source fields of the instruction in ID
  input  logic [AW-1:0]     src1,
  input  logic [AW-1:0]     src2,
  output logic              reuse1,
  output logic              reuse2,
  output logic [CNT_W-1:0]  dist1,    // age of the youngest matching entry
  output logic [CNT_W-1:0]  dist2,
  // read-out of one entry in the 16-bit entry layout
  input  logic [$clog2(DEPTH)-1:0] dbg_idx,
  output logic [15:0]       dbg_entry
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [AW-1:0]    taddr_q [DEPTH];
  logic [CNT_W-1:0] cnt_q   [DEPTH];
  logic             valid_q [DEPTH];
  logic [PW-1:0]    wptr_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr_q <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        taddr_q[i] <= '0;
        cnt_q[i]   <= '0;
        valid_q[i] <= 1'b0;
      end
    end else if (push) begin
      for (int i = 0; i < DEPTH; i++) begin
        if (PW'(i) == wptr_q) begin
          taddr_q[i] <= push_taddr;
          cnt_q[i]   <= '0;
          valid_q[i] <= push_valid;
        end else if (cnt_q[i] != CNT_MAX) begin
          cnt_q[i]   <= cnt_q[i] + 1'b1;
        end
      end
      wptr_q <= (wptr_q == PW'(DEPTH - 1)) ? '0 : wptr_q + 1'b1;
    end
  end

  // Two comparator banks; the youngest (smallest age) match wins.
  always_comb begin
    reuse1 = 1'b0;
    reuse2 = 1'b0;
    dist1  = CNT_MAX;
    dist2  = CNT_MAX;
    for (int i = 0; i < DEPTH; i++) begin
      if (valid_q[i] && taddr_q[i] == src1) begin
        if (!reuse1 || cnt_q[i] < dist1) dist1 = cnt_q[i];
        reuse1 = 1'b1;
      end
      if (valid_q[i] && taddr_q[i] == src2) begin
        if (!reuse2 || cnt_q[i] < dist2) dist2 = cnt_q[i];
        reuse2 = 1'b1;
      end
    end
  end

  assign dbg_entry = {6'b0, valid_q[dbg_idx], 4'(cnt_q[dbg_idx]), 5'(taddr_q[dbg_idx])};

endmodule
