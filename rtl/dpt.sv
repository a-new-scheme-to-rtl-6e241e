// dpt: the Data Prefetching Table (DPT) of the Data Prefetching Processor.
//
// The DPT is a small fully associative table of recent results, tagged by
// target register address. Every result an instruction produces is written
// into it; when the History Table has flagged that an instruction in the
// execute stage reuses a register written by a recent instruction, the DPT
// looks the register up and delivers the stored value to the ALU input, so
// the ALU never waits for the register file to be updated.
//
// Following the scheme: ENTRIES = 64 entries of 32 bits (layout:
// reserved 31..29, busy 28, valid 27, counter 26..21, target address 20..16,
// target value 15..0); the write data comes either from the pipeline's data
// register (an ALU result) or from the data memory (a load), picked by the
// write control; a reuse sets the entry's busy bit and restarts its counter;
// the counter advances every clock and an entry whose counter passes 63
// without a reuse becomes invalid and may be overwritten by a later result.
// Each entry has its own address comparators (match lines, as in a
// content-addressable memory). Own choices: a write to an address that already has a valid entry updates
// that entry (so each register has at most one valid entry, always the
// newest); otherwise the lowest-numbered invalid entry is taken, and if every
// entry is valid a round-robin pointer picks the victim. A new write clears
// busy. Two lookup ports serve the two ALU operands. A lookup of the address
// being written in the same cycle returns the write data (write-through), so
// a result written at the end of its MEM stage is visible to the very next
// instruction in EXE.
//
// Interface and timing: lookups are combinational (reuse/raddr to hit/rdata);
// writes, busy/counter updates and expiry happen on the rising clock edge.
// Synchronous, active-low reset invalidates all entries.
module dpt #(
  parameter int unsigned ENTRIES = 64,
  parameter int unsigned AW      = 5,
  parameter int unsigned VAL_W   = 16,
  parameter int unsigned CNT_W   = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write port (DPT_write) with its two data sources
  input  logic                       wr_en,
  input  logic                       wr_from_mem,   // 1: data memory, 0: data register
  input  logic [AW-1:0]              wr_addr,
  input  logic [VAL_W-1:0]           wr_reg_data,
  input  logic [VAL_W-1:0]           wr_mem_data,
  // two reuse lookup ports, one per ALU operand
  input  logic [1:0]                 reuse,
  input  logic [1:0][AW-1:0]         raddr,
  output logic [1:0]                 hit,
  output logic [1:0][VAL_W-1:0]      rdata,
  // events
  output logic                       ev_expire,     // an entry expired this cycle
  output logic                       ev_realloc,    // a write took a previously used, expired entry
  output logic                       ev_evict,      // a write displaced a still-valid entry
  output logic                       ev_update,     // a write updated the register's existing entry
  output logic                       ev_rereuse,    // a reuse hit an entry whose busy bit was already set
  // read-out of one entry in the 32-bit entry layout
  input  logic [$clog2(ENTRIES)-1:0] dbg_idx,
  output logic [5+CNT_W+AW+VAL_W-1:0] dbg_entry
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic [AW-1:0]    taddr_q [ENTRIES];
  logic [VAL_W-1:0] tval_q  [ENTRIES];
  logic [CNT_W-1:0] cnt_q   [ENTRIES];
  logic             valid_q [ENTRIES];
  logic             busy_q  [ENTRIES];
  logic             used_q  [ENTRIES];   // entry has held data since reset
  logic [IW-1:0]    rr_q;

  logic [VAL_W-1:0] wdata;
  assign wdata = wr_from_mem ? wr_mem_data : wr_reg_data;

  // ---- match lines: one comparator per entry and port, as in a CAM
  logic [ENTRIES-1:0]      wmatch, freev;
  logic [1:0][ENTRIES-1:0] rmatch;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      wmatch[i]    = valid_q[i] && (taddr_q[i] == wr_addr);
      freev[i]     = !valid_q[i];
      rmatch[0][i] = valid_q[i] && (taddr_q[i] == raddr[0]);
      rmatch[1][i] = valid_q[i] && (taddr_q[i] == raddr[1]);
    end
  end

  // ---- write-slot selection: same address, else first free, else round robin
  logic               same_found, free_found;
  logic [ENTRIES-1:0] free_first, wsel;
  assign same_found = |wmatch;
  assign free_found = |freev;
  assign free_first = freev & (~freev + 1'b1);   // lowest set bit
  always_comb begin
    if (same_found)      wsel = wmatch;
    else if (free_found) wsel = free_first;
    else                 wsel = ENTRIES'(1) << rr_q;
  end

  // ---- lookups: at most one valid entry per address, so the hit value is
  // the OR of the matching entries' values; the same-cycle write wins
  logic [1:0] lk_bypass;
  logic [1:0][VAL_W-1:0] lk_val;
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      lk_val[p] = '0;
      for (int i = 0; i < ENTRIES; i++)
        if (rmatch[p][i]) lk_val[p] = lk_val[p] | tval_q[i];
      lk_bypass[p] = reuse[p] && wr_en && (wr_addr == raddr[p]);
      hit[p]       = reuse[p] && ((|rmatch[p]) || lk_bypass[p]);
      rdata[p]     = lk_bypass[p] ? wdata : lk_val[p];
    end
  end

  // entries refreshed by a reuse this cycle (the bypassed write refreshes itself)
  logic [ENTRIES-1:0] reused;
  assign reused = ((reuse[0] && !lk_bypass[0]) ? rmatch[0] : '0) |
                  ((reuse[1] && !lk_bypass[1]) ? rmatch[1] : '0);

  // ---- state update
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        taddr_q[i] <= '0;
        tval_q[i]  <= '0;
        cnt_q[i]   <= '0;
        valid_q[i] <= 1'b0;
        busy_q[i]  <= 1'b0;
        used_q[i]  <= 1'b0;
      end
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (wr_en && wsel[i]) begin
          taddr_q[i] <= wr_addr;
          tval_q[i]  <= wdata;
          cnt_q[i]   <= '0;
          valid_q[i] <= 1'b1;
          busy_q[i]  <= |lk_bypass;   // reused in the same cycle it is written
          used_q[i]  <= 1'b1;
        end else if (reused[i]) begin
          cnt_q[i]   <= '0;
          busy_q[i]  <= 1'b1;
        end else if (valid_q[i]) begin
          if (cnt_q[i] == CNT_MAX) valid_q[i] <= 1'b0;
          else                     cnt_q[i]   <= cnt_q[i] + 1'b1;
        end
      end
      if (wr_en && !same_found && !free_found)
        rr_q <= (rr_q == IW'(ENTRIES - 1)) ? '0 : rr_q + 1'b1;
    end
  end

  logic [ENTRIES-1:0] expiring, used_v, busy_v;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      expiring[i] = valid_q[i] && (cnt_q[i] == CNT_MAX);
      used_v[i]   = used_q[i];
      busy_v[i]   = busy_q[i];
    end
  end
  assign ev_rereuse = |(reused & busy_v);
  assign ev_expire  = |(expiring & ~reused & ~(wr_en ? wsel : '0));
  assign ev_update  = wr_en && same_found;
  assign ev_realloc = wr_en && !same_found && free_found && |(free_first & used_v);
  assign ev_evict   = wr_en && !same_found && !free_found;

  assign dbg_entry = {3'b000, busy_q[dbg_idx], valid_q[dbg_idx], cnt_q[dbg_idx],
                      taddr_q[dbg_idx], tval_q[dbg_idx]};

endmodule
