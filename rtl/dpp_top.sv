// dpp_top: the Data Prefetching Processor (DPP), a five-stage DLX-style
// pipeline (IF, ID, EXE, MEM, WB) in which data hazards are removed by a
// History Table (HT) and a Data Prefetching Table (DPT) rather than by a
// forwarding network or stalls.
//
// How a dependency is handled:
//   ID   The HT compares the two source fields of the decoded instruction with
//        the targets of the last 16 instructions. A match on a source that the
//        instruction actually reads sets that source's "reusing" flag, which
//        moves with the instruction into EXE. The instruction's own target is
//        then pushed into the HT.
//   EXE  For each flagged source the DPT is searched by register address. On a
//        hit the DPT value replaces the register-file value read in ID; the
//        entry's busy bit is set and its counter restarted.
//   MEM  Every result-producing instruction writes its result into the DPT:
//        the ALU result held in the EXE/MEM data register, or for a load the
//        word read from data memory. The write is visible to the lookup of
//        the instruction in EXE in the same cycle (write-through), so even
//        back-to-back dependent instructions, and a load followed by its
//        user, run without a stall.
//   WB   The result is written into the register file.
// A result that has not been reused for 64 clocks expires from the DPT; by
// then it is long in the register file, so a miss simply uses the
// register-file value.
//
// Branches (BEQZ/BNEZ) and jumps (J) resolve in EXE using the ALU's Zero
// flag; the two younger instructions in IF and ID are discarded (predict not
// taken). TRAP stops fetching when it is decoded and raises halted when it
// retires.
//
// Following the scheme: the five stages; the HT in ID and the DPT in
// EXE; the reusing signal from HT to DPT and DPT value to the ALU input; the
// DPT_write control from the decoder; the two DPT data sources (data register
// and data memory); Zero from the ALU to the next-PC logic. This design's own
// choices: the 16-bit datapath (the width of the DPT target value), the DLX
// instruction subset, writing the DPT in MEM with write-through to EXE,
// branch resolution in EXE with a two-instruction flush, flat instruction
// and data memories in place of caches, the program-load and debug ports.
//
// Interface: hold rst_n low (synchronous, active low) while loading the
// program through imem_load_*; release it and the processor fetches from
// address 0. halted rises when TRAP retires. dbg_* ports read registers and
// data memory; the ev_* outputs pulse for one cycle on each event.
module dpp_top
  import dpp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_DEPTH = 1024,
  parameter int unsigned HT_DEPTH   = 16,
  parameter int unsigned DPT_ENTRIES = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // program load
  input  logic                          imem_load_en,
  input  logic [$clog2(IMEM_DEPTH)-1:0] imem_load_addr,
  input  logic [ILEN-1:0]               imem_load_data,
  // status and debug
  output logic                          halted,
  output logic                          retire,        // an instruction completed WB
  input  logic [RAW-1:0]                dbg_reg_addr,
  output logic [XLEN-1:0]               dbg_reg_data,
  input  logic [$clog2(DMEM_DEPTH)-1:0] dbg_mem_addr,
  output logic [XLEN-1:0]               dbg_mem_data,
  // events
  output logic [1:0]                    ev_reuse,      // reusing signal per source, in EXE
  output logic [1:0]                    ev_dpt_hit,    // DPT supplied the operand
  output logic [1:0][3:0]               ev_reuse_dist, // producer age per reused source (0 = previous instruction)
  output logic                          ev_dpt_write,
  output logic                          ev_dpt_load,   // DPT written from data memory
  output logic                          ev_dpt_expire,
  output logic                          ev_dpt_realloc,
  output logic                          ev_dpt_update,
  output logic                          ev_dpt_evict,
  output logic                          ev_dpt_rereuse, // reuse of an entry already marked busy
  output logic                          ev_flush
);

  // ------------------------------------------------------------------ types
  typedef struct packed {
    logic            valid;
    logic [ILEN-1:0] instr;
    logic [PCW-1:0]  pc4;
  } if_id_t;

  typedef struct packed {
    logic            valid;
    ctrl_t           ctrl;
    logic [RAW-1:0]  rs1, rs2, rd;
    logic [XLEN-1:0] a, b;       // register-file values read in ID
    logic [XLEN-1:0] imm;
    logic [PCW-1:0]  joff;
    logic [PCW-1:0]  pc4;
    logic [1:0]      reuse;      // HT reusing flags (source 1, source 2)
    logic [1:0][3:0] pdist;     // HT age of the producing instruction
  } id_ex_t;

  typedef struct packed {
    logic            valid;
    ctrl_t           ctrl;
    logic [RAW-1:0]  rd;
    logic [XLEN-1:0] result;     // the "data register" feeding the DPT
    logic [XLEN-1:0] store_data;
  } ex_mem_t;

  typedef struct packed {
    logic            valid;
    logic            reg_write;
    logic            halt;
    logic [RAW-1:0]  rd;
    logic [XLEN-1:0] result;
  } mem_wb_t;

  if_id_t  if_id_q;
  id_ex_t  id_ex_q;
  ex_mem_t ex_mem_q;
  mem_wb_t mem_wb_q;
  logic    fetch_stop_q;
  logic    halted_q;

  // ------------------------------------------------------------------ IF
  logic [PCW-1:0]  pc, pc4, br_target;
  logic [ILEN-1:0] if_instr;
  logic            redirect;
  logic [PCW-1:0]  br_base, br_off;
  logic            running;

  assign running = !fetch_stop_q && !halted_q;

  pc_unit u_pc (
    .clk, .rst_n,
    .advance  (running),
    .redirect (redirect),
    .base     (br_base),
    .offset   (br_off),
    .pc       (pc),
    .pc_plus4 (pc4),
    .target   (br_target)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk,
    .addr      (pc),
    .rdata     (if_instr),
    .load_en   (imem_load_en),
    .load_addr (imem_load_addr),
    .load_data (imem_load_data)
  );

  // ------------------------------------------------------------------ ID
  ctrl_t           id_ctrl;
  logic [RAW-1:0]  id_rs1, id_rs2, id_rd;
  logic [XLEN-1:0] id_imm, id_a, id_b;
  logic [PCW-1:0]  id_joff;
  logic            id_live;
  logic            ht_reuse1, ht_reuse2;
  logic [3:0]      ht_dist1, ht_dist2;
  logic [15:0]     ht_dbg;

  decoder u_dec (
    .instr (if_id_q.instr),
    .ctrl  (id_ctrl),
    .rs1   (id_rs1),
    .rs2   (id_rs2),
    .rd    (id_rd),
    .imm   (id_imm),
    .joff  (id_joff)
  );

  logic            wb_we;
  regfile u_rf (
    .clk, .rst_n,
    .ra1 (id_rs1), .ra2 (id_rs2), .ra3 (dbg_reg_addr),
    .rd1 (id_a),   .rd2 (id_b),   .rd3 (dbg_reg_data),
    .we  (wb_we),
    .wa  (mem_wb_q.rd),
    .wd  (mem_wb_q.result)
  );

  // the instruction in ID is real and not being discarded by a redirect
  assign id_live = if_id_q.valid && id_ctrl.valid && !redirect;

  history_table #(.DEPTH(HT_DEPTH), .AW(RAW), .CNT_W(4)) u_ht (
    .clk, .rst_n,
    .push       (1'b1),
    .push_valid (id_live && id_ctrl.reg_write && id_rd != '0),
    .push_taddr (id_rd),
    .src1       (id_rs1),
    .src2       (id_rs2),
    .reuse1     (ht_reuse1),
    .reuse2     (ht_reuse2),
    .dist1      (ht_dist1),
    .dist2      (ht_dist2),
    .dbg_idx    ('0),
    .dbg_entry  (ht_dbg)
  );

  // ------------------------------------------------------------------ EXE
  logic [1:0]            dpt_hit;
  logic [1:0][XLEN-1:0]  dpt_val;
  logic [1:0][RAW-1:0]   dpt_raddr;
  logic [1:0]            dpt_reuse;
  logic [XLEN-1:0]       ex_a, ex_b, alu_b, alu_y;
  logic                  alu_zero;
  logic                  ex_taken;

  assign dpt_raddr = {id_ex_q.rs2, id_ex_q.rs1};
  assign dpt_reuse = id_ex_q.valid ? id_ex_q.reuse : 2'b00;

  // operand selection: DPT value on a reuse hit, else the register file
  assign ex_a  = dpt_hit[0] ? dpt_val[0] : id_ex_q.a;
  assign ex_b  = dpt_hit[1] ? dpt_val[1] : id_ex_q.b;
  assign alu_b = id_ex_q.ctrl.alu_src_imm ? id_ex_q.imm : ex_b;

  alu #(.W(XLEN)) u_alu (
    .op   (id_ex_q.ctrl.alu_op),
    .a    (ex_a),
    .b    (alu_b),
    .y    (alu_y),
    .zero (alu_zero)
  );

  assign ex_taken = id_ex_q.valid &&
                    (id_ex_q.ctrl.jump ||
                     (id_ex_q.ctrl.branch && (alu_zero != id_ex_q.ctrl.branch_ne)));
  assign redirect = ex_taken;
  assign br_base  = id_ex_q.pc4;
  assign br_off   = id_ex_q.ctrl.jump ? id_ex_q.joff : PCW'($signed(id_ex_q.imm));

  // ------------------------------------------------------------------ MEM
  logic [XLEN-1:0] mem_rdata;
  logic            dpt_we;
  logic            dpt_expire, dpt_realloc, dpt_evict, dpt_update;
  logic [5+6+RAW+XLEN-1:0] dpt_dbg;

  data_mem #(.W(XLEN), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk,
    .mem_read  (ex_mem_q.valid && ex_mem_q.ctrl.mem_read),
    .mem_write (ex_mem_q.valid && ex_mem_q.ctrl.mem_write),
    .addr      (ex_mem_q.result),
    .wdata     (ex_mem_q.store_data),
    .rdata     (mem_rdata),
    .dbg_addr  (dbg_mem_addr),
    .dbg_rdata (dbg_mem_data)
  );

  assign dpt_we = ex_mem_q.valid && ex_mem_q.ctrl.dpt_write && ex_mem_q.rd != '0;

  dpt #(.ENTRIES(DPT_ENTRIES), .AW(RAW), .VAL_W(XLEN), .CNT_W(6)) u_dpt (
    .clk, .rst_n,
    .wr_en       (dpt_we),
    .wr_from_mem (ex_mem_q.ctrl.mem_read),
    .wr_addr     (ex_mem_q.rd),
    .wr_reg_data (ex_mem_q.result),
    .wr_mem_data (mem_rdata),
    .reuse       (dpt_reuse),
    .raddr       (dpt_raddr),
    .hit         (dpt_hit),
    .rdata       (dpt_val),
    .ev_expire   (dpt_expire),
    .ev_realloc  (dpt_realloc),
    .ev_evict    (dpt_evict),
    .ev_update   (dpt_update),
    .ev_rereuse  (ev_dpt_rereuse),
    .dbg_idx     ('0),
    .dbg_entry   (dpt_dbg)
  );

  // ------------------------------------------------------------------ WB
  assign wb_we = mem_wb_q.valid && mem_wb_q.reg_write;

  // ------------------------------------------------------------------ pipeline registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      if_id_q      <= '0;
      id_ex_q      <= '0;
      ex_mem_q     <= '0;
      mem_wb_q     <= '0;
      fetch_stop_q <= 1'b0;
      halted_q     <= 1'b0;
    end else begin
      // IF -> ID
      if_id_q.valid <= running && !redirect && !(id_live && id_ctrl.halt);
      if_id_q.instr <= if_instr;
      if_id_q.pc4   <= pc4;

      // ID -> EXE
      id_ex_q.valid <= id_live;
      id_ex_q.ctrl  <= id_ctrl;
      id_ex_q.rs1   <= id_rs1;
      id_ex_q.rs2   <= id_rs2;
      id_ex_q.rd    <= id_rd;
      id_ex_q.a     <= id_a;
      id_ex_q.b     <= id_b;
      id_ex_q.imm   <= id_imm;
      id_ex_q.joff  <= id_joff;
      id_ex_q.pc4   <= if_id_q.pc4;
      id_ex_q.reuse <= {ht_reuse2 && id_ctrl.rd2_en, ht_reuse1 && id_ctrl.rd1_en};
      id_ex_q.pdist  <= {ht_dist2, ht_dist1};

      if (id_live && id_ctrl.halt) fetch_stop_q <= 1'b1;

      // EXE -> MEM
      ex_mem_q.valid      <= id_ex_q.valid;
      ex_mem_q.ctrl       <= id_ex_q.ctrl;
      ex_mem_q.rd         <= id_ex_q.rd;
      ex_mem_q.result     <= alu_y;
      ex_mem_q.store_data <= ex_b;

      // MEM -> WB
      mem_wb_q.valid     <= ex_mem_q.valid;
      mem_wb_q.reg_write <= ex_mem_q.ctrl.reg_write && ex_mem_q.rd != '0;
      mem_wb_q.halt      <= ex_mem_q.ctrl.halt;
      mem_wb_q.rd        <= ex_mem_q.rd;
      mem_wb_q.result    <= ex_mem_q.ctrl.mem_read ? mem_rdata : ex_mem_q.result;

      if (mem_wb_q.valid && mem_wb_q.halt) halted_q <= 1'b1;
    end
  end

  assign halted = halted_q;
  assign retire = mem_wb_q.valid;

  assign ev_reuse       = dpt_reuse;
  assign ev_dpt_hit     = dpt_hit;
  assign ev_dpt_write   = dpt_we;
  assign ev_dpt_load    = dpt_we && ex_mem_q.ctrl.mem_read;
  assign ev_dpt_expire  = dpt_expire;
  assign ev_dpt_realloc = dpt_realloc;
  assign ev_dpt_update  = dpt_update;
  assign ev_dpt_evict   = dpt_evict;
  assign ev_reuse_dist  = id_ex_q.pdist;
  assign ev_flush       = redirect;

  // A reused source must always be found in the DPT: the producer is at most
  // HT_DEPTH instructions old, well inside the 64-clock lifetime of an entry.
  a_reuse_hits: assert property (@(posedge clk) disable iff (!rst_n)
                                 (dpt_reuse == dpt_hit));

endmodule
