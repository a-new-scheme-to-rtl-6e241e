// dpp_pkg: shared widths, instruction encodings and table-entry layouts of the
// Data Prefetching Processor (DPP).
//
// The processor is a five-stage DLX-style pipeline with two extra tables: a
// History Table (HT) in the decode stage that spots when a new instruction
// reads a register one of the recent instructions wrote, and a Data
// Prefetching Table (DPT) in the execute stage that keeps recent results and
// hands them straight to the ALU.
//
// Taken from the scheme: 32-bit instructions with the opcode in
// bits 31..26, R-type sources in 25..21 and 20..16 and target in 15..11; the
// DPT entry layout (reserved 31..29, busy 28, valid 27, counter 26..21,
// target address 20..16, target value 15..0); the HT entry layout (reserved
// 15..10, valid 9, counter 8..5, previous result 4..0). The numeric opcode
// and function values are the standard DLX ones, which the scheme does
// not list; the datapath width of 16 bits follows the 16-bit DPT target
// value field.
package dpp_pkg;

  localparam int unsigned XLEN   = 16;   // datapath width (DPT target value width)
  localparam int unsigned ILEN   = 32;   // instruction width
  localparam int unsigned RAW    = 5;    // register address width
  localparam int unsigned NREGS  = 32;
  localparam int unsigned PCW    = 32;   // program counter width (byte address)

  // Primary opcodes, instruction bits 31..26
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_J     = 6'h02,
    OP_BEQZ  = 6'h04,
    OP_BNEZ  = 6'h05,
    OP_ADDI  = 6'h08,
    OP_SUBI  = 6'h0A,
    OP_ANDI  = 6'h0C,
    OP_ORI   = 6'h0D,
    OP_XORI  = 6'h0E,
    OP_TRAP  = 6'h11,
    OP_SLTI  = 6'h1A,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  // R-type function codes, instruction bits 5..0
  typedef enum logic [5:0] {
    FN_SLL = 6'h04,
    FN_SRL = 6'h06,
    FN_SRA = 6'h07,
    FN_ADD = 6'h20,
    FN_SUB = 6'h22,
    FN_AND = 6'h24,
    FN_OR  = 6'h25,
    FN_XOR = 6'h26,
    FN_SLT = 6'h2A
  } funct_e;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_SLT
  } alu_op_e;

  // Control word produced by the decoder
  typedef struct packed {
    logic     valid;      // a recognised instruction (0: treated as a no-op)
    alu_op_e  alu_op;
    logic     alu_src_imm;// ALU operand B is the sign-extended immediate
    logic     rd1_en;     // reads source 1 (bits 25..21)
    logic     rd2_en;     // reads source 2 (bits 20..16) as data
    logic     reg_write;  // writes a result register
    logic     rd_is_rt;   // target is bits 20..16 (I-type) rather than 15..11
    logic     dpt_write;  // result is recorded in the DPT
    logic     mem_read;
    logic     mem_write;
    logic     branch;     // conditional branch on source 1 == 0 / != 0
    logic     branch_ne;  // 1: BNEZ, 0: BEQZ
    logic     jump;       // unconditional PC-relative jump
    logic     halt;       // TRAP: stop the processor when it retires
  } ctrl_t;

  // DPT entry layout (32 bits)
  typedef struct packed {
    logic [2:0]  reserved;  // 31..29
    logic        busy;      // 28
    logic        valid;     // 27
    logic [5:0]  counter;   // 26..21
    logic [4:0]  taddr;     // 20..16
    logic [15:0] tval;      // 15..0
  } dpt_entry_t;

  // HT entry layout (16 bits)
  typedef struct packed {
    logic [5:0] reserved;   // 15..10
    logic       valid;      // 9
    logic [3:0] counter;    // 8..5
    logic [4:0] taddr;      // 4..0 ("previous result": target address)
  } ht_entry_t;

endpackage
