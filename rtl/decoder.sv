// decoder: the instruction decoder / controller of the Data Prefetching
// Processor.
//
// It splits the 32-bit instruction into the 6-bit opcode (bits 31..26) and
// the 26-bit operand field, and turns the opcode (plus the R-type function
// code in bits 5..0) into the control word of dpp_pkg::ctrl_t: ALU operation
// and operand source, register read and write enables, the DPT_write signal,
// memory read/write, branch, jump and halt. It also extracts the register
// fields and the sign-extended immediate.
//
// Following the scheme: opcode in bits 31..26; R-type source 1 in
// 25..21, source 2 in 20..16, target in 15..11; every result-producing
// instruction, loads included, asserts DPT_write so its result is recorded
// in the DPT. Own choices: the supported instruction subset and its numeric
// encodings are the standard DLX ones (ADD SUB AND OR XOR SLL SRL SRA SLT,
// ADDI SUBI ANDI ORI XORI SLTI, LW SW, BEQZ BNEZ, J, TRAP as halt); I-type
// targets are in bits 20..16; any other encoding decodes as a no-op.
//
// Purely combinational.
module decoder
  import dpp_pkg::*;
(
  input  logic [ILEN-1:0] instr,
  output ctrl_t           ctrl,
  output logic [RAW-1:0]  rs1,
  output logic [RAW-1:0]  rs2,
  output logic [RAW-1:0]  rd,
  output logic [XLEN-1:0] imm,      // sign-extended bits 15..0
  output logic [PCW-1:0]  joff      // sign-extended jump offset, bits 25..0
);
  logic [5:0] op, fn;
  assign op  = instr[31:26];
  assign fn  = instr[5:0];
  assign rs1 = instr[25:21];
  assign rs2 = instr[20:16];
  assign imm = XLEN'($signed(instr[15:0]));
  assign joff = PCW'($signed(instr[25:0]));

  always_comb begin
    ctrl = '0;
    ctrl.alu_op = ALU_ADD;
    unique case (op)
      OP_RTYPE: begin
        ctrl.valid     = 1'b1;
        ctrl.rd1_en    = 1'b1;
        ctrl.rd2_en    = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dpt_write = 1'b1;
        unique case (fn)
          FN_ADD:  ctrl.alu_op = ALU_ADD;
          FN_SUB:  ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_SLL:  ctrl.alu_op = ALU_SLL;
          FN_SRL:  ctrl.alu_op = ALU_SRL;
          FN_SRA:  ctrl.alu_op = ALU_SRA;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          default: ctrl = '0;   // unknown function: no-op
        endcase
      end
      OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI: begin
        ctrl.valid       = 1'b1;
        ctrl.rd1_en      = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.reg_write   = 1'b1;
        ctrl.rd_is_rt    = 1'b1;
        ctrl.dpt_write   = 1'b1;
        unique case (op)
          OP_SUBI: ctrl.alu_op = ALU_SUB;
          OP_ANDI: ctrl.alu_op = ALU_AND;
          OP_ORI:  ctrl.alu_op = ALU_OR;
          OP_XORI: ctrl.alu_op = ALU_XOR;
          OP_SLTI: ctrl.alu_op = ALU_SLT;
          default: ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LW: begin
        ctrl.valid       = 1'b1;
        ctrl.rd1_en      = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.reg_write   = 1'b1;
        ctrl.rd_is_rt    = 1'b1;
        ctrl.dpt_write   = 1'b1;
        ctrl.mem_read    = 1'b1;
      end
      OP_SW: begin
        ctrl.valid       = 1'b1;
        ctrl.rd1_en      = 1'b1;
        ctrl.rd2_en      = 1'b1;
        ctrl.alu_src_imm = 1'b1;
        ctrl.mem_write   = 1'b1;
      end
      OP_BEQZ, OP_BNEZ: begin
        ctrl.valid     = 1'b1;
        ctrl.rd1_en    = 1'b1;
        ctrl.branch    = 1'b1;
        ctrl.branch_ne = (op == OP_BNEZ);
      end
      OP_J: begin
        ctrl.valid = 1'b1;
        ctrl.jump  = 1'b1;
      end
      OP_TRAP: begin
        ctrl.valid = 1'b1;
        ctrl.halt  = 1'b1;
      end
      default: ctrl = '0;
    endcase
  end

  assign rd = ctrl.rd_is_rt ? instr[20:16] : instr[15:11];

endmodule
