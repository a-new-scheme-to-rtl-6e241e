// tb_decoder: self-checking test of the instruction decoder. Every supported
// instruction is decoded with random register fields and immediates and its
// control word, register fields and immediate are compared with a table of
// expected values written out here; unsupported opcodes and function codes
// must decode as no-ops.
module tb_decoder;
  import dpp_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  logic [4:0] rs1, rs2, rd;
  logic [15:0] imm;
  logic [31:0] joff;
  int checks = 0, failures = 0;

  decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected: {valid, alu_op, imm, rd1, rd2, wr, rt, dptw, mr, mw, br, bne, j, halt}
  task automatic try(logic [31:0] in, ctrl_t e, string name);
    instr = in; #1;
    checks++;
    if (ctrl !== e) begin
      failures++;
      $display("FAIL %s: ctrl=%h expected %h", name, ctrl, e);
    end
    checks++;
    if (rs1 !== in[25:21] || rs2 !== in[20:16] || imm !== in[15:0] ||
        joff !== 32'($signed(in[25:0])) ||
        (e.reg_write && rd !== (e.rd_is_rt ? in[20:16] : in[15:11]))) begin
      failures++;
      $display("FAIL %s fields", name);
    end
  endtask

  function automatic ctrl_t c(bit v, alu_op_e op, bit im, bit r1, bit r2, bit w, bit rt,
                              bit dw, bit mr, bit mw, bit br, bit bne, bit j, bit h);
    ctrl_t x;
    x = '{valid: v, alu_op: op, alu_src_imm: im, rd1_en: r1, rd2_en: r2, reg_write: w,
          rd_is_rt: rt, dpt_write: dw, mem_read: mr, mem_write: mw, branch: br,
          branch_ne: bne, jump: j, halt: h};
    return x;
  endfunction

  initial begin
    for (int n = 0; n < 50; n++) begin
      logic [25:0] f;
      f = 26'($urandom);
      try({6'h00, f[25:6], 6'h20}, c(1, ALU_ADD, 0,1,1,1,0,1,0,0,0,0,0,0), "ADD");
      try({6'h00, f[25:6], 6'h22}, c(1, ALU_SUB, 0,1,1,1,0,1,0,0,0,0,0,0), "SUB");
      try({6'h00, f[25:6], 6'h24}, c(1, ALU_AND, 0,1,1,1,0,1,0,0,0,0,0,0), "AND");
      try({6'h00, f[25:6], 6'h25}, c(1, ALU_OR,  0,1,1,1,0,1,0,0,0,0,0,0), "OR");
      try({6'h00, f[25:6], 6'h26}, c(1, ALU_XOR, 0,1,1,1,0,1,0,0,0,0,0,0), "XOR");
      try({6'h00, f[25:6], 6'h04}, c(1, ALU_SLL, 0,1,1,1,0,1,0,0,0,0,0,0), "SLL");
      try({6'h00, f[25:6], 6'h06}, c(1, ALU_SRL, 0,1,1,1,0,1,0,0,0,0,0,0), "SRL");
      try({6'h00, f[25:6], 6'h07}, c(1, ALU_SRA, 0,1,1,1,0,1,0,0,0,0,0,0), "SRA");
      try({6'h00, f[25:6], 6'h2A}, c(1, ALU_SLT, 0,1,1,1,0,1,0,0,0,0,0,0), "SLT");
      try({6'h00, f[25:6], 6'h3F}, '0, "bad funct");
      try({6'h08, f}, c(1, ALU_ADD, 1,1,0,1,1,1,0,0,0,0,0,0), "ADDI");
      try({6'h0A, f}, c(1, ALU_SUB, 1,1,0,1,1,1,0,0,0,0,0,0), "SUBI");
      try({6'h0C, f}, c(1, ALU_AND, 1,1,0,1,1,1,0,0,0,0,0,0), "ANDI");
      try({6'h0D, f}, c(1, ALU_OR,  1,1,0,1,1,1,0,0,0,0,0,0), "ORI");
      try({6'h0E, f}, c(1, ALU_XOR, 1,1,0,1,1,1,0,0,0,0,0,0), "XORI");
      try({6'h1A, f}, c(1, ALU_SLT, 1,1,0,1,1,1,0,0,0,0,0,0), "SLTI");
      try({6'h23, f}, c(1, ALU_ADD, 1,1,0,1,1,1,1,0,0,0,0,0), "LW");
      try({6'h2B, f}, c(1, ALU_ADD, 1,1,1,0,0,0,0,1,0,0,0,0), "SW");
      try({6'h04, f}, c(1, ALU_ADD, 0,1,0,0,0,0,0,0,1,0,0,0), "BEQZ");
      try({6'h05, f}, c(1, ALU_ADD, 0,1,0,0,0,0,0,0,1,1,0,0), "BNEZ");
      try({6'h02, f}, c(1, ALU_ADD, 0,0,0,0,0,0,0,0,0,0,1,0), "J");
      try({6'h11, f}, c(1, ALU_ADD, 0,0,0,0,0,0,0,0,0,0,0,1), "TRAP");
      try({6'h3F, f}, '0, "bad opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
