// tb_dpp_top: end-to-end test of the Data Prefetching Processor at its
// default sizes.
//
// Each run loads a generated program, lets the processor execute it until
// TRAP retires, and compares every register and the first 64 data-memory
// words with an instruction-by-instruction reference model written here. The
// programs use few registers so most instructions depend on one of the
// previous three, mix ALU, load/store and forward branches and jumps, and
// contain a long stretch that leaves some results untouched for more than
// 64 clocks so DPT entries expire and are reused for later results.
// Timing check: with the DPT supplying every in-flight operand the pipeline
// never stalls, so the run must take exactly (instructions executed) + 4 +
// 2 * (taken branches and jumps) clocks.
// Mechanism coverage: reuse on each source, DPT hits at producer distances 0,
// 1 and 2 (forwarding through the DPT), DPT writes from data memory, entry
// update, expiry and reallocation, reuse of an entry already marked busy,
// and pipeline flushes must all occur.
module tb_dpp_top;
  import dpp_pkg::*;

  localparam int NRUNS   = 12;
  localparam int MAXPROG = 512;
  localparam int MEMCHK  = 64;

  logic clk = 1'b0;
  logic rst_n;
  logic imem_load_en;
  logic [9:0] imem_load_addr;
  logic [31:0] imem_load_data;
  logic halted, retire;
  logic [4:0]  dbg_reg_addr;
  logic [15:0] dbg_reg_data;
  logic [9:0]  dbg_mem_addr;
  logic [15:0] dbg_mem_data;
  logic [1:0]  ev_reuse, ev_dpt_hit;
  logic [1:0][3:0] ev_reuse_dist;
  logic ev_dpt_write, ev_dpt_load, ev_dpt_expire, ev_dpt_realloc, ev_dpt_update, ev_dpt_evict, ev_dpt_rereuse, ev_flush;

  dpp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_reuse1 = 0, n_reuse2 = 0, n_hit_d0 = 0, n_hit_d1 = 0, n_hit_d2 = 0;
  int n_load = 0, n_expire = 0, n_realloc = 0, n_update = 0, n_flush = 0, n_retire = 0, n_rereuse = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_reuse[0]) n_reuse1++;
    if (ev_reuse[1]) n_reuse2++;
    for (int p = 0; p < 2; p++) if (ev_dpt_hit[p]) begin
      if (ev_reuse_dist[p] == 0) n_hit_d0++;
      if (ev_reuse_dist[p] == 1) n_hit_d1++;
      if (ev_reuse_dist[p] == 2) n_hit_d2++;
    end
    if (ev_dpt_load)    n_load++;
    if (ev_dpt_expire)  n_expire++;
    if (ev_dpt_realloc) n_realloc++;
    if (ev_dpt_update)  n_update++;
    if (ev_dpt_rereuse) n_rereuse++;
    if (ev_flush)       n_flush++;
    if (retire)         n_retire++;
  end

  // ---------------------------------------------------------------- encoders
  function automatic logic [31:0] r_op(funct_e f, int rd, int rs1, int rs2);
    return {OP_RTYPE, 5'(rs1), 5'(rs2), 5'(rd), 5'd0, f};
  endfunction
  function automatic logic [31:0] i_op(opcode_e op, int rt, int rs1, int imm);
    return {op, 5'(rs1), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] j_op(int off);
    return {OP_J, 26'(off)};
  endfunction

  // ---------------------------------------------------------------- program
  logic [31:0] prog [MAXPROG];
  int          plen;

  function automatic int rreg();
    return 1 + int'($urandom_range(0, 5));   // r1..r6: dense dependencies
  endfunction

  function automatic logic [31:0] rand_instr(int idx, int last);
    int k = int'($urandom_range(0, 99));
    funct_e fns [9] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLL, FN_SRL, FN_SRA, FN_SLT};
    opcode_e ios [6] = '{OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_SLTI};
    if (k < 45) return r_op(fns[$urandom_range(0, 8)], rreg(), rreg(), rreg());
    if (k < 65) return i_op(ios[$urandom_range(0, 5)], rreg(), rreg(), int'($urandom_range(0, 65535)));
    if (k < 77) return i_op(OP_LW, rreg(), 0, int'($urandom_range(0, MEMCHK - 1)));
    if (k < 87) return i_op(OP_SW, rreg(), 0, int'($urandom_range(0, MEMCHK - 1)));
    begin
      int skip = int'($urandom_range(0, 3));
      if (idx + 1 + skip >= last) return r_op(FN_ADD, rreg(), rreg(), rreg());
      if (k < 91) return j_op(4 * skip);
      if (k < 96) return i_op(OP_BEQZ, 0, rreg(), 4 * skip);
      return i_op(OP_BNEZ, 0, rreg(), 4 * skip);
    end
  endfunction

  task automatic make_program(int n_body);
    int i = 0;
    // registers r20..r25 get a value once and are then left alone
    for (int r = 20; r < 26; r++) prog[i++] = i_op(OP_ADDI, r, 0, r * 3);
    for (int b = 0; b < n_body; b++) begin
      prog[i] = rand_instr(i, n_body + 6);
      i++;
    end
    // stretch on r1..r6 only, long enough for the r20..r25 entries to expire
    for (int b = 0; b < 80; b++) prog[i++] = r_op(FN_ADD, rreg(), rreg(), rreg());
    // new targets take the expired entries; old values come from the registers
    for (int r = 26; r < 30; r++) prog[i++] = r_op(FN_ADD, r, r - 6, r - 5);
    prog[i++] = {OP_TRAP, 26'd0};
    plen = i;
  endtask

  // ---------------------------------------------------------------- reference model
  logic [15:0] m_reg [32];
  logic [15:0] m_mem [MEMCHK];
  int          m_exec, m_taken;

  task automatic ref_run();
    int pc = 0;
    m_exec = 0; m_taken = 0;
    for (int r = 0; r < 32; r++) m_reg[r] = '0;
    forever begin
      logic [31:0] in = prog[pc / 4];
      logic [5:0]  op = in[31:26];
      int rs1 = int'(in[25:21]), rt = int'(in[20:16]), rd = int'(in[15:11]);
      logic [15:0] a = m_reg[rs1], b = m_reg[rt], imm = in[15:0], y;
      int npc = pc + 4;
      m_exec++;
      if (op == OP_TRAP) break;
      case (op)
        OP_RTYPE: begin
          case (in[5:0])
            FN_ADD: y = a + b;
            FN_SUB: y = a - b;
            FN_AND: y = a & b;
            FN_OR:  y = a | b;
            FN_XOR: y = a ^ b;
            FN_SLL: y = a << b[3:0];
            FN_SRL: y = a >> b[3:0];
            FN_SRA: y = 16'($signed(a) >>> b[3:0]);
            default: y = ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
          endcase
          if (rd != 0) m_reg[rd] = y;
        end
        OP_ADDI: if (rt != 0) m_reg[rt] = a + imm;
        OP_SUBI: if (rt != 0) m_reg[rt] = a - imm;
        OP_ANDI: if (rt != 0) m_reg[rt] = a & imm;
        OP_ORI:  if (rt != 0) m_reg[rt] = a | imm;
        OP_XORI: if (rt != 0) m_reg[rt] = a ^ imm;
        OP_SLTI: if (rt != 0) m_reg[rt] = ($signed(a) < $signed(imm)) ? 16'd1 : 16'd0;
        OP_LW:   if (rt != 0) m_reg[rt] = m_mem[int'(a + imm) % MEMCHK];
        OP_SW:   m_mem[int'(a + imm) % MEMCHK] = b;
        OP_BEQZ: if (a == 0) begin npc = pc + 4 + int'($signed(imm)); m_taken++; end
        OP_BNEZ: if (a != 0) begin npc = pc + 4 + int'($signed(imm)); m_taken++; end
        OP_J:    begin npc = pc + 4 + int'($signed(in[25:0])); m_taken++; end
        default: ;
      endcase
      pc = npc;
    end
  endtask

  // ---------------------------------------------------------------- run
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_once(int n_body);
    int cycles;
    make_program(n_body);
    @(negedge clk);
    rst_n = 1'b0;
    imem_load_en = 1'b1;
    for (int i = 0; i < plen; i++) begin
      @(negedge clk);
      imem_load_addr = 10'(i);
      imem_load_data = prog[i];
    end
    @(negedge clk);
    imem_load_en = 1'b0;
    // the reference model starts from whatever the data memory holds
    for (int a = 0; a < MEMCHK; a++) begin
      dbg_mem_addr = 10'(a);
      #1 m_mem[a] = dbg_mem_data;
    end
    ref_run();
    @(negedge clk);
    n_retire = 0;
    rst_n = 1'b1;
    cycles = 0;
    while (!halted && cycles < 5000) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    check(halted, "processor halted");
    check(cycles == m_exec + 4 + 2 * m_taken,
          $sformatf("cycle count %0d, expected %0d (no data stalls)", cycles, m_exec + 4 + 2 * m_taken));
    check(n_retire == m_exec, $sformatf("retired %0d, expected %0d", n_retire, m_exec));
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1 check(dbg_reg_data == m_reg[r],
               $sformatf("r%0d = %h, expected %h", r, dbg_reg_data, m_reg[r]));
    end
    for (int a = 0; a < MEMCHK; a++) begin
      dbg_mem_addr = 10'(a);
      #1 check(dbg_mem_data == m_mem[a],
               $sformatf("mem[%0d] = %h, expected %h", a, dbg_mem_data, m_mem[a]));
    end
  endtask

  initial begin
    rst_n = 1'b0;
    imem_load_en = 1'b0;
    imem_load_addr = '0;
    imem_load_data = '0;
    dbg_reg_addr = '0;
    dbg_mem_addr = '0;
    for (int run = 0; run < NRUNS; run++) run_once(40 + 25 * run);
    check(n_reuse1  > 0, "reuse on source 1 seen");
    check(n_reuse2  > 0, "reuse on source 2 seen");
    check(n_hit_d0  > 0, "DPT hit, producer one instruction ahead");
    check(n_hit_d1  > 0, "DPT hit, producer two instructions ahead");
    check(n_hit_d2  > 0, "DPT hit, producer three instructions ahead");
    check(n_load    > 0, "DPT written from data memory");
    check(n_update  > 0, "DPT entry updated in place");
    check(n_expire  > 0, "DPT entry expired");
    check(n_realloc > 0, "expired DPT entry reallocated");
    check(n_flush   > 0, "pipeline flush on branch/jump");
    check(n_rereuse > 0, "reuse of an entry already marked busy");
    $display("events: reuse1=%0d reuse2=%0d hit_d0=%0d hit_d1=%0d hit_d2=%0d load=%0d update=%0d expire=%0d realloc=%0d flush=%0d rereuse=%0d",
             n_reuse1, n_reuse2, n_hit_d0, n_hit_d1, n_hit_d2, n_load, n_update, n_expire, n_realloc, n_flush, n_rereuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
