// tb_rtype_stream: R-type instruction streams through the Data Prefetching
// Processor, the kind of workload the scheme is evaluated with.
//
// Ten replications, each a straight-line stream of R-type instructions whose
// sources are drawn so that a chosen share of them read a register written a
// few instructions earlier. For every replication the testbench works out on
// its own, from the program text:
//   - how many source operands read a register written by one of the
//     previous 16 instructions (each must raise the reusing signal),
//   - how many read a result that is still in flight when the reader reaches
//     EXE (producer 1 to 3 instructions ahead; each must be served by the DPT),
//   - the final register values.
// It checks those against the processor, checks that the stream runs at one
// instruction per clock, and reports the stall cycles that the same stream
// would cost a five-stage pipeline with neither forwarding nor the tables
// (2 cycles for a producer one instruction ahead, 1 for two ahead), together
// with the per-replication utilisation of HT, DPT and ALU.
module tb_rtype_stream;
  import dpp_pkg::*;

  localparam int NREP = 10;
  localparam int LEN  = 200;

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
  int c_reuse = 0, c_hit = 0, c_alu = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    c_reuse += int'(ev_reuse[0]) + int'(ev_reuse[1]);
    c_hit   += int'(ev_dpt_hit[0]) + int'(ev_dpt_hit[1]);
    c_alu   += int'(dut.id_ex_q.valid);
  end

  logic [31:0] prog [LEN + 1];
  logic [15:0] m_reg [32];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [15:0] alu_model(logic [5:0] fn, logic [15:0] a, logic [15:0] b);
    case (fn)
      FN_ADD: return a + b;
      FN_SUB: return a - b;
      FN_AND: return a & b;
      FN_OR:  return a | b;
      FN_XOR: return a ^ b;
      FN_SLL: return a << b[3:0];
      FN_SRL: return a >> b[3:0];
      FN_SRA: return 16'($signed(a) >>> b[3:0]);
      default: return ($signed(a) < $signed(b)) ? 16'd1 : 16'd0;
    endcase
  endfunction

  task automatic replication(int rep);
    int exp_reuse = 0, exp_hit = 0, base_stall = 0, cycles = 0;
    int last_wr [32];
    funct_e fns [9] = '{FN_ADD, FN_SUB, FN_AND, FN_OR, FN_XOR, FN_SLL, FN_SRL, FN_SRA, FN_SLT};
    for (int r = 0; r < 32; r++) begin m_reg[r] = '0; last_wr[r] = -1000; end
    // the first 16 instructions seed registers from an immediate
    for (int i = 0; i < LEN; i++) begin
      int rd, s1, s2, d1, d2;
      rd = 1 + int'($urandom_range(0, 30));
      if (i < 16) begin
        prog[i] = {OP_ADDI, 5'd0, 5'(rd), 16'($urandom)};
        m_reg[rd] = prog[i][15:0];
        last_wr[rd] = i;
        continue;
      end
      // a share of sources that grows with the replication number is taken
      // from the targets of the last few instructions
      s1 = ($urandom_range(0, 9) < 3 + rep / 2) ? int'(prog[i - 1 - $urandom_range(0, 2)][15:11])
                                               : int'($urandom_range(0, 31));
      s2 = ($urandom_range(0, 9) < 2 + rep / 2) ? int'(prog[i - 1 - $urandom_range(0, 5)][15:11])
                                               : int'($urandom_range(0, 31));
      prog[i] = {OP_RTYPE, 5'(s1), 5'(s2), 5'(rd), 5'd0, fns[$urandom_range(0, 8)]};
      // independent bookkeeping of dependences
      d1 = i - last_wr[s1];
      d2 = i - last_wr[s2];
      if (s1 != 0 && d1 <= 16) exp_reuse++;
      if (s2 != 0 && d2 <= 16) exp_reuse++;
      if (s1 != 0 && d1 <= 3) exp_hit++;
      if (s2 != 0 && d2 <= 3) exp_hit++;
      // without forwarding the reader waits until its nearest producer has
      // written back: 2 cycles at distance 1, 1 cycle at distance 2
      begin
        int dmin;
        dmin = 3;
        if (s1 != 0 && d1 < dmin) dmin = d1;
        if (s2 != 0 && d2 < dmin) dmin = d2;
        base_stall += 3 - dmin;
      end
      m_reg[rd] = alu_model(prog[i][5:0], m_reg[s1], m_reg[s2]);
      last_wr[rd] = i;
    end
    prog[LEN] = {OP_TRAP, 26'd0};

    @(negedge clk);
    rst_n = 1'b0;
    imem_load_en = 1'b1;
    for (int i = 0; i <= LEN; i++) begin
      @(negedge clk);
      imem_load_addr = 10'(i);
      imem_load_data = prog[i];
    end
    @(negedge clk);
    imem_load_en = 1'b0;
    c_reuse = 0; c_hit = 0; c_alu = 0;
    rst_n = 1'b1;
    while (!halted && cycles < 2000) begin
      @(posedge clk);
      cycles++;
      #1;
    end
    check(cycles == LEN + 1 + 4, $sformatf("rep %0d: %0d cycles, expected %0d", rep, cycles, LEN + 5));
    // the 16 seeding ADDIs carry no source that any earlier instruction wrote
    check(c_reuse == exp_reuse, $sformatf("rep %0d: %0d reusing signals, expected %0d", rep, c_reuse, exp_reuse));
    // a reused operand whose producer left the pipeline is also served by the DPT
    check(c_hit == c_reuse, $sformatf("rep %0d: %0d DPT hits for %0d reuses", rep, c_hit, c_reuse));
    check(c_hit >= exp_hit, $sformatf("rep %0d: %0d DPT hits, at least %0d in-flight operands", rep, c_hit, exp_hit));
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1 check(dbg_reg_data == m_reg[r], $sformatf("rep %0d: r%0d = %h, expected %h", rep, r, dbg_reg_data, m_reg[r]));
    end
    $display("rep %0d: %0d instr, %0d cycles; HT reuse %0d (%0d%% of operands), DPT hits %0d, ALU busy %0d%%; a pipeline without forwarding or tables would need up to %0d stall cycles",
             rep, LEN + 1, cycles, c_reuse, 100 * c_reuse / (2 * (LEN - 16)), c_hit, 100 * c_alu / cycles, base_stall);
  endtask

  initial begin
    rst_n = 1'b0;
    imem_load_en = 1'b0;
    imem_load_addr = '0;
    imem_load_data = '0;
    dbg_reg_addr = '0;
    dbg_mem_addr = '0;
    for (int rep = 0; rep < NREP; rep++) replication(rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
