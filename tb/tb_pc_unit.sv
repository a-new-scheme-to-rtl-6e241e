// tb_pc_unit: self-checking test of the program counter. Checks the reset
// value, +4 sequencing when advancing, holding when not advancing, and that
// a redirect loads base + offset (positive and negative offsets) with
// priority over advancing.
module tb_pc_unit;
  logic clk = 0, rst_n = 0;
  logic advance, redirect;
  logic [31:0] base, offset, pc, pc_plus4, target;
  logic [31:0] exp_pc;
  int checks = 0, failures = 0;

  pc_unit #(.RESET_PC(32'h0)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    advance = 0; redirect = 0; base = 0; offset = 0;
    @(posedge clk); @(negedge clk); rst_n = 1;
    exp_pc = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      checks += 3;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc=%h exp=%h", pc, exp_pc); end
      if (pc_plus4 !== exp_pc + 4) failures++;
      advance  = ($urandom_range(0, 3) != 0);
      redirect = ($urandom_range(0, 4) == 0);
      base     = {$urandom} & 32'hFFFC;
      offset   = ($urandom_range(0, 1) != 0) ? 32'($signed(-4 * $urandom_range(1, 50)))
                                              : 32'(4 * $urandom_range(0, 50));
      #1;
      if (target !== base + offset) begin failures++; $display("FAIL target"); end
      if (redirect)     exp_pc = base + offset;
      else if (advance) exp_pc = exp_pc + 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
