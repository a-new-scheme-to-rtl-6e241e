// tb_instr_mem: self-checking test of the instruction memory. Loads random
// words through the load port, then reads each back through the byte-address
// fetch port (including addresses with nonzero low bits) and compares.
module tb_instr_mem;
  logic clk = 0;
  logic [31:0] addr, rdata, load_data;
  logic load_en;
  logic [5:0] load_addr;
  logic [31:0] shadow [64];
  int checks = 0, failures = 0;

  instr_mem #(.DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_en = 0; addr = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 6'(i); load_data = $urandom; shadow[i] = load_data;
    end
    @(negedge clk); load_en = 0;
    for (int n = 0; n < 500; n++) begin
      int w;
      w = int'($urandom_range(0, 63));
      addr = 32'(4 * w + int'($urandom_range(0, 3)));
      #1;
      checks++;
      if (rdata !== shadow[w]) begin failures++; $display("FAIL word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
