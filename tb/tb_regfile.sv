// tb_regfile: self-checking test of the register file. Random writes are
// mirrored in a shadow array; all three read ports are compared with it,
// register 0 must stay zero, and a read in the cycle of a write must return
// the old value.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  logic [4:0] ra1, ra2, ra3, wa;
  logic [15:0] rd1, rd2, rd3, wd;
  logic we;
  logic [15:0] shadow [32];
  int checks = 0, failures = 0;

  regfile #(.W(16), .NR(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; ra3 = 0;
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    @(posedge clk); @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ra1 = 5'(i); #1 chk(rd1, 16'h0, "after reset");
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we  = ($urandom_range(0, 3) != 0);
      wa  = 5'($urandom);
      wd  = 16'($urandom);
      ra1 = 5'($urandom); ra2 = (n % 5 == 0) ? wa : 5'($urandom); ra3 = 5'($urandom);
      #1;
      chk(rd1, shadow[ra1], "port 1");
      chk(rd2, shadow[ra2], "port 2 (old value during write)");
      chk(rd3, shadow[ra3], "port 3");
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
    end
    @(negedge clk); we = 0; ra1 = 0; #1 chk(rd1, 16'h0, "r0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
