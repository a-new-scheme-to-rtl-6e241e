// tb_history_table: self-checking test of the History Table. A queue in the
// testbench holds the last 16 pushed (valid, target) pairs, youngest first.
// Each cycle random source addresses are applied and the reuse flags and
// youngest-match distances are compared with a search of that queue; a
// dependency more than 16 instructions back must not be reported. Entries
// read through the debug port must follow the 16-bit layout (valid in bit 9,
// counter in 8..5, target in 4..0).
module tb_history_table;
  import dpp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, push_valid;
  logic [4:0] push_taddr, src1, src2;
  logic reuse1, reuse2;
  logic [3:0] dist1, dist2;
  logic [3:0] dbg_idx;
  logic [15:0] dbg_entry;
  int checks = 0, failures = 0;
  int n_match = 0, n_far = 0;

  history_table #(.DEPTH(16), .AW(5), .CNT_W(4)) dut (.*);
  always #5 clk = ~clk;

  bit         q_valid [16];
  logic [4:0] q_addr  [16];

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_src(logic [4:0] s, logic r, logic [3:0] d, string which);
    bit   er = 0;
    int   ed = 15;
    for (int k = 0; k < 16; k++) if (q_valid[k] && q_addr[k] == s) begin
      er = 1; ed = k; break;
    end
    checks++;
    if (r !== er || (er && d !== 4'(ed))) begin
      failures++;
      $display("FAIL %s src=%0d reuse=%b dist=%0d expected %b/%0d", which, s, r, d, er, ed);
    end
    if (er) n_match++;
  endtask

  initial begin
    push = 0; push_valid = 0; push_taddr = 0; src1 = 0; src2 = 0; dbg_idx = 0;
    for (int k = 0; k < 16; k++) begin q_valid[k] = 0; q_addr[k] = 0; end
    @(posedge clk); @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // a sparse target set keeps some addresses outside the window
      push       = ($urandom_range(0, 7) != 0);
      push_valid = ($urandom_range(0, 4) != 0);
      push_taddr = (n % 200 < 100) ? 5'($urandom_range(0, 7)) : 5'($urandom_range(0, 31));
      src1 = 5'($urandom_range(0, 31));
      src2 = (n % 3 == 0) ? q_addr[$urandom_range(0, 15)] : 5'($urandom_range(0, 31));
      #1;
      expect_src(src1, reuse1, dist1, "src1");
      expect_src(src2, reuse2, dist2, "src2");
      @(posedge clk);
      if (push) begin
        for (int k = 15; k > 0; k--) begin q_valid[k] = q_valid[k-1]; q_addr[k] = q_addr[k-1]; end
        q_valid[0] = push_valid; q_addr[0] = push_taddr;
      end
    end
    // a target pushed 17 instructions ago has left the window; 16 ago has not
    @(negedge clk);
    push = 1; push_valid = 1; push_taddr = 5'd31;
    @(negedge clk);
    push_taddr = 5'd30;
    @(negedge clk);
    push_taddr = 5'd1;
    for (int k = 0; k < 15; k++) @(negedge clk);
    src1 = 5'd31; src2 = 5'd30; #1;
    checks += 2;
    if (reuse1 !== 1'b0) begin failures++; $display("FAIL: 17th-oldest target still matched"); end
    if (reuse2 !== 1'b1 || dist2 !== 4'd15) begin failures++; $display("FAIL: 16th-oldest target not matched"); end
    // debug read-out layout: the most recent entry holds target 1, valid, age 0
    push = 0;
    for (int i = 0; i < 16; i++) begin
      dbg_idx = 4'(i); #1;
      if (dbg_entry[8:5] == 4'd0) begin
        checks++;
        if (dbg_entry !== {6'b0, 1'b1, 4'd0, 5'd1}) begin failures++; $display("FAIL layout %h", dbg_entry); end
      end
    end
    checks++;
    if (n_match < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
