// tb_data_mem: self-checking test of the data memory. Random stores and loads
// are mirrored in a shadow array; loads (combinational) and the debug port are
// compared with it, a load with mem_read low must return zero, and a store
// must take effect only at the clock edge.
module tb_data_mem;
  logic clk = 0;
  logic mem_read, mem_write;
  logic [15:0] addr, wdata, rdata, dbg_rdata;
  logic [5:0]  dbg_addr;
  logic [15:0] shadow [64];
  int checks = 0, failures = 0;

  data_mem #(.W(16), .DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mem_read = 0; mem_write = 0; addr = 0; wdata = 0; dbg_addr = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      mem_write = 1; addr = 16'(i); wdata = 16'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); mem_write = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      mem_read  = ($urandom_range(0, 3) != 0);
      mem_write = ($urandom_range(0, 2) == 0);
      addr      = 16'($urandom_range(0, 63));
      wdata     = 16'($urandom);
      dbg_addr  = 6'($urandom);
      #1;
      checks += 2;
      if (rdata !== (mem_read ? shadow[addr[5:0]] : 16'h0)) begin
        failures++; $display("FAIL load addr=%0d", addr);
      end
      if (dbg_rdata !== shadow[dbg_addr]) failures++;
      @(posedge clk);
      if (mem_write) shadow[addr[5:0]] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
