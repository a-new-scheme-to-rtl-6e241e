// tb_dpt: self-checking test of the Data Prefetching Table.
//
// The testbench keeps, per register address, the last value written and the
// clock of the last write or reuse. An entry must be found (hit) exactly when
// it was written or reused within the last 64 clocks, and must return the
// last value written; a lookup of the address written in the same cycle must
// return the new value. After a reuse the entry must show busy = 1 and
// counter = 0 in the 32-bit entry layout (busy 28, valid 27, counter
// 26..21, address 20..16, value 15..0); a fresh write must show busy = 0, and a reuse of an entry
// already marked busy must be signalled.
// Expiry, reallocation of an expired entry and in-place update must all be
// seen. A second, 4-entry instance over 8 addresses forces writes to displace
// valid entries and checks that a hit never returns a stale value.
module tb_dpt;
  import dpp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_from_mem;
  logic [4:0] wr_addr;
  logic [15:0] wr_reg_data, wr_mem_data;
  logic [1:0] reuse, hit;
  logic [1:0][4:0] raddr;
  logic [1:0][15:0] rdata;
  logic ev_expire, ev_realloc, ev_evict, ev_update, ev_rereuse;
  logic [5:0] dbg_idx;
  logic [31:0] dbg_entry;
  int checks = 0, failures = 0;
  int n_expire = 0, n_realloc = 0, n_update = 0, n_hit = 0, n_bypass = 0, n_rereuse = 0;

  dpt #(.ENTRIES(64), .AW(5), .VAL_W(16), .CNT_W(6)) dut (.*);
  always #5 clk = ~clk;

  // small instance with eviction
  logic s_wr_en;
  logic [2:0] s_wr_addr;
  logic [15:0] s_wdata;
  logic [1:0] s_reuse, s_hit;
  logic [1:0][2:0] s_raddr;
  logic [1:0][15:0] s_rdata;
  logic s_expire, s_realloc, s_evict, s_update, s_rereuse;
  logic [1:0] s_dbg_idx;
  logic [5+6+3+16-1:0] s_dbg_entry;
  int n_evict = 0;

  dpt #(.ENTRIES(4), .AW(3), .VAL_W(16), .CNT_W(6)) u_small (
    .clk, .rst_n, .wr_en(s_wr_en), .wr_from_mem(1'b0), .wr_addr(s_wr_addr),
    .wr_reg_data(s_wdata), .wr_mem_data(16'h0), .reuse(s_reuse), .raddr(s_raddr),
    .hit(s_hit), .rdata(s_rdata), .ev_expire(s_expire), .ev_realloc(s_realloc),
    .ev_evict(s_evict), .ev_update(s_update), .ev_rereuse(s_rereuse), .dbg_idx(s_dbg_idx), .dbg_entry(s_dbg_entry));

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] m_val   [32];
  int          m_touch [32];   // clock of last write or reuse, -1000 = never
  bit          m_busy  [32];   // busy bit of the register's entry
  logic [15:0] s_val   [8];
  bit          s_have  [8];
  int          now = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", now, what); end
  endtask

  // find the entry holding address a through the debug port
  task automatic find_entry(logic [4:0] a, output bit found, output dpt_entry_t e);
    found = 0;
    e = '0;
    for (int i = 0; i < 64; i++) begin
      dbg_idx = 6'(i); #0.01;
      if (dbg_entry[27] && dbg_entry[20:16] == a) begin found = 1; e = dbg_entry; end
    end
  endtask

  initial begin
    wr_en = 0; wr_from_mem = 0; wr_addr = 0; wr_reg_data = 0; wr_mem_data = 0;
    reuse = 0; raddr = '0; dbg_idx = 0;
    s_wr_en = 0; s_wr_addr = 0; s_wdata = 0; s_reuse = 0; s_raddr = '0; s_dbg_idx = 0;
    for (int a = 0; a < 32; a++) begin m_val[a] = 0; m_touch[a] = -1000; m_busy[a] = 0; end
    for (int a = 0; a < 8; a++) begin s_val[a] = 0; s_have[a] = 0; end
    @(posedge clk); @(negedge clk); rst_n = 1;

    for (int n = 0; n < 6000; n++) begin
      logic [15:0] wd;
      bit exp_hit [2];
      bit any_reuse_hit;
      bit exp_rr;
      bit any_byp;
      @(negedge clk);
      // phases: dense traffic on few addresses, then quiet periods so entries expire
      wr_en       = ((n / 500) % 2 == 0) ? ($urandom_range(0, 1) == 1) : ($urandom_range(0, 40) == 0);
      wr_from_mem = 1'($urandom_range(0, 1));
      wr_addr     = ((n / 1000) % 2 == 0) ? 5'($urandom_range(0, 7)) : 5'($urandom_range(0, 31));
      wr_reg_data = 16'($urandom);
      wr_mem_data = 16'($urandom);
      wd          = wr_from_mem ? wr_mem_data : wr_reg_data;
      for (int p = 0; p < 2; p++) begin
        reuse[p] = ($urandom_range(0, 2) != 0);
        raddr[p] = ($urandom_range(0, 5) == 0) ? wr_addr : 5'($urandom_range(0, 7));
      end
      #1;
      any_reuse_hit = 0;
      exp_rr = 0;
      any_byp = 0;
      for (int p = 0; p < 2; p++) begin
        bit byp;
        byp = reuse[p] && wr_en && wr_addr == raddr[p];
        exp_hit[p] = reuse[p] && (byp || (now - m_touch[raddr[p]] < 64));
        if (exp_hit[p] && !byp && m_busy[raddr[p]]) exp_rr = 1;
        if (byp) any_byp = 1;
        chk(hit[p] == exp_hit[p], $sformatf("port %0d addr %0d hit=%b expected %b", p, raddr[p], hit[p], exp_hit[p]));
        if (exp_hit[p] && hit[p]) begin
          chk(rdata[p] == (byp ? wd : m_val[raddr[p]]),
              $sformatf("port %0d addr %0d data %h expected %h", p, raddr[p], rdata[p], byp ? wd : m_val[raddr[p]]));
          n_hit++;
          if (byp) n_bypass++;
        end
      end
      chk(ev_rereuse == exp_rr, $sformatf("rereuse event %b expected %b", ev_rereuse, exp_rr));
      if (ev_rereuse) n_rereuse++;
      if (ev_expire)  n_expire++;
      if (ev_realloc) n_realloc++;
      if (ev_update)  n_update++;
      // every so often, look at the entry-layout view of a reused entry after the edge
      @(posedge clk);
      now++;
      for (int p = 0; p < 2; p++) if (exp_hit[p]) begin m_touch[raddr[p]] = now; m_busy[raddr[p]] = 1; end
      if (wr_en) begin m_val[wr_addr] = wd; m_touch[wr_addr] = now; m_busy[wr_addr] = any_byp; end
      if (n % 50 == 7 && reuse[0] && exp_hit[0] && !(wr_en && wr_addr == raddr[0])) begin
        bit f; dpt_entry_t e;
        #1 find_entry(raddr[0], f, e);
        chk(f && e.busy && e.counter == 0 && e.tval == m_val[raddr[0]] && e.reserved == 0,
            $sformatf("reused entry view %h", e));
      end
      if (n % 50 == 20 && wr_en && !(reuse[0] && raddr[0] == wr_addr) && !(reuse[1] && raddr[1] == wr_addr)) begin
        bit f; dpt_entry_t e;
        #1 find_entry(wr_addr, f, e);
        chk(f && !e.busy && e.counter == 0 && e.tval == wd && e.taddr == wr_addr,
            $sformatf("written entry view %h", e));
      end
    end
    chk(n_expire > 0, "expiry seen");
    chk(n_realloc > 0, "reallocation seen");
    chk(n_update > 0, "update seen");
    chk(n_bypass > 0, "write-through seen");
    chk(n_rereuse > 0, "reuse of a busy entry seen");

    // ---- small table: eviction must never expose a stale value
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      s_wr_en = 1'($urandom_range(0, 1));
      s_wr_addr = 3'($urandom);
      s_wdata = 16'($urandom);
      s_reuse = 2'b11;
      s_raddr[0] = 3'($urandom);
      s_raddr[1] = 3'($urandom);
      #1;
      for (int p = 0; p < 2; p++) if (s_hit[p]) begin
        bit byp;
        byp = s_wr_en && s_wr_addr == s_raddr[p];
        chk(byp ? s_rdata[p] == s_wdata : (s_have[s_raddr[p]] && s_rdata[p] == s_val[s_raddr[p]]),
            "small table returned a stale value");
      end
      if (s_evict) n_evict++;
      @(posedge clk);
      if (s_wr_en) begin s_val[s_wr_addr] = s_wdata; s_have[s_wr_addr] = 1; end
    end
    chk(n_evict > 0, "eviction of a valid entry seen");
    $display("hits=%0d bypass=%0d expire=%0d realloc=%0d update=%0d evict=%0d",
             n_hit, n_bypass, n_expire, n_realloc, n_update, n_evict);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
