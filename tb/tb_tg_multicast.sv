// Self-checking test of tg_multicast (list memory reduced to 4K entries).
// Lists are built through the host port: page 3 with three destinations
// chained through pool entries, page 7 empty, page 9 marked as a copy with
// its owner as single entry. Walks are checked for the destination
// sequence, the copy flag and the end pulse; with dst_ready always high
// one destination must come out per cycle, and random dst_ready stalls
// must not lose or repeat entries. Entries and mode bits are read back.
// Then 32 random lists are built and walked 200 times with random stalls,
// against the expected destination sequences.
module tb_tg_multicast;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic walk_start = 0, busy, is_copy, dst_valid, dst_ready = 0, walk_done;
  logic [LPAGE_W-1:0] walk_page = '0, dst_page; node_t dst_node;
  logic host_valid = 0, host_done; logic [1:0] host_op = 0; logic [MCIDX_W-1:0] host_idx = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tg_multicast #(.ENTRIES_LOG2(12)) dut (.clk, .rst_n, .walk_start, .walk_page, .busy, .is_copy,
    .dst_valid, .dst_ready, .dst_node, .dst_page, .walk_done,
    .host_valid, .host_op, .host_idx, .host_wdata, .host_done, .host_rdata);

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic host(int op, int idx, word_t wd);
    @(negedge clk); host_valid = 1; host_op = 2'(op); host_idx = MCIDX_W'(idx); host_wdata = wd;
    @(negedge clk); host_valid = 0;
    check("host done", host_done);
  endtask

  function automatic word_t ent(bit v, bit last, int nxt, int node, int page);
    mc_entry_t e; e.valid = v; e.last = last; e.next = MCIDX_W'(nxt); e.node = node_t'(node); e.page = LPAGE_W'(page);
    return e;
  endfunction

  // walk a page; returns destinations as node*4096+page, and the cycles used
  task automatic walk(int page, bit stall, output int dsts[$], output bit copy, output int cycles);
    dsts = {}; cycles = 0;
    @(negedge clk); walk_start = 1; walk_page = LPAGE_W'(page);
    @(negedge clk); walk_start = 0;
    forever begin
      dst_ready = stall ? ($urandom_range(0, 2) == 0) : 1'b1;
      #1; copy = is_copy; cycles++;
      if (dst_valid && dst_ready) dsts.push_back(int'(dst_node) * 4096 + int'(dst_page));
      if (walk_done) break;
      @(negedge clk);
      if (cycles > 100) break;
    end
    @(negedge clk); dst_ready = 0;
    check("idle after walk", !busy);
  endtask

  initial begin
    int d[$]; bit c; int cyc;
    repeat (2) @(negedge clk); rst_n = 1;
    host(1, 3, ent(1, 0, 2100, 1, 40));
    host(1, 2100, ent(1, 0, 3000, 2, 41));
    host(1, 3000, ent(1, 1, 0, 5, 42));
    host(1, 7, ent(0, 1, 0, 0, 0));
    host(1, 9, ent(1, 1, 0, 4, 77));
    host(3, 9, 32'd1); host(3, 3, 32'd0); host(3, 7, 32'd0);
    host(0, 2100, '0); check("entry read back", host_rdata == ent(1, 0, 3000, 2, 41));
    host(2, 9, '0);    check("mode read back", host_rdata == 32'd1);
    walk(3, 0, d, c, cyc);
    check("three destinations in order", d.size() == 3 && d[0] == 1*4096+40 && d[1] == 2*4096+41 && d[2] == 5*4096+42);
    check("one destination per cycle", cyc == 3);
    check("owned page", !c);
    walk(7, 0, d, c, cyc);
    check("empty list", d.size() == 0 && cyc == 1);
    walk(9, 0, d, c, cyc);
    check("copy page names owner", c && d.size() == 1 && d[0] == 4*4096+77);
    for (int i = 0; i < 20; i++) begin
      walk(3, 1, d, c, cyc);
      check("stalled walk", d.size() == 3 && d[0] == 1*4096+40 && d[1] == 2*4096+41 && d[2] == 5*4096+42);
    end
    // random lists: 32 pages, 0..6 destinations each, entries taken from a
    // pool above the heads, random copy bits; random walks with stalls
    begin
      int exp [32][$]; bit cp [32]; int pool = 2048, len, idx, nd, pg;
      for (int p = 0; p < 32; p++) begin
        len = $urandom_range(0, 6); exp[p] = {}; cp[p] = $urandom_range(0, 1);
        idx = 100 + p;
        if (len == 0) host(1, idx, ent(0, 1, 0, 0, 0));
        for (int k = 0; k < len; k++) begin
          nd = $urandom_range(0, 31); pg = $urandom_range(0, 2047);
          exp[p].push_back(nd * 4096 + pg);
          host(1, idx, ent(1, k == len - 1, pool, nd, pg));
          host(0, idx, '0); check("random entry read back", host_rdata == ent(1, k == len - 1, pool, nd, pg));
          idx = pool; pool++;
        end
        host(3, 100 + p, 32'(cp[p]));
      end
      for (int i = 0; i < 200; i++) begin
        int p = $urandom_range(0, 31);
        walk(100 + p, 1, d, c, cyc);
        check("random walk destinations", d == exp[p]);
        check("random walk copy flag", c == cp[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
