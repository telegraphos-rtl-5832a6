// Self-checking test of tg_counter_cache with 4 entries and 2-bit counts:
// a reference map of non-zero counters is kept here; random increments
// and decrements over a few addresses check lookups, the freeing of an
// entry at zero, the stall (inc_ready low) when full or saturated, and the
// dec_miss error flag.
module tb_tg_counter_cache;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0, inc_valid = 0, dec_valid = 0;
  waddr_t inc_addr = '0, dec_addr = '0, lookup_addr = '0;
  logic inc_ready, dec_miss, lookup_nz, full; logic [2:0] used;
  int cnt [int];
  int checks = 0, failures = 0, stalls_full = 0, stalls_sat = 0, frees = 0;
  always #5 clk = ~clk;

  tg_counter_cache #(.ENTRIES(4), .CNT_W(2)) dut (.clk, .rst_n, .inc_valid, .inc_addr, .inc_ready,
    .dec_valid, .dec_addr, .dec_miss, .lookup_addr, .lookup_nz, .used, .full);

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int a, exp_ready;
      @(negedge clk);
      inc_valid = 0; dec_valid = 0;
      // lookups of all candidate addresses
      for (int k = 0; k < 8; k++) begin
        lookup_addr = waddr_t'(k * 37); #0.1;
        check("lookup", lookup_nz == cnt.exists(k * 37));
      end
      check("used", int'(used) == cnt.num());
      check("full", full == (cnt.num() == 4));
      a = $urandom_range(0, 7) * 37;
      if ($urandom_range(0, 1) == 0) begin
        inc_addr = waddr_t'(a); inc_valid = 1; #0.1;
        exp_ready = cnt.exists(a) ? (cnt[a] < 3) : (cnt.num() < 4);
        check("inc_ready", inc_ready == exp_ready);
        if (exp_ready) begin
          if (cnt.exists(a)) cnt[a]++; else cnt[a] = 1;
        end else if (cnt.exists(a)) stalls_sat++; else stalls_full++;
      end else begin
        dec_addr = waddr_t'(a); dec_valid = 1; #0.1;
        check("dec_miss", dec_miss == !cnt.exists(a));
        if (cnt.exists(a)) begin
          cnt[a]--;
          if (cnt[a] == 0) begin cnt.delete(a); frees++; end
        end
      end
    end
    check("stall when full seen", stalls_full > 0);
    check("stall when saturated seen", stalls_sat > 0);
    check("free at zero seen", frees > 0);
    $display("stalls full=%0d saturated=%0d frees=%0d", stalls_full, stalls_sat, frees);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
