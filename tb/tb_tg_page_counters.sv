// Self-checking test of tg_page_counters (reduced to 64 pages): all
// counters are loaded through the write operation, then random accesses
// are applied and compared with a reference: a counter decrements unless
// zero, the alarm is raised exactly on a 1 -> 0 decrement with the right
// page and counter, a second alarm while one is pending sets irq_lost,
// and reads return the reference values. Each operation must take the
// two cycles of a read-modify-write.
module tb_tg_page_counters;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_sel_wr = 0, rsp_valid, irq, irq_sel_wr, irq_lost, irq_clear = 0;
  logic [1:0] req_op = 0; logic [GPAGE_W-1:0] req_page = '0, irq_page; logic [PCNT_W-1:0] req_wdata = '0, rsp_data;
  int model [2][64];
  int checks = 0, failures = 0, alarms = 0, lost = 0, at_zero = 0;
  logic exp_irq = 0, exp_lost = 0; int exp_page, exp_sel;
  always #5 clk = ~clk;

  tg_page_counters #(.PAGES_LOG2(6)) dut (.clk, .rst_n, .req_valid, .req_ready, .req_op, .req_sel_wr,
    .req_page, .req_wdata, .rsp_valid, .rsp_data, .irq, .irq_sel_wr, .irq_page, .irq_lost, .irq_clear);

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic op(int o, int sel, int page, int wdata);
    @(negedge clk);
    check("ready when idle", req_ready);
    req_valid = 1; req_op = 2'(o); req_sel_wr = sel[0]; req_page = GPAGE_W'(page); req_wdata = PCNT_W'(wdata);
    @(negedge clk); req_valid = 0;
    if (o != 2) begin
      check("busy in second cycle", !req_ready);
      @(negedge clk);
      if (o == 1) check("read data", rsp_valid && rsp_data == PCNT_W'(model[sel][page]));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int p = 0; p < 64; p++)
      for (int s = 0; s < 2; s++) begin
        model[s][p] = $urandom_range(0, 4); op(2, s, p, model[s][p]);
      end
    for (int i = 0; i < 3000; i++) begin
      int p, s, k;
      p = $urandom_range(0, 63); s = $urandom_range(0, 1); k = $urandom_range(0, 9);
      if (k < 6) begin
        op(0, s, p, 0);
        if (model[s][p] == 0) at_zero++;
        else begin
          model[s][p]--;
          if (model[s][p] == 0) begin
            if (exp_irq) begin exp_lost = 1; lost++; end
            else begin exp_irq = 1; exp_page = p; exp_sel = s; alarms++; end
          end
        end
      end else if (k < 8) op(1, s, p, 0);
      else begin model[s][p] = $urandom_range(0, 3); op(2, s, p, model[s][p]); end
      check("irq", irq == exp_irq && irq_lost == exp_lost);
      if (exp_irq) check("irq page", int'(irq_page) == exp_page && int'(irq_sel_wr) == exp_sel);
      if (exp_irq && $urandom_range(0, 3) == 0) begin
        @(negedge clk); irq_clear = 1; @(negedge clk); irq_clear = 0;
        exp_irq = 0; exp_lost = 0;
      end
    end
    check("alarms seen", alarms > 0); check("lost alarm seen", lost > 0); check("access at zero seen", at_zero > 0);
    $display("INFO alarms=%0d lost=%0d at_zero=%0d", alarms, lost, at_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
