// Self-checking test of tg_outstanding: random increments and decrements
// (never below zero) against a reference count, including simultaneous
// increment and decrement; zero and full flags checked at a 4-bit width.
module tb_tg_outstanding;
  logic clk = 0, rst_n = 0, inc = 0, dec = 0;
  logic [3:0] count; logic zero, full;
  int model = 0, checks = 0, failures = 0, saw_full = 0;
  always #5 clk = ~clk;

  tg_outstanding #(.W(4)) dut (.clk, .rst_n, .inc, .dec, .count, .zero, .full);

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != 4'(model) || zero != (model == 0) || full != (model == 15)) begin
        failures++; $display("FAIL count=%0d model=%0d", count, model);
      end
      if (full) saw_full++;
      inc = (model < 15) && ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      dec = (model > 0) && ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      model = model + int'(inc) - int'(dec);
    end
    checks++; if (saw_full == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
