// Self-checking test of tg_mpm (reduced to 1K words): random writes and
// reads against a reference array; read data must appear exactly one
// cycle after the read is issued and hold while the port is idle.
module tb_tg_mpm;
  import tg_pkg::*;
  logic clk = 0, en = 0, we = 0; waddr_t addr = '0; word_t wdata = '0, rdata;
  word_t ref_mem [1024];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tg_mpm #(.AW(10)) dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); en = 1; we = 1; addr = waddr_t'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      addr = waddr_t'($urandom_range(0, 1023)); en = 1;
      if ($urandom_range(0, 2) == 0) begin
        we = 1; wdata = $urandom; ref_mem[addr[9:0]] = wdata;
      end else begin
        word_t exp; exp = ref_mem[addr[9:0]];
        we = 0;
        @(negedge clk); en = 0;
        checks++; if (rdata != exp) begin failures++; $display("FAIL read %h: %h != %h", addr, rdata, exp); end
        @(negedge clk);
        checks++; if (rdata != exp) begin failures++; $display("FAIL hold %h", addr); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
