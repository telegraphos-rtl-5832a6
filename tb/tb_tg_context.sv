// Self-checking test of tg_context: keys loaded for 16 contexts, then
// random field writes and shadow stores (half with a wrong key) against a
// reference model. Checked: an address lands in the named context and slot
// only with the right key, a wrong key is refused and counted, the launch
// view of every context matches the model, and contexts keep their
// contents while other contexts are used.
module tb_tg_context;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, key_wr_valid = 0, sh_valid = 0, sh_ok, sh_reject;
  logic [3:0] wr_ctx = 0, key_wr_ctx = 0, rd_ctx = 0; logic [1:0] wr_field = 0;
  word_t wr_data = '0, sh_data = '0, rd_data0, rd_data1; logic [15:0] key_wr_data = '0, rejects;
  node_t sh_node = '0, rd_node0, rd_node1; waddr_t sh_waddr = '0, rd_waddr0, rd_waddr1; sop_e rd_op;
  int checks = 0, failures = 0, nrej = 0, nok = 0;
  logic [15:0] key [16]; int op_m [16]; word_t d_m [16][2]; node_t n_m [16][2]; waddr_t a_m [16][2];
  always #5 clk = ~clk;

  tg_context dut (.clk, .rst_n, .wr_valid, .wr_ctx, .wr_field, .wr_data, .key_wr_valid, .key_wr_ctx, .key_wr_data,
    .sh_valid, .sh_node, .sh_waddr, .sh_data, .sh_ok, .sh_reject, .rejects,
    .rd_ctx, .rd_op, .rd_node0, .rd_waddr0, .rd_node1, .rd_waddr1, .rd_data0, .rd_data1);

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 16; c++) begin
      key[c] = 16'($urandom); op_m[c] = 0; d_m[c] = '{0, 0}; n_m[c] = '{0, 0}; a_m[c] = '{0, 0};
      @(negedge clk); key_wr_valid = 1; key_wr_ctx = 4'(c); key_wr_data = key[c];
    end
    @(negedge clk); key_wr_valid = 0;
    for (int i = 0; i < 3000; i++) begin
      int c, k; c = $urandom_range(0, 15); k = $urandom_range(0, 3);
      @(negedge clk);
      wr_valid = 0; sh_valid = 0;
      if (k == 0) begin
        int f; f = $urandom_range(0, 2);
        wr_valid = 1; wr_ctx = 4'(c); wr_field = 2'(f); wr_data = $urandom;
        if (f == 0) op_m[c] = int'(wr_data[1:0]); else d_m[c][f-1] = wr_data;
      end else begin
        bit good, slot; good = $urandom_range(0, 1); slot = $urandom_range(0, 1);
        sh_valid = 1; sh_node = node_t'($urandom); sh_waddr = waddr_t'($urandom);
        sh_data = {4'(c), 11'($urandom), slot, good ? key[c] : ~key[c]};
        #1;
        check("key check", sh_ok == good && sh_reject == !good);
        if (good) begin n_m[c][slot] = sh_node; a_m[c][slot] = sh_waddr; nok++; end else nrej++;
      end
      @(negedge clk); wr_valid = 0; sh_valid = 0;
      rd_ctx = 4'($urandom_range(0, 15)); #1;
      check("launch view", int'(rd_op) == op_m[rd_ctx] && rd_data0 == d_m[rd_ctx][0] && rd_data1 == d_m[rd_ctx][1] &&
            rd_node0 == n_m[rd_ctx][0] && rd_waddr0 == a_m[rd_ctx][0] && rd_node1 == n_m[rd_ctx][1] && rd_waddr1 == a_m[rd_ctx][1]);
    end
    check("rejects counted", int'(rejects) == nrej && nrej > 0 && nok > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
