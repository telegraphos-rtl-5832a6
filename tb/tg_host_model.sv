// Behavioural model of a workstation processor on the HIB's host bus, for
// testbenches. wr() and rd() perform one uncached store or load with the
// req/ack protocol of tg_tc_if and report how many cycles the processor
// was held; an access not acknowledged within 20000 cycles is abandoned
// and counted in timeouts. Helpers build shared-space and register addresses.
module tg_host_model
  import tg_pkg::*;
(
  input  logic  clk,
  output logic  tc_valid,
  output logic  tc_we,
  output word_t tc_addr,
  output word_t tc_wdata,
  input  logic  tc_ack,
  input  word_t tc_rdata
);
  int timeouts = 0;
  initial begin tc_valid = 0; tc_we = 0; tc_addr = '0; tc_wdata = '0; end

  function automatic word_t sh(int node, int waddr);
    return {1'b0, 2'b0, node_t'(node), waddr_t'(waddr), 2'b0};
  endfunction
  function automatic word_t rg(reg_e r);
    return {1'b1, 23'd0, r, 2'b0};
  endfunction

  // context register (field 0 op, 1 data0, 2 data1, 3 launch) or key
  function automatic word_t cx(int ctx, int field, bit key = 0);
    return {1'b1, 17'd0, key, 1'b1, 4'(ctx), 4'd0, 2'(field), 2'b0};
  endfunction
  // shadow of a shared address
  function automatic word_t sd(int node, int waddr);
    return {1'b0, 1'b1, 1'b0, node_t'(node), waddr_t'(waddr), 2'b0};
  endfunction
  // datum of a shadow store: context, address slot, key
  function automatic word_t sdat(int ctx, int slot, int key);
    return {4'(ctx), 11'd0, 1'(slot), 16'(key)};
  endfunction

  task automatic access(bit we, word_t addr, word_t wdata, output word_t rdata, output int cycles);
    @(negedge clk);
    tc_valid = 1; tc_we = we; tc_addr = addr; tc_wdata = wdata;
    cycles = 0;
    do begin @(posedge clk); #1; cycles++; end while (!tc_ack && cycles < 20000);
    if (!tc_ack) timeouts++;
    rdata = tc_rdata;
    tc_valid = 0;
  endtask

  task automatic wr(word_t addr, word_t wdata);
    word_t d; int c; access(1, addr, wdata, d, c);
  endtask
  task automatic rd(word_t addr, output word_t rdata);
    int c; access(0, addr, '0, rdata, c);
  endtask
endmodule
