// Workload test of the owner-based update protocol: three boards at full
// size write the same few words of one shared page at the same time.
// Node 0 owns page 1; nodes 1 and 2 hold copies of it in their own page 1
// (page-mode bit set, single list entry naming the owner). Each processor
// issues a stream of stores with random gaps to random words of the
// page, every value unique, and nodes 1 and 2 read each word right back.
// Checked:
//   * a processor always reads back the value it has just written (the
//     local copy is updated at once, and older updates are ignored);
//   * the sequence of values written into each word of each copy is a
//     subsequence of the sequence written at the owner, so no node ever
//     sees a value come back after a newer one ("1, 2, 1");
//   * after all processors fence and the network drains, every copy
//     holds the owner's final value and nothing is outstanding.
// A second phase runs saturating store streams between the boards, in
// both directions, and checks that they complete: a board blocked on its
// full outgoing FIFO keeps taking acknowledgements.
// A third phase repeats the latency measurement of two workstations:
// 10000 remote loads and 10000 remote stores, with their mean cost to the
// processor.
// Forwarded stores, reflections, ignored and applied updates are counted
// from the boards' internal signals; a mechanism that never happened is a
// failure. The switch model adds random hold-offs at every destination.
module tb_tg_coherence;
  import tg_pkg::*;
  localparam int N     = 3;
  localparam int WORDS = 3;      // contended words at offsets 0..WORDS-1
  localparam int K     = 150;    // stores per processor
  localparam int PAGE  = 1;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tc_valid [N], tc_we [N], tc_ack [N];
  word_t tc_addr [N], tc_wdata [N], tc_rdata [N];
  logic lo_valid [N], lo_ready [N], li_valid [N], li_ready [N], hold [N];
  packet_t lo_pkt [N], li_pkt [N];
  logic [15:0] outstanding [N];

  int checks = 0, failures = 0;

  tg_hib n0 (.clk, .rst_n, .my_node(5'd0),
    .tc_valid(tc_valid[0]), .tc_we(tc_we[0]), .tc_addr(tc_addr[0]), .tc_wdata(tc_wdata[0]), .tc_ack(tc_ack[0]), .tc_rdata(tc_rdata[0]),
    .lo_valid(lo_valid[0]), .lo_ready(lo_ready[0]), .lo_pkt(lo_pkt[0]), .li_valid(li_valid[0]), .li_ready(li_ready[0]), .li_pkt(li_pkt[0]),
    .irq(), .special_mode(), .outstanding(outstanding[0]), .misrouted(), .key_rejects());
  tg_hib n1 (.clk, .rst_n, .my_node(5'd1),
    .tc_valid(tc_valid[1]), .tc_we(tc_we[1]), .tc_addr(tc_addr[1]), .tc_wdata(tc_wdata[1]), .tc_ack(tc_ack[1]), .tc_rdata(tc_rdata[1]),
    .lo_valid(lo_valid[1]), .lo_ready(lo_ready[1]), .lo_pkt(lo_pkt[1]), .li_valid(li_valid[1]), .li_ready(li_ready[1]), .li_pkt(li_pkt[1]),
    .irq(), .special_mode(), .outstanding(outstanding[1]), .misrouted(), .key_rejects());
  tg_hib n2 (.clk, .rst_n, .my_node(5'd2),
    .tc_valid(tc_valid[2]), .tc_we(tc_we[2]), .tc_addr(tc_addr[2]), .tc_wdata(tc_wdata[2]), .tc_ack(tc_ack[2]), .tc_rdata(tc_rdata[2]),
    .lo_valid(lo_valid[2]), .lo_ready(lo_ready[2]), .lo_pkt(lo_pkt[2]), .li_valid(li_valid[2]), .li_ready(li_ready[2]), .li_pkt(li_pkt[2]),
    .irq(), .special_mode(), .outstanding(outstanding[2]), .misrouted(), .key_rejects());

  tg_host_model h0 (.clk, .tc_valid(tc_valid[0]), .tc_we(tc_we[0]), .tc_addr(tc_addr[0]), .tc_wdata(tc_wdata[0]), .tc_ack(tc_ack[0]), .tc_rdata(tc_rdata[0]));
  tg_host_model h1 (.clk, .tc_valid(tc_valid[1]), .tc_we(tc_we[1]), .tc_addr(tc_addr[1]), .tc_wdata(tc_wdata[1]), .tc_ack(tc_ack[1]), .tc_rdata(tc_rdata[1]));
  tg_host_model h2 (.clk, .tc_valid(tc_valid[2]), .tc_we(tc_we[2]), .tc_addr(tc_addr[2]), .tc_wdata(tc_wdata[2]), .tc_ack(tc_ack[2]), .tc_rdata(tc_rdata[2]));

  tg_switch_model #(.N(N)) sw (.src_valid(lo_valid), .src_ready(lo_ready), .src_pkt(lo_pkt),
    .dst_valid(li_valid), .dst_ready(li_ready), .dst_pkt(li_pkt), .hold(hold));

  // ---------------- value sequences written into each word ----------------
  word_t seq [N][WORDS][$];
  int ev_fwd = 0, ev_refl = 0, ev_ignored = 0, ev_applied = 0, ev_ack_blocked = 0;

  function automatic int wa(int off); return PAGE * 2048 + off; endfunction

`define TG_WATCH(n, i) \
  always @(posedge clk) if (rst_n) begin \
    if (n.u_mpm.en && n.u_mpm.we && n.u_mpm.addr >= waddr_t'(wa(0)) && n.u_mpm.addr < waddr_t'(wa(WORDS))) \
      seq[i][int'(n.u_mpm.addr) - wa(0)].push_back(n.u_mpm.wdata); \
    if (n.u_ctrl.in_valid && n.u_ctrl.in_ready) begin \
      if (n.u_ctrl.in_pkt.ptype == PK_FWD) ev_fwd++; \
      if (n.u_ctrl.in_pkt.ptype == PK_UPDATE && n.u_ctrl.in_pkt.orig == n.u_ctrl.my_node) ev_refl++; \
      else if (n.u_ctrl.in_pkt.ptype == PK_UPDATE && n.u_ctrl.cc_lookup_nz) ev_ignored++; \
      else if (n.u_ctrl.in_pkt.ptype == PK_UPDATE) ev_applied++; \
      if (n.u_ctrl.out_valid && !n.u_ctrl.out_ready && n.u_ctrl.in_pkt.ptype == PK_ACK) ev_ack_blocked++; \
    end \
  end
  `TG_WATCH(n0, 0)
  `TG_WATCH(n1, 1)
  `TG_WATCH(n2, 2)

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic need(string what, int n);
    checks++; if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("INFO %s: %0d", what, n);
  endtask

  function automatic word_t ent(bit last, int nxt, int node, int page);
    mc_entry_t e; e.valid = 1; e.last = last; e.next = MCIDX_W'(nxt); e.node = node_t'(node); e.page = LPAGE_W'(page);
    return e;
  endfunction

  // is a a subsequence of b?
  function automatic bit subseq(word_t a [$], word_t b [$]);
    int j = 0;
    foreach (a[i]) begin
      while (j < b.size() && b[j] != a[i]) j++;
      if (j == b.size()) return 0;
      j++;
    end
    return 1;
  endfunction

  // random hold-offs at the switch outputs
  initial begin
    for (int i = 0; i < N; i++) hold[i] = 0;
    forever begin
      @(negedge clk);
      for (int i = 0; i < N; i++) hold[i] = ($urandom_range(0, 9) == 0);
    end
  end

  task automatic writer(int node);
    word_t d, v; int off;
    for (int k = 0; k < K; k++) begin
      off = $urandom_range(0, WORDS - 1);
      v   = {8'(node + 1), 24'(k)};
      repeat ($urandom_range(0, 12)) @(negedge clk);
      unique case (node)
        0: h0.wr(h0.sh(0, wa(off)), v);
        1: begin h1.wr(h1.sh(1, wa(off)), v); h1.rd(h1.sh(1, wa(off)), d); check("node 1 reads its own write", d == v); end
        default: begin h2.wr(h2.sh(2, wa(off)), v); h2.rd(h2.sh(2, wa(off)), d); check("node 2 reads its own write", d == v); end
      endcase
    end
    unique case (node)
      0: h0.rd(h0.rg(R_FENCE), d);
      1: h1.rd(h1.rg(R_FENCE), d);
      default: h2.rd(h2.rg(R_FENCE), d);
    endcase
  endtask

  initial begin
    word_t d [N];
    repeat (3) @(negedge clk); rst_n = 1;
    // list heads and page modes of the pages used start empty
    for (int pg = 0; pg < 4; pg++) begin
      h0.wr(h0.rg(R_MC_SEL), pg); h0.wr(h0.rg(R_MC_DAT), 0); h0.wr(h0.rg(R_PMODE), pg);
      h1.wr(h1.rg(R_MC_SEL), pg); h1.wr(h1.rg(R_MC_DAT), 0); h1.wr(h1.rg(R_PMODE), pg);
      h2.wr(h2.rg(R_MC_SEL), pg); h2.wr(h2.rg(R_MC_DAT), 0); h2.wr(h2.rg(R_PMODE), pg);
    end
    // owner list of page 1: node 1 page 1, then node 2 page 1
    h0.wr(h0.rg(R_MC_SEL), PAGE); h0.wr(h0.rg(R_MC_DAT), ent(0, 2048, 1, PAGE));
    h0.wr(h0.rg(R_MC_SEL), 2048); h0.wr(h0.rg(R_MC_DAT), ent(1, 0, 2, PAGE));
    h0.wr(h0.rg(R_PMODE), PAGE);
    // copies: page mode set, single entry names the owner's page
    h1.wr(h1.rg(R_MC_SEL), PAGE); h1.wr(h1.rg(R_MC_DAT), ent(1, 0, 0, PAGE)); h1.wr(h1.rg(R_PMODE), 32'h800 | PAGE);
    h2.wr(h2.rg(R_MC_SEL), PAGE); h2.wr(h2.rg(R_MC_DAT), ent(1, 0, 0, PAGE)); h2.wr(h2.rg(R_PMODE), 32'h800 | PAGE);
    for (int w = 0; w < WORDS; w++) h0.wr(h0.sh(0, wa(w)), 0);
    h0.rd(h0.rg(R_FENCE), d[0]);
    for (int w = 0; w < WORDS; w++) for (int i = 0; i < N; i++) seq[i][w].delete();

    fork
      writer(0);
      writer(1);
      writer(2);
    join
    repeat (2000) @(negedge clk);

    for (int w = 0; w < WORDS; w++) begin
      h0.rd(h0.sh(0, wa(w)), d[0]); h1.rd(h1.sh(1, wa(w)), d[1]); h2.rd(h2.sh(2, wa(w)), d[2]);
      check("copies converge to the owner's value", d[1] == d[0] && d[2] == d[0]);
      check("owner's final value is its last write", seq[0][w].size() > 0 && d[0] == seq[0][w][$]);
      for (int i = 1; i < N; i++)
        check($sformatf("node %0d word %0d sees a subsequence of the owner's order", i, w), subseq(seq[i][w], seq[0][w]));
      $display("INFO word %0d: %0d values at the owner, %0d / %0d at the copies", w,
               seq[0][w].size(), seq[1][w].size(), seq[2][w].size());
    end
    // second phase: saturating store streams in both directions between
    // nodes 1 and 2 and from node 0 to node 1; every board ends up blocked
    // on a full outgoing FIFO at times and must still drain
    fork
      for (int k = 0; k < 400; k++) h1.wr(h1.sh(2, 5000 + k), 32'h1000 + k);
      for (int k = 0; k < 400; k++) h2.wr(h2.sh(1, 5000 + k), 32'h2000 + k);
      for (int k = 0; k < 400; k++) h0.wr(h0.sh(1, 6000 + k), 32'h3000 + k);
    join
    h0.rd(h0.rg(R_FENCE), d[0]); h1.rd(h1.rg(R_FENCE), d[1]); h2.rd(h2.rg(R_FENCE), d[2]);
    for (int k = 0; k < 400; k += 57) begin
      h1.rd(h1.sh(1, 5000 + k), d[1]); check("stream 2 -> 1 arrived", d[1] == 32'h2000 + k);
      h2.rd(h2.sh(2, 5000 + k), d[2]); check("stream 1 -> 2 arrived", d[2] == 32'h1000 + k);
      h1.rd(h1.sh(1, 6000 + k), d[1]); check("stream 0 -> 1 arrived", d[1] == 32'h3000 + k);
    end
    need("board blocked on a full outgoing FIFO while taking acknowledgements", ev_ack_blocked);

    // third phase: the latency measurement of two workstations, 10000
    // remote loads and then 10000 remote stores from node 1 to node 2
    begin
      longint c_rd = 0, c_wr = 0; int c; word_t v; bit ok = 1;
      for (int k = 0; k < 10000; k++) begin
        h1.access(0, h1.sh(2, 5000 + k % 400), 0, v, c); c_rd += c;
        if (v != 32'h1000 + k % 400) ok = 0;
      end
      check("10000 remote loads return the right data", ok);
      for (int k = 0; k < 10000; k++) begin
        h1.access(1, h1.sh(2, 8000 + k % 1000), k, v, c); c_wr += c;
      end
      h1.rd(h1.rg(R_FENCE), v);
      h2.rd(h2.sh(2, 8000 + 999), v); check("last remote stores arrived", v == 9999);
      $display("INFO 10000 remote loads: %0d cycles each on average; 10000 remote stores: %0d.%02d cycles each",
               c_rd / 10000, c_wr / 10000, (c_wr % 10000) / 100);
      check("a remote store costs the processor far less than a remote load", c_wr * 3 < c_rd);
    end
    for (int i = 0; i < N; i++) check("nothing outstanding", outstanding[i] == 0);
    check("no host access timed out", h0.timeouts + h1.timeouts + h2.timeouts == 0);
    need("stores forwarded to the owner", ev_fwd);
    need("own writes reflected", ev_refl);
    need("older updates ignored", ev_ignored);
    need("updates applied", ev_applied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin repeat (1000000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
