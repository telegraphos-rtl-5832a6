// End-to-end test of the HIB at its full default sizes: three boards
// (nodes 0, 1, 2) joined by a behavioural switch, each driven by a
// processor model. Every operation is started by loads and stores on the
// host bus and its effect checked in the memories, through the same bus:
//   local load/store, remote store (processor released at once), remote
//   load (processor held), fence, page access counter alarm, the four
//   special operations launched in special mode (remote and local), remote
//   copy, the same operations through a context with key and shadow
//   addresses, eager-update multicast, owner-based updates with forwarding,
//   reflected writes and ignored updates (the two packet orders of the
//   two-writer example), the counter-cache stall, and link back-pressure.
// Each mechanism is counted from the boards' internal signals; one that
// never happened is a failure.
module tb_tg_hib;
  import tg_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tc_valid [N], tc_we [N], tc_ack [N];
  word_t tc_addr [N], tc_wdata [N], tc_rdata [N];
  logic lo_valid [N], lo_ready [N], li_valid [N], li_ready [N], hold [N];
  packet_t lo_pkt [N], li_pkt [N];
  logic irq [N], special_mode [N];
  logic [15:0] outstanding [N], misrouted [N];

  int checks = 0, failures = 0;

  tg_hib n0 (.clk, .rst_n, .my_node(5'd0),
    .tc_valid(tc_valid[0]), .tc_we(tc_we[0]), .tc_addr(tc_addr[0]), .tc_wdata(tc_wdata[0]), .tc_ack(tc_ack[0]), .tc_rdata(tc_rdata[0]),
    .lo_valid(lo_valid[0]), .lo_ready(lo_ready[0]), .lo_pkt(lo_pkt[0]), .li_valid(li_valid[0]), .li_ready(li_ready[0]), .li_pkt(li_pkt[0]),
    .irq(irq[0]), .special_mode(special_mode[0]), .outstanding(outstanding[0]), .misrouted(misrouted[0]));
  tg_hib n1 (.clk, .rst_n, .my_node(5'd1),
    .tc_valid(tc_valid[1]), .tc_we(tc_we[1]), .tc_addr(tc_addr[1]), .tc_wdata(tc_wdata[1]), .tc_ack(tc_ack[1]), .tc_rdata(tc_rdata[1]),
    .lo_valid(lo_valid[1]), .lo_ready(lo_ready[1]), .lo_pkt(lo_pkt[1]), .li_valid(li_valid[1]), .li_ready(li_ready[1]), .li_pkt(li_pkt[1]),
    .irq(irq[1]), .special_mode(special_mode[1]), .outstanding(outstanding[1]), .misrouted(misrouted[1]));
  tg_hib n2 (.clk, .rst_n, .my_node(5'd2),
    .tc_valid(tc_valid[2]), .tc_we(tc_we[2]), .tc_addr(tc_addr[2]), .tc_wdata(tc_wdata[2]), .tc_ack(tc_ack[2]), .tc_rdata(tc_rdata[2]),
    .lo_valid(lo_valid[2]), .lo_ready(lo_ready[2]), .lo_pkt(lo_pkt[2]), .li_valid(li_valid[2]), .li_ready(li_ready[2]), .li_pkt(li_pkt[2]),
    .irq(irq[2]), .special_mode(special_mode[2]), .outstanding(outstanding[2]), .misrouted(misrouted[2]));

  tg_host_model h0 (.clk, .tc_valid(tc_valid[0]), .tc_we(tc_we[0]), .tc_addr(tc_addr[0]), .tc_wdata(tc_wdata[0]), .tc_ack(tc_ack[0]), .tc_rdata(tc_rdata[0]));
  tg_host_model h1 (.clk, .tc_valid(tc_valid[1]), .tc_we(tc_we[1]), .tc_addr(tc_addr[1]), .tc_wdata(tc_wdata[1]), .tc_ack(tc_ack[1]), .tc_rdata(tc_rdata[1]));
  tg_host_model h2 (.clk, .tc_valid(tc_valid[2]), .tc_we(tc_we[2]), .tc_addr(tc_addr[2]), .tc_wdata(tc_wdata[2]), .tc_ack(tc_ack[2]), .tc_rdata(tc_rdata[2]));

  tg_switch_model #(.N(N)) sw (.src_valid(lo_valid), .src_ready(lo_ready), .src_pkt(lo_pkt),
    .dst_valid(li_valid), .dst_ready(li_ready), .dst_pkt(li_pkt), .hold(hold));

  // ---------------- mechanism counters ----------------
  int ev_fwd = 0, ev_refl_own = 0, ev_upd_ignored = 0, ev_upd_applied = 0, ev_cc_stall = 0;
  int ev_backpressure = 0, ev_rd_req = 0, ev_wr = 0, ev_at_req = 0, ev_cp_req = 0, ev_irq = 0;
  int ev_fence_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (n0.u_ctrl.in_valid && n0.u_ctrl.in_ready && n0.u_ctrl.in_pkt.ptype == PK_FWD) ev_fwd++;
    for (int i = 0; i < N; i++) ;
  end
`define TG_WATCH(n) \
  always @(posedge clk) if (rst_n) begin \
    if (n.u_ctrl.in_valid && n.u_ctrl.in_ready) begin \
      if (n.u_ctrl.in_pkt.ptype == PK_UPDATE && n.u_ctrl.in_pkt.orig == n.u_ctrl.my_node) ev_refl_own++; \
      else if (n.u_ctrl.in_pkt.ptype == PK_UPDATE && n.u_ctrl.cc_lookup_nz) ev_upd_ignored++; \
      else if (n.u_ctrl.in_pkt.ptype == PK_UPDATE) ev_upd_applied++; \
      if (n.u_ctrl.in_pkt.ptype == PK_RD_REQ) ev_rd_req++; \
      if (n.u_ctrl.in_pkt.ptype == PK_WR) ev_wr++; \
      if (n.u_ctrl.in_pkt.ptype == PK_AT_REQ) ev_at_req++; \
      if (n.u_ctrl.in_pkt.ptype == PK_CP_REQ) ev_cp_req++; \
    end \
    if (n.u_ctrl.held_n && !n.u_ctrl.held) ev_cc_stall++; \
    if (n.lo_valid && !n.lo_ready) ev_backpressure++; \
    if (n.u_ctrl.wait_fence && !n.u_ctrl.os_zero) ev_fence_wait++; \
    if (n.irq && !$past(n.irq)) ev_irq++; \
  end
  `TG_WATCH(n0)
  `TG_WATCH(n1)
  `TG_WATCH(n2)

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask
  task automatic expect_word(string what, word_t got, word_t exp);
    checks++; if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask
  task automatic need(string what, int n);
    checks++; if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("INFO %s: %0d", what, n);
  endtask

  function automatic int wa(int page, int off); return page * 2048 + off; endfunction
  function automatic word_t ent(bit last, int nxt, int node, int page);
    mc_entry_t e; e.valid = 1; e.last = last; e.next = MCIDX_W'(nxt); e.node = node_t'(node); e.page = LPAGE_W'(page);
    return e;
  endfunction

  initial begin
    word_t d; int c, c_rd, c_wr, c_burst;
    for (int i = 0; i < N; i++) hold[i] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // multicast list heads start empty on every board used below
    for (int p = 0; p < 32; p++) begin
      h0.wr(h0.rg(R_MC_SEL), p); h0.wr(h0.rg(R_MC_DAT), 0); h0.wr(h0.rg(R_PMODE), p);
      h1.wr(h1.rg(R_MC_SEL), p); h1.wr(h1.rg(R_MC_DAT), 0); h1.wr(h1.rg(R_PMODE), p);
      h2.wr(h2.rg(R_MC_SEL), p); h2.wr(h2.rg(R_MC_DAT), 0); h2.wr(h2.rg(R_PMODE), p);
    end
    h1.rd(h1.rg(R_NODE), d); expect_word("node number", d, 1);

    // 1. local store and load
    h0.wr(h0.sh(0, 100), 32'h1111_0001); h0.rd(h0.sh(0, 100), d); expect_word("local load", d, 32'h1111_0001);

    // 2. remote store: processor released at once; fence waits for the ack
    h1.access(1, h1.sh(0, 200), 32'hCAFE_0200, d, c_wr);
    check("remote store released after one cycle", c_wr == 1);
    h1.rd(h1.rg(R_FENCE), d);
    h1.rd(h1.rg(R_OUTSTAND), d); expect_word("nothing outstanding after fence", d, 0);
    h0.rd(h0.sh(0, 200), d); expect_word("remote store arrived", d, 32'hCAFE_0200);

    // 3. remote load: processor held until the data return
    h2.access(0, h2.sh(0, 200), 0, d, c_rd);
    expect_word("remote load", d, 32'hCAFE_0200);
    check("remote load takes longer than a remote store", c_rd > 4 * c_wr);
    $display("INFO remote load %0d cycles, remote store %0d cycle(s)", c_rd, c_wr);

    // a burst of 100 remote stores: the processor sees queueing, not the network
    c_burst = 0;
    for (int i = 0; i < 100; i++) begin h1.access(1, h1.sh(2, 1000 + i), i, d, c); c_burst += c; end
    h1.rd(h1.rg(R_FENCE), d);
    for (int i = 0; i < 100; i += 33) begin h2.rd(h2.sh(2, 1000 + i), d); expect_word("burst store", d, i); end
    check("burst of stores cheaper per store than one load", c_burst < 100 * c_rd);
    $display("INFO 100 remote stores held the processor %0d cycles", c_burst);

    $display("INFO step %s at cycle %0d", "// 4.", $time/10);
    // 4. page access counters: read counter of node 0 page 0 set to 2
    h1.wr(h1.rg(R_PCNT_SEL), {15'd0, 1'b0, 5'd0, 11'd0});
    h1.wr(h1.rg(R_PCNT_DAT), 2);
    h1.rd(h1.sh(0, 10), d); check("no alarm after one access", !irq[1]);
    h1.rd(h1.sh(0, 11), d); check("alarm on reaching zero", irq[1]);
    h1.rd(h1.rg(R_IRQ), d); expect_word("alarm register", d, {1'b1, 1'b0, 13'd0, 1'b0, 5'd0, 11'd0});
    h1.rd(h1.rg(R_PCNT_DAT), d); expect_word("counter read back", d, 0);
    h1.rd(h1.sh(0, 12), d); h1.rd(h1.rg(R_PCNT_DAT), d); expect_word("counter stays at zero", d, 0);
    h1.wr(h1.rg(R_IRQ), 0); h1.rd(h1.rg(R_NODE), d); check("alarm cleared", !irq[1]);
    h1.wr(h1.rg(R_PCNT_SEL), {15'd0, 1'b1, 5'd2, 11'd5});   // write counter of node 2 page 5
    h1.wr(h1.rg(R_PCNT_DAT), 1);
    h1.wr(h1.sh(2, wa(5, 3)), 7); h1.rd(h1.rg(R_FENCE), d);
    check("write counter alarm", irq[1]);
    h1.rd(h1.rg(R_IRQ), d); expect_word("write alarm register", d, {1'b1, 1'b0, 13'd0, 1'b1, 5'd2, 11'd5});
    h1.wr(h1.rg(R_IRQ), 0);

    $display("INFO step %s at cycle %0d", "// 5.", $time/10);
    // 5. atomic operations at node 0, launched from node 1 in special mode
    h0.wr(h0.sh(0, 400), 10);
    h1.wr(h1.rg(R_SPECIAL), SOP_FETCH_INC); h1.rd(h1.rg(R_SPECIAL), d);
    check("special mode on", special_mode[1] && d == {29'd0, 1'b1, SOP_FETCH_INC});
    h1.wr(h1.sh(0, 400), 0);
    h1.rd(h1.rg(R_LAUNCH), d); expect_word("fetch-and-inc old", d, 10);
    check("special mode off after launch", !special_mode[1]);
    h0.rd(h0.sh(0, 400), d); expect_word("fetch-and-inc new (argument store not performed)", d, 11);
    h1.wr(h1.rg(R_SPECIAL), SOP_FETCH_STORE); h1.wr(h1.sh(0, 400), 77);
    h1.rd(h1.rg(R_LAUNCH), d); expect_word("fetch-and-store old", d, 11);
    h0.rd(h0.sh(0, 400), d); expect_word("fetch-and-store new", d, 77);
    h1.wr(h1.rg(R_SPECIAL), SOP_CAS); h1.wr(h1.sh(0, 400), 77); h1.wr(h1.sh(0, 400), 99);
    h1.rd(h1.rg(R_LAUNCH), d); expect_word("cas old (match)", d, 77);
    h0.rd(h0.sh(0, 400), d); expect_word("cas swapped", d, 99);
    h2.wr(h2.rg(R_SPECIAL), SOP_CAS); h2.wr(h2.sh(0, 400), 5); h2.wr(h2.sh(0, 400), 1);
    h2.rd(h2.rg(R_LAUNCH), d); expect_word("cas old (no match)", d, 99);
    h0.rd(h0.sh(0, 400), d); expect_word("cas not swapped", d, 99);
    h0.wr(h0.rg(R_SPECIAL), SOP_FETCH_INC); h0.wr(h0.sh(0, 400), 0);
    h0.rd(h0.rg(R_LAUNCH), d); expect_word("local fetch-and-inc old", d, 99);
    h0.rd(h0.sh(0, 400), d); expect_word("local fetch-and-inc new", d, 100);
    // an abandoned sequence: leave special mode without launching
    h0.wr(h0.rg(R_SPECIAL), SOP_FETCH_STORE); h0.wr(h0.sh(0, 400), 1);
    h0.wr(h0.rg(R_SPECIAL), 32'd4); h0.rd(h0.rg(R_SPECIAL), d);
    check("special mode left without launch", !special_mode[0] && d[2] == 1'b0);
    h0.rd(h0.sh(0, 400), d); expect_word("abandoned argument store not performed", d, 100);

    $display("INFO step %s at cycle %0d", "// 6.", $time/10);
    // 5b. the same operations through a context with key and shadow addresses
    h1.wr(h1.cx(3, 0, 1), 32'hBEEF);                 // key, by the operating system
    h1.wr(h1.cx(3, 0), SOP_FETCH_INC);
    h1.wr(h1.sd(0, 400), h1.sdat(3, 0, 32'hBEEF));   // physical address to slot 0
    h1.rd(h1.cx(3, 3), d); expect_word("context fetch-and-inc old", d, 100);
    h1.wr(h1.sd(0, 401), h1.sdat(3, 0, 32'h1234));   // wrong key: refused
    h1.rd(h1.cx(3, 3), d); expect_word("wrong key leaves the context unchanged", d, 101);
    check("wrong key counted", n1.key_rejects == 1);
    h1.wr(h1.cx(3, 0), SOP_CAS); h1.wr(h1.cx(3, 1), 102); h1.wr(h1.cx(3, 2), 555);
    h1.rd(h1.cx(3, 1), d); expect_word("context data read back", d, 102);
    h1.rd(h1.cx(3, 3), d); expect_word("context cas old", d, 102);
    h0.rd(h0.sh(0, 400), d); expect_word("context cas swapped", d, 555);
    check("context launch needs no special mode", !special_mode[1]);

    // 6. remote copy node 1 word 500 -> node 2 word 600, launched by node 2
    h1.wr(h1.sh(1, 500), 32'h0C0F_F1E5);
    h2.wr(h2.rg(R_SPECIAL), SOP_RCOPY); h2.wr(h2.sh(1, 500), 0); h2.wr(h2.sh(2, 600), 0);
    h2.access(0, h2.rg(R_LAUNCH), 0, d, c);
    check("remote copy does not block", c < c_rd);
    h2.rd(h2.rg(R_FENCE), d);
    h2.rd(h2.sh(2, 600), d); expect_word("remote copy data", d, 32'h0C0F_F1E5);

    $display("INFO step %s at cycle %0d", "// 7.", $time/10);
    // 7. eager update: node 0 page 3 -> node 1 page 10, node 2 page 11
    h0.wr(h0.rg(R_MC_SEL), 3);    h0.wr(h0.rg(R_MC_DAT), ent(0, 3000, 1, 10));
    h0.wr(h0.rg(R_MC_SEL), 3000); h0.wr(h0.rg(R_MC_DAT), ent(1, 0, 2, 11));
    h0.wr(h0.rg(R_MC_SEL), 3000); h0.rd(h0.rg(R_MC_DAT), d); expect_word("list entry read back", d, ent(1, 0, 2, 11));
    h0.wr(h0.sh(0, wa(3, 5)), 32'h5EED_0005);
    h0.rd(h0.rg(R_FENCE), d);
    h1.rd(h1.sh(1, wa(10, 5)), d); expect_word("multicast copy at node 1", d, 32'h5EED_0005);
    h2.rd(h2.sh(2, wa(11, 5)), d); expect_word("multicast copy at node 2", d, 32'h5EED_0005);
    // a remote store from node 2 into the page reaches the copies too
    h2.wr(h2.sh(0, wa(3, 6)), 32'h5EED_0006); h2.rd(h2.rg(R_FENCE), d); h0.rd(h0.rg(R_FENCE), d);
    h1.rd(h1.sh(1, wa(10, 6)), d); expect_word("remote store multicast to node 1", d, 32'h5EED_0006);
    h2.rd(h2.sh(2, wa(11, 6)), d); expect_word("remote store multicast to node 2", d, 32'h5EED_0006);

    $display("INFO step %s at cycle %0d", "// 8.", $time/10);
    // 8. owner-based updates: node 0 owns page 4, copies at node 1 page 20, node 2 page 21
    h0.wr(h0.rg(R_MC_SEL), 4);    h0.wr(h0.rg(R_MC_DAT), ent(0, 3001, 1, 20));
    h0.wr(h0.rg(R_MC_SEL), 3001); h0.wr(h0.rg(R_MC_DAT), ent(1, 0, 2, 21));
    h1.wr(h1.rg(R_MC_SEL), 20);   h1.wr(h1.rg(R_MC_DAT), ent(1, 0, 0, 4)); h1.wr(h1.rg(R_PMODE), 32'h800 | 20);
    h2.wr(h2.rg(R_MC_SEL), 21);   h2.wr(h2.rg(R_MC_DAT), ent(1, 0, 0, 4)); h2.wr(h2.rg(R_PMODE), 32'h800 | 21);
    h1.wr(h1.rg(R_MC_SEL), 20);   h1.rd(h1.rg(R_PMODE), d); expect_word("page mode read back", d, 1);
    for (int o = 0; o < 8; o++) begin
      h0.wr(h0.sh(0, wa(4, o)), 0); h1.wr(h1.sh(1, wa(20, o)), 0); h2.wr(h2.sh(2, wa(21, o)), 0);
    end
    h0.rd(h0.rg(R_FENCE), d);
    // a copy reads its own store at once
    h1.wr(h1.sh(1, wa(20, 1)), 32'h11); h1.rd(h1.sh(1, wa(20, 1)), d); expect_word("read own store on a copy", d, 32'h11);
    // the two-writer example: node 1 writes 2 (its reflections delayed),
    // node 2 writes 3, node 1 writes 4; every copy must end with 4
    hold[1] = 1;
    h1.wr(h1.sh(1, wa(20, 0)), 2);
    repeat (40) @(negedge clk);
    h2.wr(h2.sh(2, wa(21, 0)), 3);
    repeat (40) @(negedge clk);
    h1.wr(h1.sh(1, wa(20, 0)), 4);
    h1.rd(h1.sh(1, wa(20, 0)), d); expect_word("writer sees its latest value", d, 4);
    repeat (40) @(negedge clk);
    hold[1] = 0;
    h1.rd(h1.rg(R_FENCE), d); h0.rd(h0.rg(R_FENCE), d); h2.rd(h2.rg(R_FENCE), d);
    h0.rd(h0.sh(0, wa(4, 0)), d); expect_word("owner final", d, 4);
    h1.rd(h1.sh(1, wa(20, 0)), d); expect_word("copy 1 final", d, 4);
    h2.rd(h2.sh(2, wa(21, 0)), d); expect_word("copy 2 final", d, 4);
    // concurrent random writers on 8 words: all copies must agree
    fork
      for (int i = 0; i < 60; i++) h1.wr(h1.sh(1, wa(20, i % 8)), 32'h1000 + i);
      for (int i = 0; i < 60; i++) h2.wr(h2.sh(2, wa(21, (i * 3) % 8)), 32'h2000 + i);
      for (int i = 0; i < 30; i++) h0.wr(h0.sh(0, wa(4, (i * 5) % 8)), 32'h3000 + i);
    join
    h1.rd(h1.rg(R_FENCE), d); h2.rd(h2.rg(R_FENCE), d); h0.rd(h0.rg(R_FENCE), d);
    h1.rd(h1.rg(R_FENCE), d); h2.rd(h2.rg(R_FENCE), d);
    for (int o = 0; o < 8; o++) begin
      word_t a, b, e;
      h0.rd(h0.sh(0, wa(4, o)), e); h1.rd(h1.sh(1, wa(20, o)), a); h2.rd(h2.sh(2, wa(21, o)), b);
      expect_word("copy 1 agrees with owner", a, e);
      expect_word("copy 2 agrees with owner", b, e);
    end

    $display("INFO step %s at cycle %0d", "// 9.", $time/10);
    // 9. counter-cache stall: reflections to node 1 held back while it
    //    stores to 40 different words of its copy
    hold[1] = 1;
    fork
      for (int i = 0; i < 40; i++) h1.wr(h1.sh(1, wa(20, 100 + i)), 32'h4000 + i);
      begin repeat (600) @(negedge clk); check("counter cache full while held", n1.u_ccache.full); hold[1] = 0; end
    join
    h1.rd(h1.rg(R_FENCE), d); h0.rd(h0.rg(R_FENCE), d);
    for (int i = 0; i < 40; i += 13) begin
      h0.rd(h0.sh(0, wa(4, 100 + i)), d); expect_word("stalled store reached owner", d, 32'h4000 + i);
      h2.rd(h2.sh(2, wa(21, 100 + i)), d); expect_word("stalled store reached copy 2", d, 32'h4000 + i);
    end
    check("counter cache empty at the end", n1.u_ccache.used == 0 && n2.u_ccache.used == 0);

    $display("INFO step %s at cycle %0d", "// mechanisms", $time/10);
    check("no host access timed out", h0.timeouts == 0 && h1.timeouts == 0 && h2.timeouts == 0);
    // mechanisms
    need("shadow stores refused for a wrong key", n1.key_rejects);
    need("local and remote loads served (read requests)", ev_rd_req);
    need("remote stores", ev_wr);
    need("remote atomic requests", ev_at_req);
    need("remote copy requests", ev_cp_req);
    need("page counter alarms", ev_irq);
    need("fence waits", ev_fence_wait);
    need("updates applied", ev_upd_applied);
    need("writes forwarded to the owner", ev_fwd);
    need("own reflected writes ignored", ev_refl_own);
    need("updates ignored on a non-zero counter", ev_upd_ignored);
    need("counter cache stalls", ev_cc_stall);
    need("link back-pressure cycles", ev_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("FAIL watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
