// Unit test of tg_central_ctrl with its memories and helpers at reduced
// sizes, driving its host-request port and its packet ports directly.
// Packets are injected as another node would send them and the packets
// produced are captured and compared with the expected ones:
//   read / write / atomic / copy requests are served on the memory and
//   answered; a copy response and acknowledgements retire outstanding
//   operations; an update is applied, or ignored when the word has a
//   pending counter or is the node's own reflected write; a write
//   forwarded to this node as owner is reflected to every copy in list
//   order, tagged with the writer; a store to a copy page increments the
//   counter and is forwarded to the owner; a remote load produces a read
//   request and completes with the response; a random mix of local stores,
//   own reflections and other writers' updates on a copy page is checked
//   against a model of the counter rules; while the link is blocked,
//   acknowledgements are taken and requests are not.
// Latency checked: a local load is answered in the cycle after central
// control takes it.
module tb_tg_central_ctrl;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  node_t my_node = 5'd4;

  logic hreq_valid = 0, hreq_ready, hrsp_valid; host_req_t hreq = '0; word_t hrsp_data;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1; packet_t in_pkt = '0, out_pkt;
  logic mem_en, mem_we; waddr_t mem_addr; word_t mem_wdata, mem_rdata;
  sop_e at_op; word_t at_old, at_arg, at_arg2, at_new, at_result; logic at_write;
  logic pc_req_valid, pc_req_ready, pc_req_sel_wr, pc_rsp_valid, pc_irq, pc_irq_sel_wr, pc_irq_lost, pc_irq_clear;
  logic [1:0] pc_req_op; logic [GPAGE_W-1:0] pc_req_page, pc_irq_page; logic [PCNT_W-1:0] pc_req_wdata, pc_rsp_data;
  logic mc_walk_start, mc_busy, mc_is_copy, mc_dst_valid, mc_dst_ready, mc_walk_done, mc_host_valid, mc_host_done;
  logic [LPAGE_W-1:0] mc_walk_page, mc_dst_page; node_t mc_dst_node; logic [1:0] mc_host_op;
  logic [MCIDX_W-1:0] mc_host_idx; word_t mc_host_wdata, mc_host_rdata;
  logic os_inc, os_dec, os_zero, os_full; logic [15:0] os_count;
  logic cc_inc_valid, cc_inc_ready, cc_dec_valid, cc_dec_miss, cc_lookup_nz, cc_full;
  waddr_t cc_inc_addr, cc_dec_addr, cc_lookup_addr; logic [3:0] cc_used;
  logic special_mode;
  logic ctx_wr_valid, key_wr_valid, sh_valid, sh_ok, sh_reject; logic [CTX_W-1:0] ctx_wr_ctx, rd_ctx; logic [1:0] ctx_wr_field;
  word_t ctx_wr_data, sh_data, rd_data0, rd_data1; node_t sh_node, rd_node0, rd_node1; waddr_t sh_waddr, rd_waddr0, rd_waddr1;
  sop_e rd_op; logic [15:0] rejects;

  tg_mpm #(.AW(14)) u_mpm (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  tg_atomic u_at (.op(at_op), .old_val(at_old), .arg(at_arg), .arg2(at_arg2), .new_val(at_new), .do_write(at_write), .result(at_result));
  tg_page_counters #(.PAGES_LOG2(8)) u_pc (.clk, .rst_n, .req_valid(pc_req_valid), .req_ready(pc_req_ready), .req_op(pc_req_op),
    .req_sel_wr(pc_req_sel_wr), .req_page(pc_req_page), .req_wdata(pc_req_wdata), .rsp_valid(pc_rsp_valid), .rsp_data(pc_rsp_data),
    .irq(pc_irq), .irq_sel_wr(pc_irq_sel_wr), .irq_page(pc_irq_page), .irq_lost(pc_irq_lost), .irq_clear(pc_irq_clear));
  tg_multicast #(.ENTRIES_LOG2(12)) u_mc (.clk, .rst_n, .walk_start(mc_walk_start), .walk_page(mc_walk_page), .busy(mc_busy),
    .is_copy(mc_is_copy), .dst_valid(mc_dst_valid), .dst_ready(mc_dst_ready), .dst_node(mc_dst_node), .dst_page(mc_dst_page),
    .walk_done(mc_walk_done), .host_valid(mc_host_valid), .host_op(mc_host_op), .host_idx(mc_host_idx),
    .host_wdata(mc_host_wdata), .host_done(mc_host_done), .host_rdata(mc_host_rdata));
  tg_outstanding #(.W(16)) u_os (.clk, .rst_n, .inc(os_inc), .dec(os_dec), .count(os_count), .zero(os_zero), .full(os_full));
  tg_counter_cache #(.ENTRIES(8), .CNT_W(4)) u_cc (.clk, .rst_n, .inc_valid(cc_inc_valid), .inc_addr(cc_inc_addr), .inc_ready(cc_inc_ready),
    .dec_valid(cc_dec_valid), .dec_addr(cc_dec_addr), .dec_miss(cc_dec_miss), .lookup_addr(cc_lookup_addr), .lookup_nz(cc_lookup_nz),
    .used(cc_used), .full(cc_full));

  tg_context u_ctx (.clk, .rst_n, .wr_valid(ctx_wr_valid), .wr_ctx(ctx_wr_ctx), .wr_field(ctx_wr_field), .wr_data(ctx_wr_data),
    .key_wr_valid, .key_wr_ctx(ctx_wr_ctx), .key_wr_data(ctx_wr_data[15:0]), .sh_valid, .sh_node, .sh_waddr, .sh_data,
    .sh_ok, .sh_reject, .rejects, .rd_ctx, .rd_op, .rd_node0, .rd_waddr0, .rd_node1, .rd_waddr1, .rd_data0, .rd_data1);

  tg_central_ctrl dut (.*, .os_count(os_count));

  int checks = 0, failures = 0;
  packet_t got[$];
  always @(posedge clk) if (out_valid && out_ready) got.push_back(out_pkt);
  word_t rsp_q[$];
  always @(posedge clk) if (hrsp_valid) rsp_q.push_back(hrsp_data);

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one host request; returns the response data (loads) and cycles to it
  task automatic host(bit we, bit is_reg, int node, int waddr, reg_e r, word_t wd, output word_t rd, output int cyc);
    @(negedge clk);
    hreq_valid = 1; hreq.we = we; hreq.is_reg = is_reg; hreq.node = node_t'(node);
    hreq.is_local = (node_t'(node) == my_node); hreq.waddr = waddr_t'(waddr); hreq.regidx = r; hreq.wdata = wd;
    do @(posedge clk); while (!hreq_ready);
    #1; hreq_valid = 0; cyc = 0; rd = '0;
    if (!we) begin
      while (rsp_q.size() == 0 && cyc < 1000) begin @(posedge clk); #1; cyc++; end
      if (rsp_q.size() != 0) rd = rsp_q.pop_front();
      @(negedge clk);
    end else repeat (4) @(negedge clk);
  endtask

  task automatic inject(packet_t p);
    @(negedge clk); in_valid = 1; in_pkt = p;
    do @(posedge clk); while (!in_ready);
    #1; in_valid = 0;
  endtask

  function automatic packet_t pk(ptype_e t, int src, int a, word_t d);
    packet_t p = '0; p.ptype = t; p.src = node_t'(src); p.dst = my_node; p.addr = waddr_t'(a); p.data = d; return p;
  endfunction

  task automatic expect_out(string what, ptype_e t, int dst, int a, word_t d);
    repeat (6) @(negedge clk);
    check({what, ": one packet"}, got.size() >= 1);
    if (got.size() >= 1) begin
      packet_t p; p = got.pop_front();
      check({what, ": type/dst/addr/data"}, p.ptype == t && int'(p.dst) == dst && int'(p.addr) == a && p.data == d);
    end
  endtask

  initial begin
    word_t d; int c, t0;
    packet_t p;
    repeat (3) @(negedge clk); rst_n = 1;
    // list heads 0..7 empty, page modes clear
    for (int i = 0; i < 8; i++) begin
      host(1, 1, 0, 0, R_MC_SEL, i, d, c); host(1, 1, 0, 0, R_MC_DAT, 0, d, c); host(1, 1, 0, 0, R_PMODE, i, d, c);
    end
    // local store and load
    host(1, 0, 4, 77, R_SPECIAL, 32'hABCD, d, c);
    host(0, 0, 4, 77, R_SPECIAL, 0, d, c);
    check("local load data", d == 32'hABCD); check("local load answered in the cycle after it is taken", c == 1);
    check("local store sends nothing without copies", got.size() == 0);
    // packets served on the memory
    inject(pk(PK_RD_REQ, 1, 77, 0)); t0 = $time;
    expect_out("read request answered", PK_RD_RESP, 1, 77, 32'hABCD);
    inject(pk(PK_WR, 2, 90, 32'h5555)); expect_out("write acknowledged", PK_ACK, 2, 90, 0);
    host(0, 0, 4, 90, R_SPECIAL, 0, d, c); check("remote write performed", d == 32'h5555);
    p = pk(PK_AT_REQ, 3, 90, 32'h5555); p.sop = SOP_CAS; p.data2 = 32'h6666;
    inject(p); expect_out("cas answered with old value", PK_AT_RESP, 3, 90, 32'h5555);
    host(0, 0, 4, 90, R_SPECIAL, 0, d, c); check("cas performed", d == 32'h6666);
    p = pk(PK_AT_REQ, 3, 90, 0); p.sop = SOP_FETCH_INC;
    inject(p); expect_out("fetch-inc answered", PK_AT_RESP, 3, 90, 32'h6666);
    host(0, 0, 4, 90, R_SPECIAL, 0, d, c); check("fetch-inc performed", d == 32'h6667);
    p = pk(PK_CP_REQ, 1, 77, 0); p.addr2 = 22'd1234;
    inject(p); expect_out("copy request answered to addr2", PK_CP_RESP, 1, 1234, 32'hABCD);
    // remote load from node 1
    fork
      host(0, 0, 1, 55, R_SPECIAL, 0, d, c);
      begin
        expect_out("remote load sends read request", PK_RD_REQ, 1, 55, 0);
        inject(pk(PK_RD_RESP, 1, 55, 32'h7777));
      end
    join
    check("remote load completes with response", d == 32'h7777); 
    // remote store: outstanding until acknowledged
    host(1, 0, 2, 56, R_SPECIAL, 32'h8888, d, c);
    expect_out("remote store sends write", PK_WR, 2, 56, 32'h8888);
    check("one outstanding", os_count == 1);
    inject(pk(PK_ACK, 2, 56, 0)); @(negedge clk); check("ack retires it", os_count == 0);
    // owner: page 2 listed to node 1 page 6 and node 3 page 7
    host(1, 1, 0, 0, R_MC_SEL, 2, d, c);    host(1, 1, 0, 0, R_MC_DAT, {1'b1, 1'b0, 14'd2500, 5'd1, 11'd6}, d, c);
    host(1, 1, 0, 0, R_MC_SEL, 2500, d, c); host(1, 1, 0, 0, R_MC_DAT, {1'b1, 1'b1, 14'd0, 5'd3, 11'd7}, d, c);
    inject(pk(PK_FWD, 3, 2 * 2048 + 9, 32'h9999));
    repeat (8) @(negedge clk);
    check("reflected to two copies", got.size() == 2);
    if (got.size() == 2) begin
      check("first copy", got[0].ptype == PK_UPDATE && got[0].dst == 1 && got[0].addr == 6 * 2048 + 9 && got[0].orig == 3 && got[0].data == 32'h9999);
      check("second copy", got[1].ptype == PK_UPDATE && got[1].dst == 3 && got[1].addr == 7 * 2048 + 9 && got[1].orig == 3);
    end
    got = {};
    host(0, 0, 4, 2 * 2048 + 9, R_SPECIAL, 0, d, c); check("owner performed forwarded write", d == 32'h9999);
    inject(pk(PK_ACK, 1, 0, 0)); inject(pk(PK_ACK, 3, 0, 0));
    // copy page 5 owned by node 2 page 8
    host(1, 1, 0, 0, R_MC_SEL, 5, d, c); host(1, 1, 0, 0, R_MC_DAT, {1'b1, 1'b1, 14'd0, 5'd2, 11'd8}, d, c);
    host(1, 1, 0, 0, R_PMODE, 32'h800 | 5, d, c);
    host(1, 0, 4, 5 * 2048 + 1, R_SPECIAL, 32'hA1, d, c);
    expect_out("store to a copy forwarded to owner", PK_FWD, 2, 8 * 2048 + 1, 32'hA1);
    check("counter allocated", cc_used == 1);
    host(0, 0, 4, 5 * 2048 + 1, R_SPECIAL, 0, d, c); check("copy updated at once", d == 32'hA1);
    // an update from another writer while the counter is non-zero: ignored
    p = pk(PK_UPDATE, 2, 5 * 2048 + 1, 32'hB2); p.orig = 5'd7;
    inject(p); expect_out("ignored update still acknowledged", PK_ACK, 2, 5 * 2048 + 1, 0);
    host(0, 0, 4, 5 * 2048 + 1, R_SPECIAL, 0, d, c); check("update ignored", d == 32'hA1);
    // own reflection: ignored, counter freed
    p = pk(PK_UPDATE, 2, 5 * 2048 + 1, 32'hA1); p.orig = my_node;
    inject(p); expect_out("own reflection acknowledged", PK_ACK, 2, 5 * 2048 + 1, 0);
    check("counter freed", cc_used == 0); check("forward retired", os_count == 0);
    // now an update from another writer is applied
    p = pk(PK_UPDATE, 2, 5 * 2048 + 1, 32'hC3); p.orig = 5'd7;
    inject(p); expect_out("update acknowledged", PK_ACK, 2, 5 * 2048 + 1, 0);
    host(0, 0, 4, 5 * 2048 + 1, R_SPECIAL, 0, d, c); check("update applied", d == 32'hC3);
    // copy response completes a remote copy
    host(1, 1, 0, 0, R_SPECIAL, SOP_RCOPY, d, c);
    host(1, 0, 1, 300, R_SPECIAL, 0, d, c); host(1, 0, 4, 301, R_SPECIAL, 0, d, c);
    host(0, 1, 0, 0, R_LAUNCH, 0, d, c);
    begin
      packet_t e; e = '0;
      repeat (4) @(negedge clk);
      check("copy request sent", got.size() == 1 && got[0].ptype == PK_CP_REQ && got[0].addr == 300 && got[0].addr2 == 301);
      got = {};
    end
    p = pk(PK_CP_RESP, 1, 301, 32'hD4); inject(p); @(negedge clk);
    check("copy retired", os_count == 0);
    host(0, 0, 4, 301, R_SPECIAL, 0, d, c); check("copy data stored", d == 32'hD4);

    // random mix on four words of the copy page 5, against a model of the
    // counter rules: local stores (rule 1), own reflections in the order
    // the stores were made (rule 2), updates of other writers (rule 3),
    // loads (rule 4)
    begin
      word_t mval [4]; word_t pend [4][$]; int off, kind; word_t v;
      for (int w = 0; w < 4; w++) begin
        host(0, 0, 4, 5 * 2048 + 20 + w, R_SPECIAL, 0, mval[w], c);
      end
      got = {};
      for (int k = 0; k < 300; k++) begin
        off  = $urandom_range(0, 3);
        kind = $urandom_range(0, 2);
        v    = $urandom;
        if (kind == 0 && pend[off].size() < 3) begin
          host(1, 0, 4, 5 * 2048 + 20 + off, R_SPECIAL, v, d, c);
          mval[off] = v; pend[off].push_back(v);
          repeat (2) @(negedge clk);
          check("random: store forwarded", got.size() == 1 && got[0].ptype == PK_FWD && got[0].dst == 2
                && got[0].addr == 8 * 2048 + 20 + off && got[0].data == v);
        end else if (kind == 1 && pend[off].size() > 0) begin
          p = pk(PK_UPDATE, 2, 5 * 2048 + 20 + off, pend[off].pop_front()); p.orig = my_node;
          inject(p); repeat (2) @(negedge clk);
          check("random: reflection acknowledged", got.size() == 1 && got[0].ptype == PK_ACK);
        end else begin
          p = pk(PK_UPDATE, 2, 5 * 2048 + 20 + off, v); p.orig = 5'd9;
          inject(p); repeat (2) @(negedge clk);
          if (pend[off].size() == 0) mval[off] = v;
          check("random: update acknowledged", got.size() == 1 && got[0].ptype == PK_ACK);
        end
        got = {};
        host(0, 0, 4, 5 * 2048 + 20 + off, R_SPECIAL, 0, d, c);
        check("random: word holds the model's value", d == mval[off]);
      end
      for (int w = 0; w < 4; w++)
        while (pend[w].size() > 0) begin
          p = pk(PK_UPDATE, 2, 5 * 2048 + 20 + w, pend[w].pop_front()); p.orig = my_node; inject(p);
        end
      repeat (4) @(negedge clk); got = {};
      check("random: all counters freed", cc_used == 0);
      check("random: all forwards retired", os_count == 0);
    end

    // blocked on a full link: acknowledgements are still taken
    out_ready = 0;
    host(1, 0, 2, 57, R_SPECIAL, 32'h1, d, c);       // write waits in S_SEND
    check("write outstanding", os_count == 1);
    @(negedge clk); in_valid = 1; in_pkt = pk(PK_ACK, 2, 56, 0);
    @(posedge clk); #1; check("acknowledgement taken while blocked", in_ready);
    @(negedge clk); in_valid = 0; in_pkt = pk(PK_WR, 2, 58, 32'h2);
    in_valid = 1;
    @(posedge clk); #1; check("request not taken while blocked", !in_ready);
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(negedge clk);
    check("blocked write sent afterwards", got.size() == 1 && got[0].ptype == PK_WR && got[0].addr == 57);
    check("count after ack taken while blocked", os_count == 0);
    got = {};
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
