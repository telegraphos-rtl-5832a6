// Telegraphos host interface board (HIB): top level.
//
// A network interface that plugs into a workstation's I/O bus and lets
// the processor load and store directly to the memory of other
// workstations, with no operating system involvement: remote reads
// (blocking) and writes (released at once), remote atomic operations and
// non-blocking remote copies launched either through a special mode or
// through per-application contexts with keys and shadow addresses, page access
// counters with alarms, a count of outstanding operations with a fence,
// eager-update multicast of stores, and the owner-based counter protocol
// that keeps multicast copies coherent.
//
//   host bus --> tg_tc_if --> tg_central_ctrl <--> tg_mpm (16 MByte)
//                                  |   |   |  <--> tg_atomic
//                                  |   |   |  <--> tg_page_counters
//                                  |   |   |  <--> tg_multicast
//                                  |   |   |  <--> tg_outstanding
//                                  |   |   |  <--> tg_counter_cache
//                                  |   |   |  <--> tg_context
//   link in  --> tg_link_in -------'   '--------> tg_link_out --> link out
//
// The link ports carry one whole packet (tg_pkg::packet_t) per transfer,
// with valid/ready back-pressure; they connect to the network switch,
// which is not part of this design (two boards may also be wired back to
// back). irq is the page access counter alarm; key_rejects counts shadow
// stores refused for a wrong key. All sizes default to the
// board's published ones; the interfaces are this design's own.
module tg_hib
  import tg_pkg::*;
#(
  parameter int unsigned MPM_AW          = WADDR_W,  // 16 MByte shared memory
  parameter int unsigned PC_PAGES_LOG2   = GPAGE_W,  // 64K page counter pairs
  parameter int unsigned MC_ENTRIES_LOG2 = MCIDX_W,  // 16K multicast entries
  parameter int unsigned FIFO_DEPTH      = 16,       // 2 Kbit per link FIFO
  parameter int unsigned CC_ENTRIES      = 32,       // counter cache entries
  parameter int unsigned CC_CNT_W        = 4,
  parameter int unsigned KEY_W           = 16        // context key width
) (
  input  logic    clk,
  input  logic    rst_n,
  input  node_t   my_node,
  // host I/O bus
  input  logic    tc_valid,
  input  logic    tc_we,
  input  word_t   tc_addr,
  input  word_t   tc_wdata,
  output logic    tc_ack,
  output word_t   tc_rdata,
  // network link, outgoing
  output logic    lo_valid,
  input  logic    lo_ready,
  output packet_t lo_pkt,
  // network link, incoming
  input  logic    li_valid,
  output logic    li_ready,
  input  packet_t li_pkt,
  // status
  output logic    irq,
  output logic    special_mode,
  output logic [15:0] outstanding,
  output logic [15:0] misrouted,
  output logic [15:0] key_rejects
);
  // host bus interface <-> central control
  logic hreq_valid, hreq_ready, hrsp_valid;
  host_req_t hreq;
  word_t hrsp_data;
  // link FIFOs <-> central control
  logic in_valid, in_ready, out_valid, out_ready;
  packet_t in_pkt, out_pkt;
  logic [$clog2(FIFO_DEPTH):0] in_level, out_level;
  // memory
  logic mem_en, mem_we;
  waddr_t mem_addr;
  word_t mem_wdata, mem_rdata;
  // atomic unit
  sop_e at_op;
  word_t at_old, at_arg, at_arg2, at_new, at_result;
  logic at_write;
  // page counters
  logic pc_req_valid, pc_req_ready, pc_req_sel_wr, pc_rsp_valid;
  logic [1:0] pc_req_op;
  logic [GPAGE_W-1:0] pc_req_page, pc_irq_page;
  logic [PCNT_W-1:0] pc_req_wdata, pc_rsp_data;
  logic pc_irq_sel_wr, pc_irq_lost, pc_irq_clear;
  // multicast
  logic mc_walk_start, mc_busy, mc_is_copy, mc_dst_valid, mc_dst_ready, mc_walk_done;
  logic [LPAGE_W-1:0] mc_walk_page, mc_dst_page;
  node_t mc_dst_node;
  logic mc_host_valid, mc_host_done;
  logic [1:0] mc_host_op;
  logic [MCIDX_W-1:0] mc_host_idx;
  word_t mc_host_wdata, mc_host_rdata;
  // outstanding operations
  logic os_inc, os_dec, os_zero, os_full;
  // counter cache
  logic cc_inc_valid, cc_inc_ready, cc_dec_valid, cc_dec_miss, cc_lookup_nz, cc_full;
  waddr_t cc_inc_addr, cc_dec_addr, cc_lookup_addr;
  logic [$clog2(CC_ENTRIES):0] cc_used;
  // launch contexts
  logic ctx_wr_valid, key_wr_valid, sh_valid, sh_ok, sh_reject;
  logic [CTX_W-1:0] ctx_wr_ctx, rd_ctx;
  logic [1:0] ctx_wr_field;
  word_t ctx_wr_data, sh_data, rd_data0, rd_data1;
  node_t sh_node, rd_node0, rd_node1;
  waddr_t sh_waddr, rd_waddr0, rd_waddr1;
  sop_e rd_op;

  tg_tc_if u_tc_if (
    .clk, .rst_n, .my_node,
    .tc_valid, .tc_we, .tc_addr, .tc_wdata, .tc_ack, .tc_rdata,
    .req_valid(hreq_valid), .req_ready(hreq_ready), .req(hreq),
    .rsp_valid(hrsp_valid), .rsp_data(hrsp_data)
  );

  tg_link_in #(.DEPTH(FIFO_DEPTH)) u_link_in (
    .clk, .rst_n, .my_node,
    .link_valid(li_valid), .link_ready(li_ready), .link_pkt(li_pkt),
    .out_valid(in_valid), .out_ready(in_ready), .out_pkt(in_pkt),
    .misrouted, .level(in_level)
  );

  tg_link_out #(.DEPTH(FIFO_DEPTH)) u_link_out (
    .clk, .rst_n, .my_node,
    .in_valid(out_valid), .in_ready(out_ready), .in_pkt(out_pkt),
    .link_valid(lo_valid), .link_ready(lo_ready), .link_pkt(lo_pkt),
    .level(out_level)
  );

  tg_mpm #(.AW(MPM_AW)) u_mpm (
    .clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  tg_atomic u_atomic (
    .op(at_op), .old_val(at_old), .arg(at_arg), .arg2(at_arg2),
    .new_val(at_new), .do_write(at_write), .result(at_result)
  );

  tg_page_counters #(.PAGES_LOG2(PC_PAGES_LOG2)) u_pcnt (
    .clk, .rst_n,
    .req_valid(pc_req_valid), .req_ready(pc_req_ready), .req_op(pc_req_op),
    .req_sel_wr(pc_req_sel_wr), .req_page(pc_req_page), .req_wdata(pc_req_wdata),
    .rsp_valid(pc_rsp_valid), .rsp_data(pc_rsp_data),
    .irq, .irq_sel_wr(pc_irq_sel_wr), .irq_page(pc_irq_page), .irq_lost(pc_irq_lost),
    .irq_clear(pc_irq_clear)
  );

  tg_multicast #(.ENTRIES_LOG2(MC_ENTRIES_LOG2)) u_mcast (
    .clk, .rst_n,
    .walk_start(mc_walk_start), .walk_page(mc_walk_page), .busy(mc_busy),
    .is_copy(mc_is_copy), .dst_valid(mc_dst_valid), .dst_ready(mc_dst_ready),
    .dst_node(mc_dst_node), .dst_page(mc_dst_page), .walk_done(mc_walk_done),
    .host_valid(mc_host_valid), .host_op(mc_host_op), .host_idx(mc_host_idx),
    .host_wdata(mc_host_wdata), .host_done(mc_host_done), .host_rdata(mc_host_rdata)
  );

  tg_outstanding #(.W(16)) u_outstanding (
    .clk, .rst_n, .inc(os_inc), .dec(os_dec),
    .count(outstanding), .zero(os_zero), .full(os_full)
  );

  tg_counter_cache #(.ENTRIES(CC_ENTRIES), .CNT_W(CC_CNT_W)) u_ccache (
    .clk, .rst_n,
    .inc_valid(cc_inc_valid), .inc_addr(cc_inc_addr), .inc_ready(cc_inc_ready),
    .dec_valid(cc_dec_valid), .dec_addr(cc_dec_addr), .dec_miss(cc_dec_miss),
    .lookup_addr(cc_lookup_addr), .lookup_nz(cc_lookup_nz),
    .used(cc_used), .full(cc_full)
  );

  tg_context #(.CONTEXTS(2**CTX_W), .KEY_W(KEY_W)) u_ctx (
    .clk, .rst_n,
    .wr_valid(ctx_wr_valid), .wr_ctx(ctx_wr_ctx), .wr_field(ctx_wr_field), .wr_data(ctx_wr_data),
    .key_wr_valid, .key_wr_ctx(ctx_wr_ctx), .key_wr_data(ctx_wr_data[KEY_W-1:0]),
    .sh_valid, .sh_node, .sh_waddr, .sh_data, .sh_ok, .sh_reject, .rejects(key_rejects),
    .rd_ctx, .rd_op, .rd_node0, .rd_waddr0, .rd_node1, .rd_waddr1, .rd_data0, .rd_data1
  );

  tg_central_ctrl u_ctrl (
    .clk, .rst_n, .my_node,
    .hreq_valid, .hreq_ready, .hreq, .hrsp_valid, .hrsp_data,
    .in_valid, .in_ready, .in_pkt, .out_valid, .out_ready, .out_pkt,
    .mem_en, .mem_we, .mem_addr, .mem_wdata, .mem_rdata,
    .at_op, .at_old, .at_arg, .at_arg2, .at_new, .at_write,
    .pc_req_valid, .pc_req_ready, .pc_req_op, .pc_req_sel_wr, .pc_req_page,
    .pc_req_wdata, .pc_rsp_valid, .pc_rsp_data, .pc_irq(irq), .pc_irq_sel_wr,
    .pc_irq_page, .pc_irq_lost, .pc_irq_clear,
    .mc_walk_start, .mc_walk_page, .mc_is_copy, .mc_dst_valid, .mc_dst_ready,
    .mc_dst_node, .mc_dst_page, .mc_walk_done,
    .mc_host_valid, .mc_host_op, .mc_host_idx, .mc_host_wdata, .mc_host_done, .mc_host_rdata,
    .os_inc, .os_dec, .os_count(outstanding), .os_zero,
    .cc_inc_valid, .cc_inc_addr, .cc_inc_ready, .cc_dec_valid, .cc_dec_addr,
    .cc_lookup_addr, .cc_lookup_nz,
    .ctx_wr_valid, .ctx_wr_ctx, .ctx_wr_field, .ctx_wr_data, .key_wr_valid,
    .sh_valid, .sh_node, .sh_waddr, .sh_data,
    .rd_ctx, .rd_op, .rd_node0, .rd_waddr0, .rd_node1, .rd_waddr1, .rd_data0, .rd_data1,
    .special_mode
  );

  // protocol errors the central controller must never cause
  assert property (@(posedge clk) disable iff (!rst_n) !cc_dec_miss)
    else $error("tg_hib: reflected write with no pending counter");
  assert property (@(posedge clk) disable iff (!rst_n) os_inc |-> !os_full)
    else $error("tg_hib: outstanding counter overflow");
endmodule
