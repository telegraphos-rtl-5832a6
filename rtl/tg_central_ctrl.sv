// Central control of the Telegraphos host interface board (HIB).
//
// A single sequencer that serves, one at a time, the requests of the local
// processor (from the host bus interface) and the packets arriving from
// the network (from the incoming link FIFO). Incoming packets go first, so
// that replies and acknowledgements are always drained, even while the
// processor is stalled on a remote read, a fence or a full counter cache.
//
// Processor requests (address map in tg_pkg):
//   * load/store to this node's shared memory: done on the on-board memory
//     (MPM). A store is then sent to every remote copy on the page's
//     multicast list (eager update). If the page is a copy of a page owned
//     by another node, the store updates the local copy, increments the
//     word's pending-write counter in the counter cache (waiting while the
//     cache is full) and is forwarded to the owner instead.
//   * load/store to another node: the page access counter is decremented,
//     then a read request (the processor waits for the data) or a write
//     packet (the processor was already released) is sent.
//   * register space: special mode, launch, outstanding count, fence, page
//     counters, alarm, multicast lists and page modes, node number.
//   * context registers (operation, data) and, with a shadow-address
//     store carrying context number and key, the physical addresses of a
//     special operation; a load of the context's launch register starts
//     it exactly as the LAUNCH register does for special mode.
//   * in special mode, stores to shared space are not performed: their
//     address and data are latched as the arguments of a special
//     operation, launched by a load of the LAUNCH register. fetch-and-store,
//     fetch-and-inc and compare-and-swap return the old value (the load
//     blocks); remote copy returns at once and completes in the background.
//     A SPECIAL store with bit 2 set leaves special mode unlaunched.
// Network packets:
//   * read, atomic and copy requests are served on the MPM and answered.
//   * writes are performed, sent on to the page's copies if it has any
//     (this node is the owner), and acknowledged.
//   * a write forwarded to this node as owner is performed and multicast
//     to all copies (reflected writes), tagged with the writer.
//   * an update is ignored if it is this node's own reflected write (the
//     counter is decremented) or if the word's counter is non-zero;
//     otherwise it is performed. Every update is acknowledged.
//   * replies complete a waiting load; acknowledgements and copy data
//     retire outstanding operations.
// The operations, both ways of passing arguments, the counter rules and
// the fence follow the design. The packet set, the register map, the
// acknowledgement of writes and updates, and the one-request-at-a-time
// sequencing are this design's own choices.
// While it waits on a full outgoing FIFO it still takes acknowledgements,
// which need no reply, so a stream of stores cannot lock two boards.
// Timing: a local load takes 3 cycles in this block, a local store without
// copies 3 cycles, a packet that needs no memory read 1 cycle plus its
// reply; each multicast destination costs one cycle when the link is free.
module tg_central_ctrl
  import tg_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  node_t              my_node,
  // host requests
  input  logic               hreq_valid,
  output logic               hreq_ready,
  input  host_req_t          hreq,
  output logic               hrsp_valid,
  output word_t              hrsp_data,
  // network
  input  logic               in_valid,
  output logic               in_ready,
  input  packet_t            in_pkt,
  output logic               out_valid,
  input  logic               out_ready,
  output packet_t            out_pkt,
  // multiprocessor memory
  output logic               mem_en,
  output logic               mem_we,
  output waddr_t             mem_addr,
  output word_t              mem_wdata,
  input  word_t              mem_rdata,
  // atomic unit
  output sop_e               at_op,
  output word_t              at_old,
  output word_t              at_arg,
  output word_t              at_arg2,
  input  word_t              at_new,
  input  logic               at_write,
  // page access counters
  output logic               pc_req_valid,
  input  logic               pc_req_ready,
  output logic [1:0]         pc_req_op,
  output logic               pc_req_sel_wr,
  output logic [GPAGE_W-1:0] pc_req_page,
  output logic [PCNT_W-1:0]  pc_req_wdata,
  input  logic               pc_rsp_valid,
  input  logic [PCNT_W-1:0]  pc_rsp_data,
  input  logic               pc_irq,
  input  logic               pc_irq_sel_wr,
  input  logic [GPAGE_W-1:0] pc_irq_page,
  input  logic               pc_irq_lost,
  output logic               pc_irq_clear,
  // multicast directory
  output logic               mc_walk_start,
  output logic [LPAGE_W-1:0] mc_walk_page,
  input  logic               mc_is_copy,
  input  logic               mc_dst_valid,
  output logic               mc_dst_ready,
  input  node_t              mc_dst_node,
  input  logic [LPAGE_W-1:0] mc_dst_page,
  input  logic               mc_walk_done,
  output logic               mc_host_valid,
  output logic [1:0]         mc_host_op,
  output logic [MCIDX_W-1:0] mc_host_idx,
  output word_t              mc_host_wdata,
  input  logic               mc_host_done,
  input  word_t              mc_host_rdata,
  // outstanding operations
  output logic               os_inc,
  output logic               os_dec,
  input  logic [15:0]        os_count,
  input  logic               os_zero,
  // counter cache
  output logic               cc_inc_valid,
  output waddr_t             cc_inc_addr,
  input  logic               cc_inc_ready,
  output logic               cc_dec_valid,
  output waddr_t             cc_dec_addr,
  output waddr_t             cc_lookup_addr,
  input  logic               cc_lookup_nz,
  // launch contexts
  output logic               ctx_wr_valid,
  output logic [CTX_W-1:0]   ctx_wr_ctx,
  output logic [1:0]         ctx_wr_field,
  output word_t              ctx_wr_data,
  output logic               key_wr_valid,
  output logic               sh_valid,
  output node_t              sh_node,
  output waddr_t             sh_waddr,
  output word_t              sh_data,
  output logic [CTX_W-1:0]   rd_ctx,
  input  sop_e               rd_op,
  input  node_t              rd_node0,
  input  waddr_t             rd_waddr0,
  input  node_t              rd_node1,
  input  waddr_t             rd_waddr1,
  input  word_t              rd_data0,
  input  word_t              rd_data1,
  // status
  output logic               special_mode
);
  typedef enum logic [3:0] {
    S_IDLE, S_PKT_RD, S_SEND, S_MC, S_H_LRD, S_H_PMODE, S_H_PC,
    S_REG_PC, S_REG_PC_RSP, S_REG_MC, S_LAUNCH, S_LAUNCH_RD
  } state_e;

  typedef struct packed {
    node_t  node;
    waddr_t waddr;
  } garg_t;

  // ---- state ----
  state_e       st, st_n;
  packet_t      pkt_q, pkt_n;        // packet being served
  packet_t      opkt, opkt_n;        // packet to send in S_SEND
  host_req_t    hq, hq_n;            // host request being served
  logic         held, held_n;        // hq is a store waiting for the counter cache
  logic         wait_resp, wait_resp_n;
  logic         wait_fence, wait_fence_n;
  logic         special, special_n;
  sop_e         sop, sop_n;
  logic         argn, argn_n;
  garg_t        arg_a [2];
  garg_t        arg_a_n [2];
  word_t        arg_d [2];
  word_t        arg_d_n [2];
  logic [16:0]  pcsel, pcsel_n;
  logic [MCIDX_W-1:0] mcsel, mcsel_n;
  logic [OFFS_W-1:0]  mc_off, mc_off_n;   // multicast: word offset in page
  word_t        mc_data, mc_data_n;
  node_t        mc_orig, mc_orig_n;
  logic         mc_ack, mc_ack_n;     // walk for a remote write: ACK after it

  assign special_mode = special;

  // request under consideration in S_IDLE: a held store comes first
  host_req_t cur;
  assign cur = held ? hq : hreq;
  wire  [LPAGE_W-1:0] cur_page = cur.waddr[WADDR_W-1 -: LPAGE_W];

  function automatic packet_t mk(ptype_e t, node_t dst, waddr_t a, word_t d);
    packet_t p = '0;
    p.ptype = t; p.dst = dst; p.addr = a; p.data = d;
    return p;
  endfunction

  always_comb begin
    // defaults: hold state, no side effects
    st_n = st; pkt_n = pkt_q; opkt_n = opkt; hq_n = hq; held_n = held;
    wait_resp_n = wait_resp; wait_fence_n = wait_fence;
    special_n = special; sop_n = sop; argn_n = argn;
    arg_a_n = arg_a; arg_d_n = arg_d;
    pcsel_n = pcsel; mcsel_n = mcsel;
    mc_off_n = mc_off; mc_data_n = mc_data; mc_orig_n = mc_orig; mc_ack_n = mc_ack;

    hreq_ready = 1'b0; hrsp_valid = 1'b0; hrsp_data = '0;
    in_ready = 1'b0; out_valid = 1'b0; out_pkt = opkt;
    mem_en = 1'b0; mem_we = 1'b0; mem_addr = '0; mem_wdata = '0;
    at_op = pkt_q.sop; at_old = mem_rdata; at_arg = pkt_q.data; at_arg2 = pkt_q.data2;
    pc_req_valid = 1'b0; pc_req_op = 2'd0; pc_req_sel_wr = 1'b0;
    pc_req_page = '0; pc_req_wdata = '0; pc_irq_clear = 1'b0;
    mc_walk_start = 1'b0; mc_walk_page = '0; mc_dst_ready = 1'b0;
    mc_host_valid = 1'b0; mc_host_op = 2'd0; mc_host_idx = mcsel; mc_host_wdata = '0;
    os_inc = 1'b0; os_dec = 1'b0;
    cc_inc_valid = 1'b0; cc_inc_addr = hq.waddr;
    cc_dec_valid = 1'b0; cc_dec_addr = in_pkt.addr; cc_lookup_addr = in_pkt.addr;
    ctx_wr_valid = 1'b0; ctx_wr_ctx = cur.ctx; ctx_wr_field = cur.cfield; ctx_wr_data = cur.wdata;
    key_wr_valid = 1'b0; rd_ctx = cur.ctx;
    sh_valid = 1'b0; sh_node = cur.node; sh_waddr = cur.waddr; sh_data = cur.wdata;

    unique case (st)
      // ------------------------------------------------------------------
      S_IDLE: begin
        if (in_valid) begin
          in_ready = 1'b1;
          pkt_n    = in_pkt;
          unique case (in_pkt.ptype)
            PK_RD_REQ, PK_AT_REQ, PK_CP_REQ: begin
              mem_en = 1'b1; mem_addr = in_pkt.addr;
              st_n   = S_PKT_RD;
            end
            PK_WR: begin
              // a remote write into this node's page also reaches the
              // page's copies (issued by this node as owner), then is
              // acknowledged
              mem_en = 1'b1; mem_we = 1'b1; mem_addr = in_pkt.addr; mem_wdata = in_pkt.data;
              opkt_n = mk(PK_ACK, in_pkt.src, in_pkt.addr, '0);
              mc_walk_start = 1'b1;
              mc_walk_page  = in_pkt.addr[WADDR_W-1 -: LPAGE_W];
              mc_off_n  = in_pkt.addr[OFFS_W-1:0];
              mc_data_n = in_pkt.data;
              mc_orig_n = my_node;
              mc_ack_n  = 1'b1;
              st_n      = S_MC;
            end
            PK_CP_RESP: begin
              mem_en = 1'b1; mem_we = 1'b1; mem_addr = in_pkt.addr; mem_wdata = in_pkt.data;
              os_dec = 1'b1;
            end
            PK_RD_RESP, PK_AT_RESP: begin
              hrsp_valid  = wait_resp;
              hrsp_data   = in_pkt.data;
              wait_resp_n = 1'b0;
            end
            PK_ACK: os_dec = 1'b1;
            PK_FWD: begin
              // this node owns the page: perform, then reflect to all copies
              mem_en = 1'b1; mem_we = 1'b1; mem_addr = in_pkt.addr; mem_wdata = in_pkt.data;
              mc_walk_start = 1'b1;
              mc_walk_page  = in_pkt.addr[WADDR_W-1 -: LPAGE_W];
              mc_off_n  = in_pkt.addr[OFFS_W-1:0];
              mc_data_n = in_pkt.data;
              mc_orig_n = in_pkt.src;
              st_n      = S_MC;
            end
            PK_UPDATE: begin
              if (in_pkt.orig == my_node) begin
                cc_dec_valid = 1'b1;          // own write reflected: drop it
                os_dec       = 1'b1;
              end else if (!cc_lookup_nz) begin
                mem_en = 1'b1; mem_we = 1'b1; mem_addr = in_pkt.addr; mem_wdata = in_pkt.data;
              end
              opkt_n = mk(PK_ACK, in_pkt.src, in_pkt.addr, '0);
              st_n   = S_SEND;
            end
            default: ;
          endcase
        end else if (wait_fence) begin
          if (os_zero) begin
            hrsp_valid   = 1'b1;
            wait_fence_n = 1'b0;
          end
        end else if ((held || hreq_valid) && !wait_resp) begin
          hreq_ready = !held;
          held_n     = 1'b0;
          hq_n       = cur;
          if (cur.is_ctx) begin
            // Telegraphos context registers and keys
            if (cur.we) begin
              key_wr_valid = cur.is_key;
              ctx_wr_valid = !cur.is_key && (cur.cfield != 2'd3);
            end else if (cur.cfield == 2'd3 && !cur.is_key) begin
              sop_n      = rd_op;                     // launch from the context
              arg_a_n[0] = '{node: rd_node0, waddr: rd_waddr0};
              arg_a_n[1] = '{node: rd_node1, waddr: rd_waddr1};
              arg_d_n[0] = rd_data0;
              arg_d_n[1] = rd_data1;
              st_n       = S_LAUNCH;
            end else begin
              hrsp_valid = 1'b1;
              hrsp_data  = (cur.cfield == 2'd0) ? 32'(rd_op) :
                           (cur.cfield == 2'd1) ? rd_data0 : rd_data1;
            end
          end else if (cur.is_shadow) begin
            sh_valid   = cur.we;                      // pass a physical address
            hrsp_valid = !cur.we;
          end else if (cur.is_reg) begin
            if (cur.we) begin
              unique case (cur.regidx)
                R_SPECIAL: begin
                  // bit 2 set: abandon a half-passed sequence (clean state)
                  special_n = !cur.wdata[2]; sop_n = sop_e'(cur.wdata[1:0]); argn_n = 1'b0;
                end
                R_PCNT_SEL: pcsel_n = cur.wdata[16:0];
                R_PCNT_DAT: st_n = S_REG_PC;
                R_IRQ:      pc_irq_clear = 1'b1;
                R_MC_SEL:   mcsel_n = cur.wdata[MCIDX_W-1:0];
                R_MC_DAT: begin
                  mc_host_valid = 1'b1; mc_host_op = 2'd1; mc_host_wdata = cur.wdata;
                  st_n = S_REG_MC;
                end
                R_PMODE: begin
                  mc_host_valid = 1'b1; mc_host_op = 2'd3;
                  mc_host_idx   = MCIDX_W'(cur.wdata[LPAGE_W-1:0]);
                  mc_host_wdata = {31'd0, cur.wdata[LPAGE_W]};
                  st_n = S_REG_MC;
                end
                default: ;
              endcase
            end else begin
              unique case (cur.regidx)
                R_SPECIAL:  begin hrsp_valid = 1'b1; hrsp_data = {29'd0, special, sop}; end
                R_LAUNCH:   st_n = S_LAUNCH;
                R_OUTSTAND: begin hrsp_valid = 1'b1; hrsp_data = {16'd0, os_count}; end
                R_FENCE:    wait_fence_n = 1'b1;
                R_PCNT_DAT: st_n = S_REG_PC;
                R_IRQ: begin
                  hrsp_valid = 1'b1;
                  hrsp_data  = {pc_irq, pc_irq_lost, 13'd0, pc_irq_sel_wr, pc_irq_page};
                end
                R_MC_DAT: begin
                  mc_host_valid = 1'b1; mc_host_op = 2'd0;
                  st_n = S_REG_MC;
                end
                R_PMODE: begin
                  mc_host_valid = 1'b1; mc_host_op = 2'd2;
                  st_n = S_REG_MC;
                end
                R_NODE: begin hrsp_valid = 1'b1; hrsp_data = 32'(my_node); end
                default: hrsp_valid = 1'b1;
              endcase
            end
          end else if (special && cur.we) begin
            // special mode: the store is an argument, not performed
            arg_a_n[argn] = '{node: cur.node, waddr: cur.waddr};
            arg_d_n[argn] = cur.wdata;
            argn_n        = 1'b1;
          end else if (cur.is_local) begin
            if (cur.we) begin
              mc_host_valid = 1'b1; mc_host_op = 2'd2;   // read the page mode
              mc_host_idx   = MCIDX_W'(cur_page);
              st_n = S_H_PMODE;
            end else begin
              mem_en = 1'b1; mem_addr = cur.waddr;
              st_n = S_H_LRD;
            end
          end else begin
            st_n = S_H_PC;
          end
        end
      end
      // ------------------------------------------------------------------
      S_PKT_RD: begin
        at_old = mem_rdata;
        unique case (pkt_q.ptype)
          PK_RD_REQ: opkt_n = mk(PK_RD_RESP, pkt_q.src, pkt_q.addr, mem_rdata);
          PK_AT_REQ: begin
            if (at_write) begin
              mem_en = 1'b1; mem_we = 1'b1; mem_addr = pkt_q.addr; mem_wdata = at_new;
            end
            opkt_n = mk(PK_AT_RESP, pkt_q.src, pkt_q.addr, mem_rdata);
          end
          default:   opkt_n = mk(PK_CP_RESP, pkt_q.src, pkt_q.addr2, mem_rdata);
        endcase
        st_n = S_SEND;
      end
      // ------------------------------------------------------------------
      S_SEND: begin
        out_valid = 1'b1;
        if (out_ready) st_n = S_IDLE;
        // acknowledgements need no reply: take them while waiting, so
        // that two boards blocked on each other's full FIFOs drain
        in_ready = in_valid && in_pkt.ptype == PK_ACK;
        os_dec   = in_ready;
      end
      // ------------------------------------------------------------------
      S_MC: begin
        out_pkt       = mk(mc_is_copy ? PK_FWD : PK_UPDATE, mc_dst_node,
                           {mc_dst_page, mc_off}, mc_data);
        out_pkt.orig  = mc_orig;
        out_valid     = mc_dst_valid;
        mc_dst_ready  = out_ready;
        if (mc_ack && mc_is_copy) begin
          // a remote write into a copy is kept local: not sent to the owner
          out_valid    = 1'b0;
          mc_dst_ready = 1'b1;
        end
        os_inc        = out_valid && out_ready;
        in_ready      = in_valid && in_pkt.ptype == PK_ACK;
        os_dec        = in_ready;
        if (mc_walk_done) begin
          st_n     = mc_ack ? S_SEND : S_IDLE;
          mc_ack_n = 1'b0;
          if (mc_ack && !out_valid) begin
            // nothing sent in this cycle (empty list): the ACK goes now
            out_pkt   = opkt;
            out_valid = 1'b1;
            if (out_ready) st_n = S_IDLE;
          end
        end
      end
      // ------------------------------------------------------------------
      S_H_LRD: begin
        hrsp_valid = 1'b1; hrsp_data = mem_rdata;
        st_n = S_IDLE;
      end
      S_H_PMODE: begin
        if (mc_host_done) begin
          if (mc_host_rdata[0] && !cc_inc_ready) begin
            held_n = 1'b1;                   // counter cache full: retry later
            st_n   = S_IDLE;
          end else begin
            cc_inc_valid  = mc_host_rdata[0];
            mem_en = 1'b1; mem_we = 1'b1; mem_addr = hq.waddr; mem_wdata = hq.wdata;
            mc_walk_start = 1'b1;
            mc_walk_page  = hq.waddr[WADDR_W-1 -: LPAGE_W];
            mc_off_n  = hq.waddr[OFFS_W-1:0];
            mc_data_n = hq.wdata;
            mc_orig_n = my_node;
            st_n = S_MC;
          end
        end
      end
      S_H_PC: begin
        pc_req_valid  = 1'b1;
        pc_req_op     = 2'd0;
        pc_req_sel_wr = hq.we;
        pc_req_page   = {hq.node, hq.waddr[WADDR_W-1 -: LPAGE_W]};
        if (pc_req_ready) begin
          if (hq.we) begin
            opkt_n = mk(PK_WR, hq.node, hq.waddr, hq.wdata);
            os_inc = 1'b1;
          end else begin
            opkt_n      = mk(PK_RD_REQ, hq.node, hq.waddr, '0);
            wait_resp_n = 1'b1;
          end
          st_n = S_SEND;
        end
      end
      // ------------------------------------------------------------------
      S_REG_PC: begin
        pc_req_valid  = 1'b1;
        pc_req_op     = hq.we ? 2'd2 : 2'd1;
        pc_req_sel_wr = pcsel[16];
        pc_req_page   = pcsel[15:0];
        pc_req_wdata  = hq.wdata[PCNT_W-1:0];
        if (pc_req_ready) st_n = hq.we ? S_IDLE : S_REG_PC_RSP;
      end
      S_REG_PC_RSP: begin
        if (pc_rsp_valid) begin
          hrsp_valid = 1'b1; hrsp_data = 32'(pc_rsp_data);
          st_n = S_IDLE;
        end
      end
      S_REG_MC: begin
        if (mc_host_done) begin
          hrsp_valid = !hq.we; hrsp_data = mc_host_rdata;
          st_n = S_IDLE;
        end
      end
      // ------------------------------------------------------------------
      S_LAUNCH: begin
        special_n = 1'b0;
        if (arg_a[0].node == my_node) begin
          mem_en = 1'b1; mem_addr = arg_a[0].waddr;
          st_n = S_LAUNCH_RD;
        end else if (sop == SOP_RCOPY) begin
          opkt_n       = mk(PK_CP_REQ, arg_a[0].node, arg_a[0].waddr, '0);
          opkt_n.addr2 = arg_a[1].waddr;
          os_inc       = 1'b1;
          hrsp_valid   = 1'b1;               // non-blocking
          st_n = S_SEND;
        end else begin
          opkt_n       = mk(PK_AT_REQ, arg_a[0].node, arg_a[0].waddr, arg_d[0]);
          opkt_n.sop   = sop;
          opkt_n.data2 = arg_d[1];
          wait_resp_n  = 1'b1;
          st_n = S_SEND;
        end
      end
      S_LAUNCH_RD: begin
        at_op = sop; at_old = mem_rdata; at_arg = arg_d[0]; at_arg2 = arg_d[1];
        hrsp_valid = 1'b1;
        if (sop == SOP_RCOPY) begin
          mem_en = 1'b1; mem_we = 1'b1; mem_addr = arg_a[1].waddr; mem_wdata = mem_rdata;
        end else begin
          hrsp_data = mem_rdata;
          if (at_write) begin
            mem_en = 1'b1; mem_we = 1'b1; mem_addr = arg_a[0].waddr; mem_wdata = at_new;
          end
        end
        st_n = S_IDLE;
      end
      default: st_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pkt_q <= '0; opkt <= '0; hq <= '0; held <= 1'b0;
      wait_resp <= 1'b0; wait_fence <= 1'b0;
      special <= 1'b0; sop <= SOP_FETCH_STORE; argn <= 1'b0;
      arg_a[0] <= '0; arg_a[1] <= '0; arg_d[0] <= '0; arg_d[1] <= '0;
      pcsel <= '0; mcsel <= '0; mc_off <= '0; mc_data <= '0; mc_orig <= '0; mc_ack <= 1'b0;
    end else begin
      st <= st_n; pkt_q <= pkt_n; opkt <= opkt_n; hq <= hq_n; held <= held_n;
      wait_resp <= wait_resp_n; wait_fence <= wait_fence_n;
      special <= special_n; sop <= sop_n; argn <= argn_n;
      arg_a[0] <= arg_a_n[0]; arg_a[1] <= arg_a_n[1];
      arg_d[0] <= arg_d_n[0]; arg_d[1] <= arg_d_n[1];
      pcsel <= pcsel_n; mcsel <= mcsel_n;
      mc_off <= mc_off_n; mc_data <= mc_data_n; mc_orig <= mc_orig_n; mc_ack <= mc_ack_n;
    end
  end

  // The processor has at most one load outstanding.
  assert property (@(posedge clk) disable iff (!rst_n) !(wait_resp && wait_fence));
endmodule
