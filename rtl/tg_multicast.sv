// Multicast (eager update) directory of the HIB.
//
// Each local page can be mapped out to any number of pages at other nodes;
// every store to it is then sent to all of them. The destinations of a
// page are a linked list in a 16K x 32 bit list memory: entry number p
// (p < 2K) is the head of the list of local page p, and further entries
// are chained through their next field (mc_entry_t: valid, last, next,
// node, page). A one-bit page-mode table marks the local pages that are
// copies of a page owned by another node; for such a page the list holds a
// single entry, the owner's {node, page}, to which stores are forwarded.
//
// Walk: walk_start (only when !busy) reads the head of walk_page and its
// mode bit; from the next cycle the entries are offered one by one on
// dst_* with dst_valid, each taken with dst_ready. The list memory is read
// one cycle ahead, so one destination can be taken per cycle. walk_done
// pulses in the cycle the walk ends (after the last entry, or at once for
// an empty list). is_copy holds the page's mode bit during the walk.
// Host port (only when !busy): op 0 reads an entry, 1 writes one, 2 reads
// and 3 writes a page-mode bit; results appear with host_done one cycle
// later.
//
// The 16K x 32 bit list size and the mapping of a page to several remote
// pages follow the design; the list layout, the head-per-page convention
// and the page-mode table are this design's own choices.
module tg_multicast
  import tg_pkg::*;
#(
  parameter int unsigned ENTRIES_LOG2 = MCIDX_W   // 14: 16K entries
) (
  input  logic               clk,
  input  logic               rst_n,
  // walk
  input  logic               walk_start,
  input  logic [LPAGE_W-1:0] walk_page,
  output logic               busy,
  output logic               is_copy,
  output logic               dst_valid,
  input  logic               dst_ready,
  output node_t              dst_node,
  output logic [LPAGE_W-1:0] dst_page,
  output logic               walk_done,
  // host access
  input  logic               host_valid,
  input  logic [1:0]         host_op,
  input  logic [MCIDX_W-1:0] host_idx,
  input  word_t              host_wdata,
  output logic               host_done,
  output word_t              host_rdata
);
  mc_entry_t list [2**ENTRIES_LOG2];
  logic      pmode [2**LPAGE_W];

  mc_entry_t ent;
  logic      host_q;

  assign dst_valid = busy && ent.valid;
  assign dst_node  = ent.node;
  assign dst_page  = ent.page;
  assign walk_done = busy && (!ent.valid || (dst_ready && ent.last));
  assign host_done = host_q;

  wire [ENTRIES_LOG2-1:0] head_idx = ENTRIES_LOG2'(walk_page);
  wire [ENTRIES_LOG2-1:0] next_idx = ent.next[ENTRIES_LOG2-1:0];
  wire [ENTRIES_LOG2-1:0] h_idx    = host_idx[ENTRIES_LOG2-1:0];
  wire [LPAGE_W-1:0]      h_page   = host_idx[LPAGE_W-1:0];

  // List and mode memories: one read or write per cycle each.
  always_ff @(posedge clk) begin
    if (walk_start && !busy) begin
      ent     <= list[head_idx];
      is_copy <= pmode[walk_page];
    end else if (busy && ent.valid && dst_ready && !ent.last) begin
      ent <= list[next_idx];
    end else if (host_valid && !busy) begin
      unique case (host_op)
        2'd0: host_rdata <= list[h_idx];
        2'd1: list[h_idx] <= host_wdata;
        2'd2: host_rdata <= {31'd0, pmode[h_page]};
        default: pmode[h_page] <= host_wdata[0];
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      host_q <= 1'b0;
    end else begin
      host_q <= host_valid && !busy && !walk_start;
      if (walk_start && !busy) busy <= 1'b1;
      else if (walk_done)      busy <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(walk_start && host_valid))
    else $error("tg_multicast: walk and host access in the same cycle");
endmodule
