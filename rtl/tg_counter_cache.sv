// Cache of pending-write counters for counter-based update coherence.
//
// A node that writes its local copy of a page owned elsewhere must ignore
// every update to that word arriving from the network until the owner has
// reflected its own write back. The count of such pending writes is kept
// per word, but only non-zero counters are stored: this block is a small
// fully associative (content addressable) table of {word address, count}.
//   inc  : a local store to a copy. A hit increments the entry; a miss
//          allocates the lowest free entry with count 1. inc_ready is low
//          when there is no free entry (or the count is at its maximum):
//          the store must wait, and will proceed once a reflection frees
//          an entry.
//   dec  : the node's own write came back from the owner. The entry is
//          decremented; when it reaches zero it is freed. dec_miss flags a
//          reflection for which no counter exists (a protocol error).
//   lookup (combinational): lookup_nz is high when a counter exists for
//          lookup_addr, i.e. updates to it from other nodes are ignored.
// inc and dec are not given in the same cycle.
//
// The protocol, the freeing of a counter at zero, the stall on a full
// cache and a CAM organisation of 16-32 entries follow the design; 32
// entries, the 4-bit count and the lowest-free allocation are this
// design's own choices.
module tg_counter_cache
  import tg_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned CNT_W   = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   inc_valid,
  input  waddr_t inc_addr,
  output logic   inc_ready,
  input  logic   dec_valid,
  input  waddr_t dec_addr,
  output logic   dec_miss,
  input  waddr_t lookup_addr,
  output logic   lookup_nz,
  output logic [$clog2(ENTRIES):0] used,
  output logic   full
);
  typedef struct packed {
    logic             valid;
    waddr_t           addr;
    logic [CNT_W-1:0] cnt;
  } ent_t;

  ent_t tab [ENTRIES];

  logic                       inc_hit, dec_hit, have_free;
  logic [$clog2(ENTRIES)-1:0] inc_idx, dec_idx, free_idx;

  always_comb begin
    inc_hit = 1'b0; inc_idx = '0;
    dec_hit = 1'b0; dec_idx = '0;
    have_free = 1'b0; free_idx = '0;
    lookup_nz = 1'b0;
    used = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (tab[i].valid) begin
        used = used + 1'b1;
        if (tab[i].addr == inc_addr)    begin inc_hit = 1'b1; inc_idx = i[$clog2(ENTRIES)-1:0]; end
        if (tab[i].addr == dec_addr)    begin dec_hit = 1'b1; dec_idx = i[$clog2(ENTRIES)-1:0]; end
        if (tab[i].addr == lookup_addr) lookup_nz = 1'b1;
      end else begin
        have_free = 1'b1; free_idx = i[$clog2(ENTRIES)-1:0];
      end
    end
  end

  assign full      = !have_free;
  assign inc_ready = inc_hit ? (tab[inc_idx].cnt != '1) : have_free;
  assign dec_miss  = dec_valid && !dec_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (inc_valid && inc_ready) begin
      if (inc_hit) tab[inc_idx].cnt <= tab[inc_idx].cnt + 1'b1;
      else         tab[free_idx]    <= '{valid: 1'b1, addr: inc_addr, cnt: CNT_W'(1)};
    end else if (dec_valid && dec_hit) begin
      if (tab[dec_idx].cnt == CNT_W'(1)) tab[dec_idx].valid <= 1'b0;
      tab[dec_idx].cnt <= tab[dec_idx].cnt - 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(inc_valid && dec_valid))
    else $error("tg_counter_cache: inc and dec in the same cycle");
endmodule
