// Incoming link interface of the HIB.
//
// Accepts packets from the network link into a 2 Kbit FIFO (16 packets of
// 129 bits) and presents them to central control. When the FIFO is full
// link_ready goes low, which back-pressures the switch. A packet whose
// destination field is not this node is dropped on entry and counted in
// misrouted, so that it can never be served as if it were addressed here.
//
// The 2 Kbit buffer size is the HIB's published figure; the destination
// check and its counter are this design's own choice.
module tg_link_in
  import tg_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  node_t   my_node,
  // from the network
  input  logic    link_valid,
  output logic    link_ready,
  input  packet_t link_pkt,
  // to central control
  output logic    out_valid,
  input  logic    out_ready,
  output packet_t out_pkt,
  output logic [15:0] misrouted,
  output logic [$clog2(DEPTH):0] level
);
  logic fifo_ready;
  wire  for_us = (link_pkt.dst == my_node);

  // A misrouted packet is consumed (and dropped) even if the FIFO is full.
  assign link_ready = fifo_ready || !for_us;

  tg_fifo #(.WIDTH($bits(packet_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (link_valid && for_us), .in_ready (fifo_ready), .in_data (link_pkt),
    .out_valid(out_valid),            .out_ready(out_ready),  .out_data(out_pkt),
    .level    (level)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           misrouted <= '0;
    else if (link_valid && !for_us && misrouted != '1) misrouted <= misrouted + 1'b1;
  end
endmodule
