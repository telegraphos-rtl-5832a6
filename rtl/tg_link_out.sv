// Outgoing link interface of the HIB.
//
// Buffers the packets that central control produces in a 2 Kbit FIFO
// (16 packets of 129 bits) and hands them to the network link. The link is
// back-pressured: a packet leaves only in a cycle where link_ready is high,
// so a busy switch stalls the FIFO and, once it is full, central control.
// The sending node's number is written into every packet on entry.
//
// The 2 Kbit buffer size is the HIB's published figure; the packet-wide
// valid/ready link, instead of the narrow cable protocol of the real
// board, is this design's own choice.
module tg_link_out
  import tg_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  node_t   my_node,
  // from central control
  input  logic    in_valid,
  output logic    in_ready,
  input  packet_t in_pkt,
  // to the network
  output logic    link_valid,
  input  logic    link_ready,
  output packet_t link_pkt,
  output logic [$clog2(DEPTH):0] level
);
  packet_t stamped;

  always_comb begin
    stamped     = in_pkt;
    stamped.src = my_node;
  end

  tg_fifo #(.WIDTH($bits(packet_t)), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (in_valid),   .in_ready (in_ready),  .in_data (stamped),
    .out_valid(link_valid), .out_ready(link_ready), .out_data(link_pkt),
    .level    (level)
  );

  // A packet offered to the link stays unchanged until it is taken.
  property p_link_stable;
    @(posedge clk) disable iff (!rst_n)
      link_valid && !link_ready |=> link_valid && $stable(link_pkt);
  endproperty
  assert property (p_link_stable);
endmodule
