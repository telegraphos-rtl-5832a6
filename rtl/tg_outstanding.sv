// Counter of outstanding remote operations.
//
// Counts the remote operations this node has launched that have not yet
// completed: remote writes until their acknowledgement, multicast updates
// until acknowledged, writes forwarded to a page owner until their
// reflection returns, and remote copies until the data are stored. The
// processor reads the count for completion detection, and a memory barrier
// (fence) waits for zero. inc and dec may be given in the same cycle.
// full is high at the largest count; central control must not then launch
// another operation. The width is this design's own choice.
module tg_outstanding #(
  parameter int unsigned W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  input  logic         dec,
  output logic [W-1:0] count,
  output logic         zero,
  output logic         full
);
  assign zero = (count == '0);
  assign full = (count == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else if (inc && !dec) count <= count + 1'b1;
    else if (dec && !inc) count <= count - 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) dec && !inc |-> !zero)
    else $error("tg_outstanding: completion with nothing outstanding");
  assert property (@(posedge clk) disable iff (!rst_n) inc && !dec |-> !full)
    else $error("tg_outstanding: overflow");
endmodule
