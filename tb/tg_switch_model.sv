// Behavioural model of a Telegraphos switch for testbenches (not
// synthesizable design: the switch itself is outside this design).
// N ports, each a whole-packet link with valid/ready back-pressure.
// Every cycle, each destination port takes at most one packet, from the
// lowest-numbered source offering one addressed to it; packets between a
// given source and destination therefore stay in order. hold[d] blocks all
// delivery to port d, so that a test can delay traffic on purpose.
module tg_switch_model
  import tg_pkg::*;
#(
  parameter int N = 3
) (
  input  logic    src_valid [N],
  output logic    src_ready [N],
  input  packet_t src_pkt   [N],
  output logic    dst_valid [N],
  input  logic    dst_ready [N],
  output packet_t dst_pkt   [N],
  input  logic    hold      [N]
);
  always_comb begin
    for (int s = 0; s < N; s++) src_ready[s] = 1'b0;
    for (int d = 0; d < N; d++) begin
      dst_valid[d] = 1'b0;
      dst_pkt[d]   = '0;
      for (int s = N-1; s >= 0; s--) begin
        if (src_valid[s] && int'(src_pkt[s].dst) == d && !hold[d]) begin
          dst_valid[d] = 1'b1;
          dst_pkt[d]   = src_pkt[s];
        end
      end
      for (int s = 0; s < N; s++) begin
        if (src_valid[s] && int'(src_pkt[s].dst) == d && !hold[d]) begin
          src_ready[s] = dst_ready[d];
          break;
        end
      end
    end
  end
endmodule
