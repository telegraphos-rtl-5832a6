// Host I/O bus (TurboChannel) interface of the HIB.
//
// The host processor reaches shared memory, remote memory and the HIB
// registers through uncached loads and stores on its I/O bus. This block
// latches one bus request at a time into a request register, decodes its
// address (register space, context registers and keys, shadow space, or
// shared space at this or another node) and
// offers it to central control on req_* (valid/ready).
//   store: acknowledged (tc_ack) in the cycle after it is latched, so the
//          processor is released at once; the store itself is carried out
//          later. A further request waits until the register is free.
//   load : held until central control returns the data on rsp_valid /
//          rsp_data (at the earliest in the cycle it takes the request);
//          tc_ack then pulses with tc_rdata. The processor is
//          stalled all that time, as a remote read must be.
// Bus protocol (simplified): the host holds tc_valid and the request
// stable until it sees tc_ack high at a clock edge, and may present the
// next request from that edge on.
//
// Releasing stores on latching and blocking loads follow the design; the
// req/ack bus abstraction of the real TurboChannel cycle and the address
// map (see tg_pkg) are this design's own choices.
module tg_tc_if
  import tg_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  node_t     my_node,
  // host bus
  input  logic      tc_valid,
  input  logic      tc_we,
  input  word_t     tc_addr,
  input  word_t     tc_wdata,
  output logic      tc_ack,
  output word_t     tc_rdata,
  // to central control
  output logic      req_valid,
  input  logic      req_ready,
  output host_req_t req,
  input  logic      rsp_valid,
  input  word_t     rsp_data
);
  logic      rd_wait;
  host_req_t dec;

  always_comb begin
    dec.we       = tc_we;
    dec.is_reg   = tc_addr[A_REGSPACE];
    dec.is_shadow = !tc_addr[A_REGSPACE] && tc_addr[A_SHADOW];
    dec.is_ctx   = tc_addr[A_REGSPACE] && tc_addr[A_CTXSPACE];
    dec.is_key   = tc_addr[A_REGSPACE] && tc_addr[A_CTXSPACE] && tc_addr[A_KEYSPACE];
    dec.ctx      = tc_addr[8 +: CTX_W];
    dec.cfield   = tc_addr[3:2];
    dec.node     = tc_addr[A_NODE_LSB +: NODE_W];
    dec.is_local = (dec.node == my_node);
    dec.waddr    = tc_addr[2 +: WADDR_W];
    dec.regidx   = reg_e'(tc_addr[7:2]);
    dec.wdata    = tc_wdata;
  end

  wire accept = tc_valid && !tc_ack && !req_valid && !rd_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_valid <= 1'b0;
      req       <= '0;
      rd_wait   <= 1'b0;
      tc_ack    <= 1'b0;
      tc_rdata  <= '0;
    end else begin
      tc_ack <= 1'b0;
      if (accept) begin
        req_valid <= 1'b1;
        req       <= dec;
        tc_ack    <= tc_we;
      end
      if (req_valid && req_ready) begin
        req_valid <= 1'b0;
        rd_wait   <= !req.we && !rsp_valid;   // data may come in the same cycle
      end
      if (rsp_valid) begin
        rd_wait  <= 1'b0;
        tc_ack   <= 1'b1;
        tc_rdata <= rsp_data;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> rd_wait || (req_valid && req_ready && !req.we))
    else $error("tg_tc_if: read data with no read waiting");
endmodule
