// Page access counters of the HIB.
//
// Two 16-bit counters for each of the 64K remote pages a node can map
// (page index = {node, page in node}): one for reads and one for writes.
// Each remote access by the local processor decrements the matching
// counter unless it is already zero; a decrement from one to zero raises
// an alarm, kept in irq_* until the processor clears it. The operating
// system loads large values and reads them back for statistics, or small
// values to be told when a page becomes hot.
//
// One request port serves three operations, each a read-modify-write of a
// synchronous SRAM taking two cycles (req_ready is high only when idle):
//   OP_ACCESS : decrement the counter (sel_wr picks the write counter)
//   OP_READ   : return the counter on rsp_data with rsp_valid
//   OP_WRITE  : load the counter with wdata
// While an alarm is pending a second one is not recorded (irq_lost is set).
// The counter sizes and the alarm rule follow the design; the request
// port, the alarm register and irq_lost are this design's own choices.
module tg_page_counters
  import tg_pkg::*;
#(
  parameter int unsigned PAGES_LOG2 = GPAGE_W   // 16: 64K pages
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid,
  output logic                req_ready,
  input  logic [1:0]          req_op,      // 0 access, 1 read, 2 write
  input  logic                req_sel_wr,  // 1: write counter, 0: read counter
  input  logic [GPAGE_W-1:0]  req_page,
  input  logic [PCNT_W-1:0]   req_wdata,
  output logic                rsp_valid,
  output logic [PCNT_W-1:0]   rsp_data,
  output logic                irq,
  output logic                irq_sel_wr,
  output logic [GPAGE_W-1:0]  irq_page,
  output logic                irq_lost,
  input  logic                irq_clear
);
  localparam logic [1:0] OP_ACCESS = 2'd0, OP_READ = 2'd1, OP_WRITE = 2'd2;

  logic [PCNT_W-1:0] rd_cnt [2**PAGES_LOG2];
  logic [PCNT_W-1:0] wr_cnt [2**PAGES_LOG2];

  logic                   busy;
  logic [1:0]             op_q;
  logic                   sel_q;
  logic [GPAGE_W-1:0]     page_q;
  logic [PCNT_W-1:0]      rd_q, wr_q, cur;
  wire  [PAGES_LOG2-1:0]  idx   = req_page[PAGES_LOG2-1:0];
  wire  [PAGES_LOG2-1:0]  idx_q = page_q[PAGES_LOG2-1:0];

  assign req_ready = !busy;
  assign cur       = sel_q ? wr_q : rd_q;

  // Cycle 1: read both counters of the page (or write one).
  always_ff @(posedge clk) begin
    if (req_valid && req_ready) begin
      if (req_op == OP_WRITE) begin
        if (req_sel_wr) wr_cnt[idx] <= req_wdata;
        else            rd_cnt[idx] <= req_wdata;
      end else begin
        rd_q <= rd_cnt[idx];
        wr_q <= wr_cnt[idx];
      end
    end else if (busy && op_q == OP_ACCESS && cur != '0) begin
      // Cycle 2: write back the decremented counter.
      if (sel_q) wr_cnt[idx_q] <= cur - 1'b1;
      else       rd_cnt[idx_q] <= cur - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; op_q <= OP_ACCESS; sel_q <= 1'b0; page_q <= '0;
      rsp_valid <= 1'b0; rsp_data <= '0;
      irq <= 1'b0; irq_sel_wr <= 1'b0; irq_page <= '0; irq_lost <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      if (irq_clear) begin
        irq <= 1'b0; irq_lost <= 1'b0;
      end
      if (req_valid && req_ready) begin
        busy   <= (req_op != OP_WRITE);
        op_q   <= req_op;
        sel_q  <= req_sel_wr;
        page_q <= req_page;
      end else if (busy) begin
        busy <= 1'b0;
        if (op_q == OP_READ) begin
          rsp_valid <= 1'b1;
          rsp_data  <= cur;
        end else if (op_q == OP_ACCESS && cur == PCNT_W'(1)) begin
          if (irq && !irq_clear) irq_lost <= 1'b1;
          else begin
            irq <= 1'b1; irq_sel_wr <= sel_q; irq_page <= page_q;
          end
        end
      end
    end
  end
endmodule
