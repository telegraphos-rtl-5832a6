// Self-checking test of tg_tc_if. A host model issues random loads and
// stores to shared space at this node, at other nodes and to registers;
// a central-control model takes requests after random delays and answers
// loads after further delays. Checked: the decoded fields of every
// request, stores acknowledged exactly one cycle after they are latched
// (whether or not central control has taken them), loads acknowledged only with their
// data, and no request lost, duplicated or reordered.
module tb_tg_tc_if;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tc_valid = 0, tc_we = 0, tc_ack; word_t tc_addr = '0, tc_wdata = '0, tc_rdata;
  logic req_valid, req_ready = 0, rsp_valid = 0; host_req_t req; word_t rsp_data = '0;
  node_t my_node = 5'd3;
  typedef struct { logic we; word_t addr; word_t wdata; } hreq_t;
  hreq_t q[$];
  int checks = 0, failures = 0, nreq = 0;
  always #5 clk = ~clk;

  tg_tc_if dut (.clk, .rst_n, .my_node, .tc_valid, .tc_we, .tc_addr, .tc_wdata, .tc_ack, .tc_rdata,
    .req_valid, .req_ready, .req, .rsp_valid, .rsp_data);

  task automatic check(string what, logic ok);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    fork
      // host
      for (int i = 0; i < 400; i++) begin
        int cyc, kind; word_t a;
        a = $urandom; kind = $urandom_range(0, 2);
        unique case (kind)
          0: a = {1'b0, 2'b0, my_node, a[23:2], 2'b0};
          1: a = {1'b0, 2'b0, 5'($urandom_range(0, 31)), a[23:2], 2'b0};
          default: a = {1'b1, 23'd0, 6'($urandom_range(0, 10)), 2'b0};
        endcase
        @(negedge clk);
        tc_valid = 1; tc_we = $urandom_range(0, 1); tc_addr = a; tc_wdata = $urandom;
        q.push_back('{tc_we, tc_addr, tc_wdata});
        cyc = 0;
        do begin @(posedge clk); #1; cyc++; end while (!tc_ack && cyc < 200);
        check("acknowledged", tc_ack);
        if (!tc_we) check("load data", tc_rdata == ~tc_addr);
        tc_valid = 0;
      end
      // central control
      forever begin
        @(negedge clk);
        req_ready = ($urandom_range(0, 3) == 0);
        #1;
        if (req_valid && req_ready) begin
          hreq_t e; e = q.pop_front(); nreq++;
          check("we", req.we == e.we);
          check("is_reg", req.is_reg == e.addr[31]);
          check("node", req.node == e.addr[28:24]);
          check("is_local", req.is_local == (e.addr[28:24] == my_node));
          check("waddr", req.waddr == e.addr[23:2]);
          if (e.addr[31]) check("regidx", req.regidx == reg_e'(e.addr[7:2]));
          if (e.we) check("wdata", req.wdata == e.wdata);
          if (!e.we) begin
            @(negedge clk); req_ready = 0;
            repeat ($urandom_range(1, 6)) begin @(negedge clk); check("load held", !tc_ack); end
            rsp_valid = 1; rsp_data = ~e.addr;
            @(negedge clk); rsp_valid = 0;
          end
        end
      end
    join_any
    check("all requests delivered", nreq == 400 || nreq == 399);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // stores: ack must come one cycle after latching
  always @(posedge clk) if (rst_n && tc_valid && tc_we && !tc_ack && !req_valid && !dut.rd_wait) begin
    #1; checks++; if (!tc_ack) begin failures++; $display("FAIL store ack latency at %0t", $time); end
  end
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
