// Self-checking test of tg_link_in: random packets from the link, some
// addressed to another node, with random back-pressure from central
// control. Packets for this node must come out once and in order,
// misaddressed ones must be dropped and counted, and with central control
// not reading exactly 16 packets (2 Kbit) must be taken before link_ready
// falls.
module tb_tg_link_in;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0, link_valid = 0, link_ready, out_valid, out_ready = 0;
  packet_t link_pkt = '0, out_pkt; logic [15:0] misrouted; logic [4:0] level;
  node_t my_node = 5'd6;
  packet_t q[$];
  int checks = 0, failures = 0, dropped = 0;
  always #5 clk = ~clk;

  tg_link_in dut (.clk, .rst_n, .my_node, .link_valid, .link_ready, .link_pkt, .out_valid, .out_ready, .out_pkt, .misrouted, .level);

  function automatic packet_t rnd(bit ours);
    packet_t p; p = {$urandom, $urandom, $urandom, $urandom, 1'($urandom)};
    if (ours) p.dst = my_node; else if (p.dst == my_node) p.dst = my_node + 1'b1;
    return p;
  endfunction

  initial begin
    int accepted;
    repeat (2) @(negedge clk); rst_n = 1;
    accepted = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); link_pkt = rnd(1); link_valid = 1; #1;
      if (link_ready) begin accepted++; q.push_back(link_pkt); end
    end
    @(negedge clk); link_valid = 0;
    checks++; if (accepted != 16) begin failures++; $display("FAIL capacity %0d", accepted); end
    fork
      begin
        for (int i = 0; i < 2000; i++) begin
          bit ours; ours = ($urandom_range(0, 4) != 0);
          @(negedge clk); link_valid = ($urandom_range(0, 2) != 0); link_pkt = rnd(ours); #1;
          if (link_valid && link_ready) begin
            if (ours) q.push_back(link_pkt); else dropped++;
          end
        end
        @(negedge clk); link_valid = 0;
      end
      begin
        for (int i = 0; i < 2600; i++) begin
          @(negedge clk); out_ready = ($urandom_range(0, 3) != 0); #1;
          if (out_valid && out_ready) begin
            checks++;
            if (out_pkt != q.pop_front()) begin failures++; $display("FAIL packet order"); end
          end
        end
      end
    join
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d left", q.size()); end
    checks++; if (int'(misrouted) != dropped || dropped == 0) begin failures++; $display("FAIL misrouted %0d vs %0d", misrouted, dropped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
