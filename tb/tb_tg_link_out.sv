// Self-checking test of tg_link_out: random packets pushed with random
// gaps, taken by the link with random back-pressure; every packet must come
// out once, in order, with the sender's node number stamped in. With the
// link blocked the interface must take exactly 16 packets (2 Kbit) and
// then refuse more.
module tb_tg_link_out;
  import tg_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, link_valid, link_ready = 0;
  packet_t in_pkt = '0, link_pkt; logic [4:0] level;
  node_t my_node = 5'd13;
  packet_t q[$];
  int checks = 0, failures = 0, sent = 0, got = 0;
  always #5 clk = ~clk;

  tg_link_out dut (.clk, .rst_n, .my_node, .in_valid, .in_ready, .in_pkt, .link_valid, .link_ready, .link_pkt, .level);

  function automatic packet_t rnd();
    packet_t p; p = {$urandom, $urandom, $urandom, $urandom, 1'($urandom)}; return p;
  endfunction

  initial begin
    int accepted;
    repeat (2) @(negedge clk); rst_n = 1;
    // capacity with the link blocked
    accepted = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); in_pkt = rnd(); in_valid = 1; #1;
      if (in_ready) begin accepted++; q.push_back(in_pkt); end
    end
    @(negedge clk); in_valid = 0;
    checks++; if (accepted != 16) begin failures++; $display("FAIL capacity %0d", accepted); end
    // random traffic
    fork
      begin
        for (int i = 0; i < 2000; i++) begin
          @(negedge clk);
          in_valid = ($urandom_range(0, 2) != 0); in_pkt = rnd(); #1;
          if (in_valid && in_ready) q.push_back(in_pkt);
        end
        @(negedge clk); in_valid = 0;
      end
      begin
        for (int i = 0; i < 2600; i++) begin
          @(negedge clk); link_ready = ($urandom_range(0, 3) != 0); #1;
          if (link_valid && link_ready) begin
            packet_t e; e = q.pop_front(); e.src = my_node;
            checks++; got++;
            if (link_pkt != e) begin failures++; $display("FAIL packet %0d", got); end
          end
        end
      end
    join
    checks++; if (q.size() != 0) begin failures++; $display("FAIL %0d packets left", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
