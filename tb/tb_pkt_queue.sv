// tb_pkt_queue: random pushes and pops against a reference FIFO. Checks the
// front packet, the count, that the queue refuses a packet only when full and
// not sending, and that it accepts one packet while sending one when full.
module tb_pkt_queue;
  import sfl_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push, pop, head_valid, can_accept;
  packet_t push_pkt, head_pkt;
  logic [$clog2(DEPTH+1)-1:0] count;
  packet_t model[$];
  int checks = 0, failures = 0, full_swaps = 0;

  pkt_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    push = 0; pop = 0; push_pkt = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      pop  = (model.size() > 0) && ($urandom % 100 < (cyc % 2000 < 1000 ? 30 : 70));
      push_pkt = packet_t'({$urandom, $urandom, $urandom});
      #1;
      chk(32'(count) == model.size(), "count");
      chk(head_valid == (model.size() > 0), "head_valid");
      if (model.size() > 0) chk(head_pkt == model[0], "head packet");
      chk(can_accept == (model.size() < DEPTH || pop), "vacancy");
      push = can_accept && ($urandom % 100 < 50);
      if (push && pop && model.size() == DEPTH) full_swaps++;
      @(posedge clk); #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_pkt);
      push = 0;
    end
    chk(full_swaps > 0, "accepted while full and sending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
