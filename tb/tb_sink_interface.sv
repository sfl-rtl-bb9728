// tb_sink_interface: the memory-side interface must grant a request exactly
// when its queue has room (counting the packet the memory takes in the same
// cycle), report the same room on net_room whether or not a request is
// present, and deliver the packets in order. Requests, packets and the
// memory's ready are random; a queue model written here gives the expected
// outputs. Runs 6000 cycles, watchdog at 20000.
module tb_sink_interface;
  import sfl_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic net_req, net_gnt, net_room, mem_valid, mem_ready;
  packet_t net_pkt, mem_pkt;
  packet_t model[$];
  int checks = 0, failures = 0;

  sink_interface #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    bit take, gnt;
    net_req = 0; mem_ready = 0; net_pkt = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      net_req = ($urandom % 2) == 0;
      net_pkt = packet_t'({$urandom, $urandom, $urandom});
      mem_ready = (cyc % 1000 < 500) ? (($urandom % 4) == 0) : 1'b1;
      #1;
      take = mem_valid && mem_ready;
      chk(mem_valid == (model.size() > 0), "valid");
      if (take) chk(mem_pkt == model[0], "order");
      gnt = net_gnt;
      chk(net_gnt == (net_req && (model.size() < DEPTH || take)), "grant rule");
      chk(net_room == (model.size() < DEPTH || take), "room report");
      @(posedge clk); #1;
      if (take) void'(model.pop_front());
      if (gnt) model.push_back(net_pkt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
