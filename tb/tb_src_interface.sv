// tb_src_interface: checks the processor-side interface. Packets entered by
// the processor must appear in order at the network side, be held until the
// grant, and carry a header that leads (by the hop-by-hop wiring model in
// tb_walk_pkg) from this port to the requested destination, reflecting at
// the lowest possible level. Back-pressure is checked with a full queue.
module tb_src_interface;
  import sfl_pkg::*;
  import tb_walk_pkg::*;

  localparam int FL = 1, LL = 7, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [ID_W-1:0] port_id;
  logic gen_valid, gen_ready, net_req, net_gnt;
  logic [ID_W-1:0] gen_dest;
  logic [DATA_W-1:0] gen_data;
  packet_t net_pkt;
  int checks = 0, failures = 0;
  logic [ID_W-1:0] expq[$];
  logic [DATA_W-1:0] expd[$];

  src_interface #(.DEPTH(DEPTH), .F_LOG(FL), .L(LL), .SINGLE_ENDED(1'b1)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    int hops, got;
    port_id = 8'd37; gen_valid = 0; gen_dest = '0; gen_data = '0; net_gnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill the queue without grants: gen_ready must fall after DEPTH packets
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      chk(gen_ready, "ready while not full");
      gen_valid = 1; gen_dest = 8'($urandom); gen_data = 32'($urandom);
      expq.push_back(gen_dest); expd.push_back(gen_data);
    end
    @(negedge clk); gen_valid = 0;
    chk(!gen_ready, "not ready when full");
    chk(net_req, "request while packets queued");
    // phases of random traffic and random grants, each from another port
    for (int ph = 0; ph < 8; ph++) begin
      for (int cyc = 0; cyc < 400; cyc++) begin
        @(negedge clk);
        net_gnt = ($urandom % 2) == 0;
        gen_valid = (cyc < 380) && (($urandom % 3) != 0);
        gen_dest = 8'($urandom); gen_data = 32'($urandom);
        #1;
        if (net_req && net_gnt) begin
          chk(expq.size() > 0, "no spurious packet");
          chk(net_pkt.dest == expq[0] && net_pkt.data == expd[0] && net_pkt.src == port_id, "order/content");
          got = walk_se(FL, LL, net_pkt, hops);
          chk(got == int'(net_pkt.dest), "header leads to destination");
          chk(int'(net_pkt.gdist) == min_level(FL, LL, int'(port_id), int'(net_pkt.dest)),
              "minimum reflection level");
          void'(expq.pop_front()); void'(expd.pop_front());
        end
        if (gen_valid && gen_ready) begin expq.push_back(gen_dest); expd.push_back(gen_data); end
      end
      @(negedge clk); net_gnt = 1; gen_valid = 0; #1;
      while (net_req) begin
        chk(expq.size() > 0 && net_pkt.dest == expq[0], "drain order");
        void'(expq.pop_front()); void'(expd.pop_front());
        @(negedge clk); #1;
      end
      chk(expq.size() == 0, "all packets delivered");
      net_gnt = 0;
      port_id = 8'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
