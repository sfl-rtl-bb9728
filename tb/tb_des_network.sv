// tb_des_network: a (2,2,3) DES CC-banyan network (16 processors, 4 stages)
// end to end. First a lone packet must cross in L+3 cycles (one cycle into
// the processor queue, one per switch stage, one into the memory
// queue). Then every processor sends random traffic, uniform and then
// hot-spot, while some memories stall; each packet must arrive once, at its
// own memory, with its payload intact. Contention (queue conflicts, blocked
// packets at every stage, full processor queues) must occur.
module tb_des_network;
  import sfl_pkg::*;
  localparam int FL = 1, LL = 3, F = 2, W = 8, N = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic gen_valid [N], gen_ready [N], mem_valid [N], mem_ready [N];
  logic [ID_W-1:0] gen_dest [N];
  logic [DATA_W-1:0] gen_data [N];
  packet_t mem_pkt [N];
  logic [LL:0] st_conflict, st_blocked;
  int checks = 0, failures = 0, cyc = 0;
  int sent = 0, rcvd = 0, n_full = 0;
  int n_conf [LL+1], n_blk [LL+1];
  int birth [logic [DATA_W-1:0]];
  logic [ID_W-1:0] dst_of [logic [DATA_W-1:0]];
  int seq = 0;

  des_network #(.F_LOG(FL), .L(LL), .DEPTH(DEPTH), .SCHEME(CR_RAND), .PQ_DEPTH(8), .MQ_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // receive side: check every packet read by a memory
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < N; m++) if (mem_valid[m] && mem_ready[m]) begin
      logic [DATA_W-1:0] id;
      id = mem_pkt[m].data;
      chk(birth.exists(id), "known packet");
      if (birth.exists(id)) begin
        chk(dst_of[id] == ID_W'(m) && mem_pkt[m].dest == ID_W'(m), "right memory");
        birth.delete(id); dst_of.delete(id);
      end
      rcvd++;
    end
    for (int s = 0; s <= LL; s++) begin
      if (st_conflict[s]) n_conf[s]++;
      if (st_blocked[s]) n_blk[s]++;
    end
  end

  task automatic idle_all();
    for (int p = 0; p < N; p++) begin gen_valid[p] = 0; gen_dest[p] = '0; gen_data[p] = '0; end
  endtask

  initial begin
    int t0;
    idle_all();
    for (int m = 0; m < N; m++) mem_ready[m] = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    // lone packet latency
    @(negedge clk);
    gen_valid[5] = 1; gen_dest[5] = 8'd12; gen_data[5] = 32'hA000_0000;
    birth[32'hA000_0000] = cyc; dst_of[32'hA000_0000] = 8'd12; sent++;
    @(negedge clk); t0 = cyc; idle_all();
    while (!mem_valid[12]) @(negedge clk);
    chk(cyc + 1 - t0 == LL + 3, $sformatf("lone packet latency %0d", cyc + 1 - t0));
    repeat (3) @(negedge clk);
    // random traffic
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      for (int m = 0; m < N; m++) mem_ready[m] = (c % 1500 < 300 && m < 4) ? 1'b0 : 1'b1;
      for (int p = 0; p < N; p++) begin
        gen_valid[p] = ($urandom % 100) < 60;
        gen_dest[p]  = (c >= 3000 && ($urandom % 4) == 0) ? 8'd0 : 8'($urandom % N);
        gen_data[p]  = {8'(p), 24'(seq++)};
      end
      #1;
      for (int p = 0; p < N; p++) begin
        if (!gen_ready[p]) n_full++;
        if (gen_valid[p] && gen_ready[p]) begin
          birth[gen_data[p]] = cyc; dst_of[gen_data[p]] = gen_dest[p]; sent++;
        end
      end
    end
    @(negedge clk); idle_all();
    for (int m = 0; m < N; m++) mem_ready[m] = 1;
    repeat (2000) @(negedge clk);
    chk(birth.size() == 0, $sformatf("all delivered, %0d missing", birth.size()));
    chk(sent == rcvd, "sent == received");
    for (int s = 0; s <= LL; s++) chk(n_conf[s] > 0 && n_blk[s] > 0, $sformatf("stage %0d conflict %0d blocked %0d", s, n_conf[s], n_blk[s]));
    chk(n_full > 0, "processor queue back-pressure");
    $display("sent=%0d received=%0d full=%0d", sent, rcvd, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
