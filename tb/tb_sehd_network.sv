// tb_sehd_network: a (2,2,3) SEHD CC-banyan network (16 processors, levels
// 0..3) end to end. First lone packets must cross in 2g+2 cycles, g being
// the lowest level that can reflect them (one cycle into the processor queue,
// g ULISTs, then g DLISTs, the reflecting switch storing nothing, one into
// the receive queue), for every g. Then every processor
// sends random traffic, uniform and then
// hot-spot, while some receivers stall; each packet must arrive once, at its
// own processor (never its own sender: a half-duplex line cannot carry a
// packet up and back down in one cycle), with its payload intact, and the
// network must drain
// completely (no deadlock). Reflection at every level, conflicts, blocked
// packets, full processor queues, the queue unit's reserve slot holding off
// a packet and a half-duplex line turned away from a packet must all occur.
module tb_sehd_network;
  import tb_walk_pkg::*;
  import sfl_pkg::*;
  localparam int FL = 1, LL = 3, F = 2, W = 8, N = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic gen_valid [N], gen_ready [N], rcv_valid [N], rcv_ready [N];
  logic [ID_W-1:0] gen_dest [N];
  logic [DATA_W-1:0] gen_data [N];
  packet_t rcv_pkt [N];
  logic [LL:0] lv_conflict, lv_blocked, lv_reflect, lv_reserve, lv_line_busy;
  int n_res = 0, n_busy = 0;
  int checks = 0, failures = 0, cyc = 0;
  int sent = 0, rcvd = 0, n_full = 0;
  int n_conf [LL+1], n_blk [LL+1], n_refl [LL+1];
  int birth [logic [DATA_W-1:0]];
  logic [ID_W-1:0] dst_of [logic [DATA_W-1:0]];
  int seq = 0;

  sehd_network #(.F_LOG(FL), .L(LL), .DEPTH(DEPTH), .SCHEME(CR_RAND), .PQ_DEPTH(8), .MQ_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // receive side: check every packet read by a memory
  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < N; m++) if (rcv_valid[m] && rcv_ready[m]) begin
      logic [DATA_W-1:0] id;
      id = rcv_pkt[m].data;
      chk(birth.exists(id), "known packet");
      if (birth.exists(id)) begin
        chk(dst_of[id] == ID_W'(m) && rcv_pkt[m].dest == ID_W'(m), "right processor");
        birth.delete(id); dst_of.delete(id);
      end
      rcvd++;
    end
    for (int s = 0; s <= LL; s++) begin
      if (lv_conflict[s]) n_conf[s]++;
      if (lv_blocked[s]) n_blk[s]++;
      if (lv_reflect[s]) n_refl[s]++;
      if (lv_reserve[s]) n_res++;
      if (lv_line_busy[s]) n_busy++;
    end
  end

  task automatic idle_all();
    for (int p = 0; p < N; p++) begin gen_valid[p] = 0; gen_dest[p] = '0; gen_data[p] = '0; end
  endtask

  initial begin
    int t0;
    idle_all();
    for (int m = 0; m < N; m++) rcv_ready[m] = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    // lone packets, one per reflection level
    for (int k = 0; k < 12; k++) begin
      int src, dst, g;
      src = int'($urandom % N); dst = (src + 1 + int'($urandom % (N - 1))) % N;
      if (k <= LL) begin
        // pick a pair that reflects at level k
        do begin src = int'($urandom % N); dst = int'($urandom % N); end
        while (min_level(FL, LL, src, dst) != k || src == dst);
      end
      g = min_level(FL, LL, src, dst);
      @(negedge clk);
      gen_valid[src] = 1; gen_dest[src] = ID_W'(dst); gen_data[src] = 32'hA000_0000 + k;
      birth[32'hA000_0000 + k] = cyc; dst_of[32'hA000_0000 + k] = ID_W'(dst); sent++;
      @(negedge clk); t0 = cyc; idle_all();
      while (!rcv_valid[dst]) @(negedge clk);
      chk(cyc + 1 - t0 == 2 * g + 2, $sformatf("lone packet %0d->%0d level %0d latency %0d", src, dst, g, cyc + 1 - t0));
      repeat (3) @(negedge clk);
    end
    // random traffic
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      for (int m = 0; m < N; m++) rcv_ready[m] = (c % 1500 < 300 && m < 4) ? 1'b0 : 1'b1;
      for (int p = 0; p < N; p++) begin
        gen_valid[p] = ($urandom % 100) < 60;
        gen_dest[p]  = (c >= 3000 && ($urandom % 4) == 0) ? 8'd0 : 8'($urandom % N);
        // a processor does not send to itself over a half-duplex line
        if (int'(gen_dest[p]) == p) gen_dest[p] = 8'((p + 1) % N);
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
    for (int m = 0; m < N; m++) rcv_ready[m] = 1;
    repeat (4000) @(negedge clk);
    chk(birth.size() == 0, $sformatf("all delivered, %0d missing", birth.size()));
    chk(sent == rcvd, "sent == received");
    for (int s = 0; s <= LL; s++)
      chk(n_refl[s] > 0, $sformatf("level %0d reflect %0d", s, n_refl[s]));
    // the half-duplex network saturates near the base, so contention is
    // required somewhere rather than at every level
    chk(n_conf.sum() > 0 && n_blk.sum() > 0, "conflicts and blocking");
    chk(n_full > 0, "processor queue back-pressure");
    chk(n_res > 0 && n_busy > 0, $sformatf("reserve slot %0d, line busy %0d", n_res, n_busy));
    $display("sent=%0d received=%0d full=%0d", sent, rcvd, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
