// tb_sfl_top: the whole design end to end at (2,2,3) (16 processors per
// network, buffer size 4). All three networks carry random traffic at the
// same time: uniform, then with a hot spot, then in bursts of 32 packets,
// while some receivers stall. Every packet must reach its own destination
// exactly once and every network must drain. The testbench counts how often
// each mechanism of the design happened and fails if one never did: queue
// conflicts, blocked packets, full processor queues, reflection at every
// level of both single-ended networks, the half-duplex queue unit's reserve
// slot and a half-duplex line busy in the other direction.
module tb_sfl_top;
  import sfl_pkg::*;
  localparam int LL = 3, N = 16;
  logic clk = 0, rst_n = 0;
  logic des_gen_valid [N], des_gen_ready [N], des_mem_valid [N], des_mem_ready [N];
  logic [ID_W-1:0] des_gen_dest [N];
  logic [DATA_W-1:0] des_gen_data [N];
  packet_t des_mem_pkt [N];
  logic [LL:0] des_st_conflict, des_st_blocked;
  logic sefd_gen_valid [N], sefd_gen_ready [N], sefd_rcv_valid [N], sefd_rcv_ready [N];
  logic [ID_W-1:0] sefd_gen_dest [N];
  logic [DATA_W-1:0] sefd_gen_data [N];
  packet_t sefd_rcv_pkt [N];
  logic [LL:0] sefd_lv_conflict, sefd_lv_blocked, sefd_lv_reflect;
  logic sehd_gen_valid [N], sehd_gen_ready [N], sehd_rcv_valid [N], sehd_rcv_ready [N];
  logic [ID_W-1:0] sehd_gen_dest [N];
  logic [DATA_W-1:0] sehd_gen_data [N];
  packet_t sehd_rcv_pkt [N];
  logic [LL:0] sehd_lv_conflict, sehd_lv_blocked, sehd_lv_reflect, sehd_lv_reserve, sehd_lv_line_busy;

  int checks = 0, failures = 0;
  // per network (0 DES, 1 SEFD, 2 SEHD): outstanding packets and counters
  logic [ID_W-1:0] pend [3][logic [DATA_W-1:0]];
  int sent [3], rcvd [3], n_full [3], n_conf [3], n_blk [3];
  int n_refl [3][LL+1];
  int n_res = 0, n_busy = 0;
  int seq = 0;

  sfl_top #(.L(LL), .DEPTH(4), .PQ_DEPTH(8), .MQ_DEPTH(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (60000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  task automatic take(int net, int port, packet_t p);
    chk(pend[net].exists(p.data), $sformatf("net %0d known packet", net));
    if (pend[net].exists(p.data)) begin
      chk(pend[net][p.data] == ID_W'(port) && p.dest == ID_W'(port), $sformatf("net %0d right port", net));
      pend[net].delete(p.data);
    end
    rcvd[net]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int m = 0; m < N; m++) begin
      if (des_mem_valid[m] && des_mem_ready[m])   take(0, m, des_mem_pkt[m]);
      if (sefd_rcv_valid[m] && sefd_rcv_ready[m]) take(1, m, sefd_rcv_pkt[m]);
      if (sehd_rcv_valid[m] && sehd_rcv_ready[m]) take(2, m, sehd_rcv_pkt[m]);
    end
    if (|des_st_conflict)  n_conf[0]++;
    if (|sefd_lv_conflict) n_conf[1]++;
    if (|sehd_lv_conflict) n_conf[2]++;
    if (|des_st_blocked)   n_blk[0]++;
    if (|sefd_lv_blocked)  n_blk[1]++;
    if (|sehd_lv_blocked)  n_blk[2]++;
    for (int k = 0; k <= LL; k++) begin
      if (sefd_lv_reflect[k]) n_refl[1][k]++;
      if (sehd_lv_reflect[k]) n_refl[2][k]++;
    end
    if (|sehd_lv_reserve) n_res++;
    if (|sehd_lv_line_busy) n_busy++;
  end

  task automatic idle_all();
    for (int p = 0; p < N; p++) begin
      des_gen_valid[p] = 0; sefd_gen_valid[p] = 0; sehd_gen_valid[p] = 0;
      des_gen_dest[p] = '0; sefd_gen_dest[p] = '0; sehd_gen_dest[p] = '0;
      des_gen_data[p] = '0; sefd_gen_data[p] = '0; sehd_gen_data[p] = '0;
    end
  endtask

  initial begin
    int burst_left [N];
    int burst_dest [N];
    idle_all();
    for (int m = 0; m < N; m++) begin
      des_mem_ready[m] = 1; sefd_rcv_ready[m] = 1; sehd_rcv_ready[m] = 1; burst_left[m] = 0; burst_dest[m] = 0;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < 9000; c++) begin
      @(negedge clk);
      for (int m = 0; m < N; m++) begin
        des_mem_ready[m]  = !(c % 1500 < 200 && m < 3);
        sefd_rcv_ready[m] = !(c % 1500 < 200 && m >= 13);
        sehd_rcv_ready[m] = !(c % 1500 < 200 && m >= 13);
      end
      for (int p = 0; p < N; p++) begin
        bit v;
        int d;
        if (c < 3000) begin            // uniform
          v = ($urandom % 100) < 50;
          d = int'($urandom % N);
        end else if (c < 6000) begin   // hot spot on port 0
          v = ($urandom % 100) < 40;
          d = (($urandom % 8) == 0) ? 0 : int'($urandom % N);
        end else begin                 // bursts of 32 packets to one destination
          if (burst_left[p] == 0 && ($urandom % 100) < 2) begin
            burst_left[p] = 32; burst_dest[p] = int'($urandom % N);
          end
          v = burst_left[p] > 0;
          d = burst_dest[p];
        end
        des_gen_valid[p] = v; sefd_gen_valid[p] = v; sehd_gen_valid[p] = v;
        des_gen_dest[p] = ID_W'(d); sefd_gen_dest[p] = ID_W'(d);
        sehd_gen_dest[p] = ID_W'(d == p ? (p + 1) % N : d);
        des_gen_data[p] = 32'(seq); sefd_gen_data[p] = 32'(seq); sehd_gen_data[p] = 32'(seq);
        seq++;
      end
      #1;
      for (int p = 0; p < N; p++) begin
        if (des_gen_valid[p] && des_gen_ready[p]) begin pend[0][des_gen_data[p]] = des_gen_dest[p]; sent[0]++; end
        if (sefd_gen_valid[p] && sefd_gen_ready[p]) begin pend[1][sefd_gen_data[p]] = sefd_gen_dest[p]; sent[1]++; end
        if (sehd_gen_valid[p] && sehd_gen_ready[p]) begin pend[2][sehd_gen_data[p]] = sehd_gen_dest[p]; sent[2]++; end
        if (!des_gen_ready[p]) n_full[0]++;
        if (!sefd_gen_ready[p]) n_full[1]++;
        if (!sehd_gen_ready[p]) n_full[2]++;
        // a burst advances only when the packet was taken
        if (c >= 6000 && burst_left[p] > 0 && sefd_gen_ready[p] && des_gen_ready[p] && sehd_gen_ready[p])
          burst_left[p]--;
      end
      // keep the three networks' sources in step: withdraw if any is full
      for (int p = 0; p < N; p++) if (c >= 6000 && !(sefd_gen_ready[p] && des_gen_ready[p] && sehd_gen_ready[p])) begin
        if (des_gen_valid[p] && des_gen_ready[p]) begin pend[0].delete(des_gen_data[p]); sent[0]--; end
        if (sefd_gen_valid[p] && sefd_gen_ready[p]) begin pend[1].delete(sefd_gen_data[p]); sent[1]--; end
        if (sehd_gen_valid[p] && sehd_gen_ready[p]) begin pend[2].delete(sehd_gen_data[p]); sent[2]--; end
        des_gen_valid[p] = 0; sefd_gen_valid[p] = 0; sehd_gen_valid[p] = 0;
      end
    end
    @(negedge clk); idle_all();
    for (int m = 0; m < N; m++) begin des_mem_ready[m] = 1; sefd_rcv_ready[m] = 1; sehd_rcv_ready[m] = 1; end
    repeat (5000) @(negedge clk);
    for (int n = 0; n < 3; n++) begin
      chk(pend[n].size() == 0 && sent[n] == rcvd[n], $sformatf("net %0d delivered all: sent %0d received %0d", n, sent[n], rcvd[n]));
      chk(n_conf[n] > 0 && n_blk[n] > 0 && n_full[n] > 0,
          $sformatf("net %0d conflicts %0d blocked %0d full %0d", n, n_conf[n], n_blk[n], n_full[n]));
      $display("net %0d: sent %0d received %0d conflicts %0d blocked %0d full %0d", n, sent[n], rcvd[n], n_conf[n], n_blk[n], n_full[n]);
    end
    for (int k = 0; k <= LL; k++)
      chk(n_refl[1][k] > 0 && n_refl[2][k] > 0, $sformatf("reflections at level %0d: %0d %0d", k, n_refl[1][k], n_refl[2][k]));
    chk(n_res > 0 && n_busy > 0, $sformatf("reserve slot %0d, line busy %0d", n_res, n_busy));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
