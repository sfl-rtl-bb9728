// tb_sefd_load: traffic source and checker wrapped round one SEFD network,
// for the workload testbench (tb_sefd_workloads). Not a testbench by itself.
//
// Every cycle each processor with no packet waiting offers a new one with
// probability rate_pct/100 (the birth rate). The destination is uniform over
// all processors, or, with local_mode set, drawn so that its probability is
// inversely proportional to g+1, g being the lowest level at which the pair
// can be reflected. The payload carries the source and the birth cycle. Each
// delivered packet must reach the processor it names, be one that was sent
// and not yet delivered, and its source must match; the response time
// (birth to delivery) is summed. Receivers take one packet per cycle, as a
// processor absorbs a packet in a single network cycle.
//
// Interface: parameters are passed straight to sefd_network. gen_on starts
// and stops generation; sent, received, errors and lat_sum count since
// reset; busy is high while packets are outstanding. Drive rate_pct,
// local_mode and gen_on away from the rising clock edge.
//
// The traffic model (Bernoulli births, uniform or local reference matrix)
// follows the network study; the 1/(g+1) weight is this design's reading of
// "inversely proportional to the minimum level number", with levels counted
// from zero.
module tb_sefd_load
  import sfl_pkg::*;
#(
  parameter int unsigned F_LOG  = 1,
  parameter int unsigned L      = 3,
  parameter int unsigned DEPTH  = 4,
  parameter cr_scheme_e  SCHEME = CR_RAND
) (
  input  logic clk,
  input  logic rst_n,
  input  int   rate_pct,
  input  bit   local_mode,
  input  bit   gen_on,
  output int   sent,
  output int   received,
  output int   errors,
  output longint lat_sum,
  output bit   busy
);
  localparam int unsigned N = 1 << (F_LOG * (L + 1));

  logic              gen_valid [N];
  logic [ID_W-1:0]   gen_dest  [N];
  logic [DATA_W-1:0] gen_data  [N];
  logic              gen_ready [N];
  logic              rcv_valid [N];
  packet_t           rcv_pkt   [N];
  logic              rcv_ready [N];
  logic [L:0]        lv_conflict, lv_blocked, lv_reflect;

  sefd_network #(.F_LOG(F_LOG), .L(L), .DEPTH(DEPTH), .SCHEME(SCHEME)) u_net (
    .clk, .rst_n, .gen_valid, .gen_dest, .gen_data, .gen_ready,
    .rcv_valid, .rcv_pkt, .rcv_ready, .lv_conflict, .lv_blocked, .lv_reflect);

  int  cyc;
  bit  acc [N];
  bit  live [bit [31:0]];

  function automatic int pick_dest(int p);
    int d, g;
    if (!local_mode) return int'($urandom % N);
    forever begin
      d = int'($urandom % N);
      g = int'(reflect_level(F_LOG, L, ID_W'(p), ID_W'(d)));
      if ($urandom % (g + 1) == 0) return d;
    end
  endfunction

  initial begin
    cyc = 0; sent = 0; received = 0; errors = 0; lat_sum = 0; busy = 0;
    for (int p = 0; p < N; p++) begin
      gen_valid[p] = 0; gen_dest[p] = '0; gen_data[p] = '0; rcv_ready[p] = 1; acc[p] = 0;
    end
  end

  // deliveries and accepted births, seen at the clock edge
  always @(posedge clk) begin
    if (rst_n) begin
      for (int p = 0; p < N; p++) begin
        if (gen_valid[p] && gen_ready[p]) begin
          acc[p] = 1;
          live[gen_data[p]] = 1;
          sent++;
        end
        if (rcv_valid[p] && rcv_ready[p]) begin
          received++;
          if (int'(rcv_pkt[p].dest) != p || !live.exists(rcv_pkt[p].data) ||
              rcv_pkt[p].src != rcv_pkt[p].data[31:24]) errors++;
          else begin
            void'(live.delete(rcv_pkt[p].data));
            lat_sum += longint'(cyc - int'(rcv_pkt[p].data[23:0]) + 1);
          end
        end
      end
    end
    busy = live.size() > 0;
  end

  // new births, driven at the falling edge
  always @(negedge clk) begin
    cyc++;
    for (int p = 0; p < N; p++) begin
      if (!gen_valid[p] || acc[p]) begin
        gen_valid[p] = gen_on && ($urandom % 100 < rate_pct);
        gen_dest[p]  = ID_W'(pick_dest(p));
        gen_data[p]  = {8'(p), 24'(cyc)};
      end
      acc[p] = 0;
    end
  end
endmodule
