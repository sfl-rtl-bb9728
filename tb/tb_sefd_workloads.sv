// tb_sefd_workloads: the single-ended full-duplex network under the traffic
// and configuration variants the network study evaluates, at reduced size.
//
// Five (F,F,L) SEFD networks with 16 processors run side by side, each
// wrapped in tb_sefd_load:
//   rand / fp / rr : (2,2,3), buffer size 4, with the three conflict
//                    resolution schemes (random, fixed priority, round robin)
//   buf1           : (2,2,3), buffer size 1
//   sw4            : (4,4,1), 4x4 switches
// Each runs uniform traffic and then local traffic at a birth rate of 0.3
// packets/cycle/processor, 3000 cycles each, then stops generating and must
// drain completely. Every packet must arrive once, at its own processor.
// The average response time of each run is printed. As in the study, local
// traffic must give a shorter average response time than uniform traffic,
// on every network. Watchdog: 20000 cycles.
//
// The sizes are scaled down from the study's 256-processor networks to keep
// the run short; the workloads (birth rate, uniform and local reference
// matrices, conflict schemes, buffer size, switch size) are the study's.
module tb_sefd_workloads;
  import sfl_pkg::*;
  localparam int K = 5;
  localparam string NAME [K] = '{"rand", "fp", "rr", "buf1", "sw4"};

  logic clk = 0, rst_n = 0;
  int   rate_pct;
  bit   local_mode, gen_on;
  int   sent [K], received [K], errors [K];
  longint lat_sum [K];
  bit   busy [K];
  int   checks = 0, failures = 0;

  tb_sefd_load #(.L(3), .DEPTH(4), .SCHEME(CR_RAND)) u_rand (.clk, .rst_n, .rate_pct, .local_mode, .gen_on,
    .sent(sent[0]), .received(received[0]), .errors(errors[0]), .lat_sum(lat_sum[0]), .busy(busy[0]));
  tb_sefd_load #(.L(3), .DEPTH(4), .SCHEME(CR_FP)) u_fp (.clk, .rst_n, .rate_pct, .local_mode, .gen_on,
    .sent(sent[1]), .received(received[1]), .errors(errors[1]), .lat_sum(lat_sum[1]), .busy(busy[1]));
  tb_sefd_load #(.L(3), .DEPTH(4), .SCHEME(CR_RR)) u_rr (.clk, .rst_n, .rate_pct, .local_mode, .gen_on,
    .sent(sent[2]), .received(received[2]), .errors(errors[2]), .lat_sum(lat_sum[2]), .busy(busy[2]));
  tb_sefd_load #(.L(3), .DEPTH(1), .SCHEME(CR_RAND)) u_buf1 (.clk, .rst_n, .rate_pct, .local_mode, .gen_on,
    .sent(sent[3]), .received(received[3]), .errors(errors[3]), .lat_sum(lat_sum[3]), .busy(busy[3]));
  tb_sefd_load #(.F_LOG(2), .L(1), .DEPTH(4), .SCHEME(CR_RAND)) u_sw4 (.clk, .rst_n, .rate_pct, .local_mode, .gen_on,
    .sent(sent[4]), .received(received[4]), .errors(errors[4]), .lat_sum(lat_sum[4]), .busy(busy[4]));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  // Runs one traffic pattern and returns each network's average response
  // time (in hundredths of a cycle).
  task automatic run(bit loc, output int avg [K]);
    int s0 [K], r0 [K];
    longint l0 [K];
    bit any;
    for (int i = 0; i < K; i++) begin s0[i] = sent[i]; r0[i] = received[i]; l0[i] = lat_sum[i]; end
    @(negedge clk); local_mode = loc; gen_on = 1;
    repeat (3000) @(negedge clk);
    gen_on = 0;
    // drain
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      any = 0;
      for (int i = 0; i < K; i++) any |= busy[i];
      if (!any) break;
    end
    repeat (5) @(negedge clk);
    for (int i = 0; i < K; i++) begin
      chk(!busy[i], $sformatf("%s drains (%s traffic)", NAME[i], loc ? "local" : "uniform"));
      chk(errors[i] == 0, $sformatf("%s delivers correctly", NAME[i]));
      chk(sent[i] == received[i], $sformatf("%s delivers every packet", NAME[i]));
      chk(sent[i] - s0[i] > 3000 * 16 / 10, $sformatf("%s carries the offered load", NAME[i]));
      avg[i] = (received[i] > r0[i]) ? int'((lat_sum[i] - l0[i]) * 100 / longint'(received[i] - r0[i])) : 0;
      $display("%-5s %-7s packets=%0d avg response=%0d.%02d cycles", NAME[i], loc ? "local" : "uniform",
               received[i] - r0[i], avg[i] / 100, avg[i] % 100);
    end
  endtask

  initial begin
    int uni [K], loc [K];
    rate_pct = 30; local_mode = 0; gen_on = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    run(0, uni);
    run(1, loc);
    for (int i = 0; i < K; i++)
      chk(loc[i] < uni[i], $sformatf("%s: local traffic is faster than uniform", NAME[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
