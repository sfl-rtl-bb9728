// tb_cr_arbiter: the three conflict resolution schemes on four requesters.
// Fixed priority must pick the lowest requesting index, round robin the first
// requester after the previous winner, and random must give every requester
// a share when all request. All must grant exactly one requester, and none
// when the queue has no vacancy.
module tb_cr_arbiter;
  import sfl_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, g_fp, g_rr, g_rd;
  logic ok;
  logic [1:0] s_fp, s_rr, s_rd;
  int checks = 0, failures = 0;
  int wins[N];
  int rr_last = N - 1;

  cr_arbiter #(.N(N), .SCHEME(CR_FP))   u_fp (.clk, .rst_n, .seed(16'h1), .req, .ok, .gnt(g_fp), .sel(s_fp));
  cr_arbiter #(.N(N), .SCHEME(CR_RR))   u_rr (.clk, .rst_n, .seed(16'h1), .req, .ok, .gnt(g_rr), .sel(s_rr));
  cr_arbiter #(.N(N), .SCHEME(CR_RAND)) u_rd (.clk, .rst_n, .seed(16'hACE1), .req, .ok, .gnt(g_rd), .sel(s_rd));

  always #5 clk = ~clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  function automatic int first_from(logic [N-1:0] r, int start);
    for (int i = 0; i < N; i++) if (r[(start + i) % N]) return (start + i) % N;
    return -1;
  endfunction

  initial begin
    int e;
    req = '0; ok = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 8000; cyc++) begin
      @(negedge clk);
      req = (cyc < 4000) ? N'($urandom) : '1;
      ok  = ($urandom % 4) != 0;
      #1;
      e = first_from(req, 0);
      chk(ok && req != 0 ? g_fp == N'(1 << e) : g_fp == '0, "fixed priority");
      e = first_from(req, (rr_last + 1) % N);
      chk(ok && req != 0 ? g_rr == N'(1 << e) : g_rr == '0, "round robin");
      if (ok && req != 0) rr_last = e;
      chk($onehot0(g_rd) && ((g_rd & ~req) == '0) && ((g_rd != '0) == (ok && req != '0)), "random grant legal");
      if (cyc >= 4000) for (int i = 0; i < N; i++) if (g_rd[i]) wins[i]++;
    end
    for (int i = 0; i < N; i++) chk(wins[i] > 300, $sformatf("random share of requester %0d: %0d", i, wins[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
