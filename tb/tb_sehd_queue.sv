// tb_sehd_queue: the deadlock-avoiding queue unit against a reference of two
// FIFO lists sharing DEPTH slots. Random cycles pick the upgoing mode (take
// into ULIST, send the ULIST front) or the downgoing mode (same for DLIST).
// Checks the fronts, the counts and the admission rule for both kinds of
// packet; the reserve slot must refuse packets, and the pool must fill.
module tb_sehd_queue;
  import sfl_pkg::*;
  localparam int DEPTH = 6;
  logic clk = 0, rst_n = 0;
  logic push_up, push_dn, pop_up, pop_dn, u_valid, d_valid, ok_up, ok_dn;
  packet_t push_pkt, u_head, d_head;
  logic [$clog2(DEPTH+1)-1:0] u_count, d_count;
  packet_t ul[$], dl[$];
  int checks = 0, failures = 0, n_reserve = 0, n_full = 0;

  sehd_queue #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin repeat (60000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  function automatic bit rule(bit up);
    int fr = DEPTH - ul.size() - dl.size();
    if (fr > 1) return 1;
    if (fr == 1 && ul.size() > 0 && dl.size() > 0) return 1;
    if (fr == 1 && up && ul.size() == 0) return 1;
    if (fr == 1 && !up && dl.size() == 0) return 1;
    return 0;
  endfunction

  initial begin
    bit mode_up;
    push_up = 0; push_dn = 0; pop_up = 0; pop_dn = 0; push_pkt = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 40000; cyc++) begin
      @(negedge clk);
      #1;
      chk(u_valid == (ul.size() > 0) && d_valid == (dl.size() > 0), "list fronts valid");
      chk(32'(u_count) == ul.size() && 32'(d_count) == dl.size(), "list counts");
      if (ul.size() > 0) chk(u_head == ul[0], "ULIST front");
      if (dl.size() > 0) chk(d_head == dl[0], "DLIST front");
      chk(ok_up == rule(1) && ok_dn == rule(0), "admission rule");
      if (ul.size() + dl.size() < DEPTH && (!ok_up || !ok_dn)) n_reserve++;
      if (ul.size() + dl.size() == DEPTH - 1) n_full++;
      mode_up = $urandom % 2;
      push_pkt = packet_t'({$urandom, $urandom, $urandom});
      // fill phases and drain phases
      push_up = mode_up && ok_up && ($urandom % 100 < ((cyc / 700) % 2 ? 30 : 85));
      push_dn = !mode_up && ok_dn && ($urandom % 100 < ((cyc / 700) % 2 ? 30 : 85));
      pop_up  = mode_up && u_valid && ($urandom % 100 < ((cyc / 700) % 2 ? 85 : 30));
      pop_dn  = !mode_up && d_valid && ($urandom % 100 < ((cyc / 700) % 2 ? 85 : 30));
      @(posedge clk); #1;
      if (pop_up) void'(ul.pop_front());
      if (pop_dn) void'(dl.pop_front());
      if (push_up) ul.push_back(push_pkt);
      if (push_dn) dl.push_back(push_pkt);
      push_up = 0; push_dn = 0; pop_up = 0; pop_dn = 0;
    end
    chk(n_reserve > 0 && n_full > 0, "reserve slot and nearly full pool exercised");
    $display("reserve=%0d nearly_full=%0d", n_reserve, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
