// tb_des_switch: one 2x2 DES switch with random packets on both inputs and
// random grants from the successors. A reference model keeps each output
// queue; every cycle it checks that each queue takes exactly one of the
// packets heading for it when it has room (counting its departing front) and
// none otherwise, that grants go only to such packets, and that the queue
// fronts come out in order. Conflicts and blocking must both occur.
module tb_des_switch;
  import sfl_pkg::*;
  localparam int F = 2, DEPTH = 4, STAGE = 3;
  logic clk = 0, rst_n = 0;
  logic in_req [F], in_gnt [F], out_req [F], out_gnt [F];
  packet_t in_pkt [F], out_pkt [F];
  logic ev_conflict, ev_blocked;
  packet_t model [F][$];
  int checks = 0, failures = 0, n_conflict = 0, n_blocked = 0, n_moved = 0;

  des_switch #(.F(F), .DEPTH(DEPTH), .SCHEME(CR_RR)) dut (
    .clk, .rst_n, .stage(LVL_W'(STAGE)), .seed(16'h55),
    .in_req, .in_pkt, .in_gnt, .out_req, .out_pkt, .out_gnt, .ev_conflict, .ev_blocked);

  always #5 clk = ~clk;
  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    int tgt [F];
    bit room [F], pop [F], g [F];
    int ngr;
    for (int i = 0; i < F; i++) begin in_req[i] = 0; in_pkt[i] = '0; out_gnt[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < F; i++) begin
        in_req[i] = ($urandom % 4) != 0;
        in_pkt[i] = packet_t'({$urandom, $urandom, $urandom});
        tgt[i] = (cyc % 3000 < 1500) ? int'($urandom % F) : 0;
        in_pkt[i].up_tag[STAGE] = DIG_W'(tgt[i]);
        out_gnt[i] = (cyc % 4000 < 2000) ? (($urandom % 3) == 0) : 1'b1;
      end
      #1;
      for (int q = 0; q < F; q++) begin
        chk(out_req[q] == (model[q].size() > 0), "queue front valid");
        if (model[q].size() > 0) chk(out_pkt[q] == model[q][0], "queue front packet");
        pop[q] = out_req[q] && out_gnt[q];
        room[q] = model[q].size() < DEPTH || pop[q];
      end
      for (int i = 0; i < F; i++) g[i] = in_gnt[i];
      for (int q = 0; q < F; q++) begin
        int want;
        want = 0;
        ngr = 0;
        for (int i = 0; i < F; i++) if (in_req[i] && tgt[i] == q) begin
          want++;
          if (g[i]) ngr++;
        end
        chk(ngr == ((want > 0 && room[q]) ? 1 : 0), $sformatf("one packet per queue when room q%0d want%0d ngr%0d room%0d tg%0d%0d rq%0d%0d g%0d%0d", q, want, ngr, room[q], tgt[0], tgt[1], in_req[0], in_req[1], g[0], g[1]));
        if (want > 1) n_conflict++;
        if (want > 0 && !room[q]) n_blocked++;
      end
      for (int i = 0; i < F; i++) if (g[i]) chk(in_req[i], "grant only to a request");
      @(posedge clk); #1;
      for (int q = 0; q < F; q++) if (pop[q]) void'(model[q].pop_front());
      for (int i = 0; i < F; i++) if (g[i]) begin model[tgt[i]].push_back(in_pkt[i]); n_moved++; end
    end
    chk(n_conflict > 0 && n_blocked > 0, "conflicts and blocking exercised");
    $display("conflicts=%0d blocked=%0d moved=%0d", n_conflict, n_blocked, n_moved);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
