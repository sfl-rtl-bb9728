// tb_sefd_switch: one 2x2 SEFD switch (at level 1) with random packets on
// the two upgoing lines from below and the two downgoing lines from above,
// and random grants on all four queue fronts. A reference model sorts each
// packet: from below with gdist > 0 into T-queue up_tag[1] (gdist reduced by
// one), from below with gdist = 0 into B-queue dn_tag[1] (reflection), from
// above into B-queue dn_tag[1]. Each queue must take exactly one candidate
// when it has room and none otherwise; fronts must come out in order.
module tb_sefd_switch;
  import sfl_pkg::*;
  localparam int F = 2, DEPTH = 4, LEVEL = 1;
  logic clk = 0, rst_n = 0;
  logic bu_req [F], bu_gnt [F], bd_req [F], bd_gnt [F];
  logic tu_req [F], tu_gnt [F], td_req [F], td_gnt [F];
  packet_t bu_pkt [F], bd_pkt [F], tu_pkt [F], td_pkt [F];
  logic ev_conflict, ev_blocked, ev_reflect;
  packet_t tq [F][$];
  packet_t bq [F][$];
  int checks = 0, failures = 0, n_conflict = 0, n_blocked = 0, n_reflect = 0;

  sefd_switch #(.F(F), .DEPTH(DEPTH), .SCHEME(CR_RAND)) dut (
    .clk, .rst_n, .level(LVL_W'(LEVEL)), .seed(16'h77),
    .bu_req, .bu_pkt, .bu_gnt, .bd_req, .bd_pkt, .bd_gnt,
    .tu_req, .tu_pkt, .tu_gnt, .td_req, .td_pkt, .td_gnt,
    .ev_conflict, .ev_blocked, .ev_reflect);

  always #5 clk = ~clk;
  initial begin repeat (30000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  initial begin
    bit tpop [F], bpop [F], troom [F], broom [F], gu [F], gd [F];
    int tw, bw, tg, bg;
    packet_t p;
    for (int i = 0; i < F; i++) begin
      bu_req[i] = 0; td_req[i] = 0; bu_pkt[i] = '0; td_pkt[i] = '0; tu_gnt[i] = 0; bd_gnt[i] = 0;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < F; i++) begin
        bu_req[i] = ($urandom % 3) != 0;
        td_req[i] = ($urandom % 3) != 0;
        bu_pkt[i] = packet_t'({$urandom, $urandom, $urandom});
        td_pkt[i] = packet_t'({$urandom, $urandom, $urandom});
        bu_pkt[i].gdist = LVL_W'($urandom % 3);
        tu_gnt[i] = (cyc % 4000 < 2000) ? (($urandom % 3) == 0) : 1'b1;
        bd_gnt[i] = (cyc % 4000 < 2000) ? (($urandom % 3) == 0) : 1'b1;
      end
      #1;
      for (int q = 0; q < F; q++) begin
        chk(tu_req[q] == (tq[q].size() > 0) && bd_req[q] == (bq[q].size() > 0), "fronts valid");
        if (tq[q].size() > 0) chk(tu_pkt[q] == tq[q][0], "T-queue front");
        if (bq[q].size() > 0) chk(bd_pkt[q] == bq[q][0], "B-queue front");
        tpop[q] = tu_req[q] && tu_gnt[q];
        bpop[q] = bd_req[q] && bd_gnt[q];
        troom[q] = tq[q].size() < DEPTH || tpop[q];
        broom[q] = bq[q].size() < DEPTH || bpop[q];
      end
      for (int i = 0; i < F; i++) begin gu[i] = bu_gnt[i]; gd[i] = td_gnt[i]; end
      for (int q = 0; q < F; q++) begin
        tw = 0; bw = 0; tg = 0; bg = 0;
        for (int i = 0; i < F; i++) begin
          if (bu_req[i] && bu_pkt[i].gdist != 0 && int'(bu_pkt[i].up_tag[LEVEL]) == q) begin
            tw++; if (gu[i]) tg++;
          end
          if (bu_req[i] && bu_pkt[i].gdist == 0 && int'(bu_pkt[i].dn_tag[LEVEL]) == q) begin
            bw++; if (gu[i]) bg++;
          end
          if (td_req[i] && int'(td_pkt[i].dn_tag[LEVEL]) == q) begin
            bw++; if (gd[i]) bg++;
          end
        end
        chk(tg == ((tw > 0 && troom[q]) ? 1 : 0), "T-queue takes one when room");
        chk(bg == ((bw > 0 && broom[q]) ? 1 : 0), "B-queue takes one when room");
        if (tw > 1 || bw > 1) n_conflict++;
        if ((tw > 0 && !troom[q]) || (bw > 0 && !broom[q])) n_blocked++;
      end
      chk(ev_reflect == (gu[0] && bu_pkt[0].gdist == 0 || gu[1] && bu_pkt[1].gdist == 0), "reflect flag");
      if (ev_reflect) n_reflect++;
      @(posedge clk); #1;
      for (int q = 0; q < F; q++) begin
        if (tpop[q]) void'(tq[q].pop_front());
        if (bpop[q]) void'(bq[q].pop_front());
      end
      for (int i = 0; i < F; i++) begin
        if (gd[i]) bq[td_pkt[i].dn_tag[LEVEL]].push_back(td_pkt[i]);
        if (gu[i] && bu_pkt[i].gdist == 0) bq[bu_pkt[i].dn_tag[LEVEL]].push_back(bu_pkt[i]);
        if (gu[i] && bu_pkt[i].gdist != 0) begin
          p = bu_pkt[i];
          p.gdist = p.gdist - 1'b1;
          tq[bu_pkt[i].up_tag[LEVEL]].push_back(p);
        end
      end
    end
    chk(n_conflict > 0 && n_blocked > 0 && n_reflect > 0, "conflict, blocking, reflection exercised");
    $display("conflicts=%0d blocked=%0d reflect=%0d", n_conflict, n_blocked, n_reflect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
