// tb_sehd_switch: one 2x2 SEHD switch (level 1) with random upgoing packets
// on its bottom lines, random admission answers from the queues below, random
// downgoing pushes from above and random grants for its ULIST fronts. A
// reference model keeps the ULIST and DLIST of both queue units. Every cycle
// it checks that each line carries at most one packet in one direction, that
// a packet sent down is either a DLIST front or a reflected packet addressed
// to that line, that only admitted transfers happen, that no line with a
// waiting DLIST front and an admitting receiver stays idle, that a queue able
// to take an upgoing packet takes one of those waiting, and that the queue
// fronts come out in order.
module tb_sehd_switch;
  import sfl_pkg::*;
  localparam int F = 2, DEPTH = 4, LEVEL = 1;
  logic clk = 0, rst_n = 0;
  logic bu_req [F], bu_gnt [F], bd_ok [F], bd_push [F];
  logic tu_req [F], tu_gnt [F], td_ok [F], td_push [F];
  packet_t bu_pkt [F], bd_pkt [F], tu_pkt [F], td_pkt [F];
  logic ev_conflict, ev_blocked, ev_reflect, ev_reserve, ev_line_busy;
  packet_t ul [F][$];
  packet_t dl [F][$];
  int checks = 0, failures = 0, n_refl = 0, n_dn = 0, n_up = 0, n_res = 0, n_busy = 0;

  sehd_switch #(.F(F), .DEPTH(DEPTH), .SCHEME(CR_RR)) dut (
    .clk, .rst_n, .level(LVL_W'(LEVEL)), .seed(16'h99),
    .bu_req, .bu_pkt, .bu_gnt, .bd_ok, .bd_push, .bd_pkt,
    .tu_req, .tu_pkt, .tu_gnt, .td_ok, .td_push, .td_pkt,
    .ev_conflict, .ev_blocked, .ev_reflect, .ev_reserve, .ev_line_busy);

  always #5 clk = ~clk;
  initial begin repeat (40000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(bit c, string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", m, $time); end
  endtask

  function automatic bit rule(int x, bit up);
    int fr = DEPTH - ul[x].size() - dl[x].size();
    if (fr > 1) return 1;
    if (fr == 1 && ul[x].size() > 0 && dl[x].size() > 0) return 1;
    if (fr == 1 && up && ul[x].size() == 0) return 1;
    if (fr == 1 && !up && dl[x].size() == 0) return 1;
    return 0;
  endfunction

  initial begin
    bit dsend [F], refl [F], upg [F], upop [F], pushd [F], waiting;
    int ngr;
    packet_t p;
    for (int i = 0; i < F; i++) begin
      bu_req[i] = 0; bu_pkt[i] = '0; bd_ok[i] = 0; tu_gnt[i] = 0; td_push[i] = 0; td_pkt[i] = '0;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < F; i++) begin
        bu_req[i] = ($urandom % 3) != 0;
        bu_pkt[i] = packet_t'({$urandom, $urandom, $urandom});
        bu_pkt[i].gdist = LVL_W'($urandom % 3);
        // a packet turning here never heads back down its own line
        if (bu_pkt[i].gdist == 0) bu_pkt[i].dn_tag[LEVEL] = DIG_W'(1 - i);
        bu_pkt[i].up_tag[LEVEL] = DIG_W'($urandom % 2);
        bd_ok[i] = (cyc % 5000 < 2500) ? (($urandom % 3) == 0) : 1'b1;
        td_pkt[i] = packet_t'({$urandom, $urandom, $urandom});
        td_pkt[i].dn_tag[LEVEL] = DIG_W'($urandom % 2);
      end
      #1;
      for (int x = 0; x < F; x++) begin
        chk(td_ok[x] == rule(x, 0), "DLIST admission");
        td_push[x] = td_ok[x] && (($urandom % 100) < ((cyc % 5000 < 2500) ? 50 : 15));
        tu_gnt[x]  = !td_push[x] && (($urandom % 3) != 0);
      end
      #1;
      // lines
      for (int x = 0; x < F; x++) dsend[x] = 0;
      for (int s = 0; s < F; s++) refl[s] = 0;
      for (int b = 0; b < F; b++) begin
        waiting = 0;
        for (int x = 0; x < F; x++) if (dl[x].size() > 0 && int'(dl[x][0].dn_tag[LEVEL]) == b) waiting = 1;
        if (waiting && bd_ok[b]) chk(bd_push[b], "line with waiting DLIST front used");
        if (bd_push[b]) begin
          bit found;
          found = 0;
          chk(bd_ok[b], "down only when admitted");
          chk(!bu_gnt[b], "line not used both ways");
          for (int x = 0; x < F; x++)
            if (!found && dl[x].size() > 0 && bd_pkt[b] == dl[x][0] && int'(dl[x][0].dn_tag[LEVEL]) == b) begin
              found = 1; dsend[x] = 1;
            end
          for (int s = 0; s < F; s++)
            if (!found && s != b && bu_req[s] && bu_gnt[s] && bu_pkt[s].gdist == 0 && bd_pkt[b] == bu_pkt[s]
                && int'(bu_pkt[s].dn_tag[LEVEL]) == b) begin
              found = 1; refl[s] = 1; n_refl++;
            end
          chk(found, "down packet is a DLIST front or a reflection");
          n_dn++;
        end
      end
      for (int x = 0; x < F; x++) begin
        if (tu_req[x]) chk(ul[x].size() > 0 && tu_pkt[x] == ul[x][0] && !dsend[x], "ULIST front offered");
        upop[x] = tu_req[x] && tu_gnt[x];
        pushd[x] = td_push[x];
      end
      for (int x = 0; x < F; x++) begin
        bit can;
        can = rule(x, 1) && !td_push[x] && !dsend[x];
        waiting = 0; ngr = 0;
        for (int s = 0; s < F; s++) begin
          if (bu_req[s] && bu_pkt[s].gdist != 0 && int'(bu_pkt[s].up_tag[LEVEL]) == x && !bd_push[s]) begin
            waiting = 1;
            if (bu_gnt[s]) ngr++;
          end
        end
        chk(ngr == ((waiting && can) ? 1 : 0), "ULIST takes one waiting upgoing packet when it can");
      end
      for (int s = 0; s < F; s++) begin
        upg[s] = bu_gnt[s] && !refl[s];
        if (bu_gnt[s]) chk(bu_req[s], "grant only to a request");
      end
      if (ev_reserve) n_res++;
      if (ev_line_busy) n_busy++;
      @(posedge clk); #1;
      for (int x = 0; x < F; x++) begin
        if (upop[x]) void'(ul[x].pop_front());
        if (dsend[x]) void'(dl[x].pop_front());
        if (pushd[x]) dl[x].push_back(td_pkt[x]);
      end
      for (int s = 0; s < F; s++) if (upg[s]) begin
        p = bu_pkt[s];
        p.gdist = p.gdist - 1'b1;
        ul[bu_pkt[s].up_tag[LEVEL]].push_back(p);
        n_up++;
      end
      for (int x = 0; x < F; x++) begin td_push[x] = 0; tu_gnt[x] = 0; end
    end
    chk(n_refl > 0 && n_dn > n_refl && n_up > 0 && n_res > 0 && n_busy > 0, "all transfer kinds exercised");
    $display("down=%0d reflect=%0d up=%0d reserve=%0d busy=%0d", n_dn, n_refl, n_up, n_res, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
