// sehd_switch: F x F switch of a single-ended half-duplex (SEHD) banyan
// network.
//
// Each port is one half-duplex line: in a network cycle it carries one
// packet up or one packet down, not both. The switch holds one sehd_queue per
// top port (no queues at the bottom ports); the queue at top port t keeps the
// packets waiting to climb over line t (ULIST) and the packets that came down
// line t and wait to descend further (DLIST). A packet reflected by this
// switch is not stored here: it passes straight from the ULIST front of the
// queue below one bottom port into the DLIST of the queue below another.
//
// Control sequence of one network cycle, as in the SEHD control unit
// (downgoing and reflecting traffic first, then upgoing):
//  1a. the DLIST front of each queue asks for bottom line dn_tag[level];
//      one arbiter per line picks one, if the queue below can take a
//      downgoing packet (bd_ok, its admission rule).
//  1b. upgoing packets with gdist = 0 arriving on a bottom line are reflected
//      onto bottom line dn_tag[level], if neither line is already in use this
//      cycle and the queue below takes it; lines are served in a rotating
//      order.
//  2.  upgoing packets with gdist > 0 on lines still free ask for the queue
//      up_tag[level]; one arbiter per queue picks one, if the queue admits an
//      upgoing packet and is not in its downgoing mode this cycle (receiving
//      from above or sending its DLIST front down).
// A queue whose DLIST front leaves does not offer its ULIST front upward in
// the same cycle. Vacancies are the registered ones: a full queue does not
// take a packet in the cycle its front leaves.
//
// The queue unit, the line sharing and the order of decisions follow the
// SEHD switch model; the rotating serving of reflections, the registered
// vacancies and the event outputs are this design's own choices.
module sehd_switch
  import sfl_pkg::*;
#(
  parameter int unsigned F      = 2,
  parameter int unsigned DEPTH  = 16,
  parameter cr_scheme_e  SCHEME = CR_RAND
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LVL_W-1:0] level,
  input  logic [15:0]      seed,
  // bottom lines: ULIST front of the queue below (up), push into its DLIST (down)
  input  logic             bu_req  [F],
  input  packet_t          bu_pkt  [F],
  output logic             bu_gnt  [F],
  input  logic             bd_ok   [F],
  output logic             bd_push [F],
  output packet_t          bd_pkt  [F],
  // top lines: ULIST front of own queue (up), push into own DLIST (down)
  output logic             tu_req  [F],
  output packet_t          tu_pkt  [F],
  input  logic             tu_gnt  [F],
  output logic             td_ok   [F],
  input  logic             td_push [F],
  input  packet_t          td_pkt  [F],
  // events of this cycle
  output logic             ev_conflict,
  output logic             ev_blocked,
  output logic             ev_reflect,
  output logic             ev_reserve,
  output logic             ev_line_busy
);
  localparam int unsigned SW1 = (F > 1) ? $clog2(F) : 1;
  localparam int unsigned CW  = $clog2(DEPTH + 1);

  // queue state
  logic    q_uv [F], q_dv [F], q_okup [F];
  packet_t q_uh [F], q_dh [F];
  logic [CW-1:0] q_uc [F], q_dc [F];
  // phase 1a: DLIST fronts onto bottom lines
  logic [F-1:0]   dl_want [F];   // [line][queue]
  logic [F-1:0]   dl_gnt  [F];
  logic [SW1-1:0] dl_sel  [F];
  logic [F-1:0]   dsend;         // queue sends its DLIST front
  // phase 1b: reflections
  logic [F-1:0]   line_dn, refl_src;
  logic [SW1-1:0] refl_from [F];
  logic [F-1:0]   refl_to;
  logic [SW1-1:0] rr_start;
  // phase 2: upgoing into ULISTs
  logic [F-1:0]   up_want [F];   // [queue][line]
  logic [F-1:0]   up_gnt  [F];
  logic [SW1-1:0] up_sel  [F];
  logic           up_ok   [F];
  packet_t        up_in   [F];

  // ---- phase 1a
  for (genvar b = 0; b < F; b++) begin : g_line
    always_comb begin
      for (int x = 0; x < F; x++)
        dl_want[b][x] = q_dv[x] && (32'(q_dh[x].dn_tag[level]) == b);
    end
    cr_arbiter #(.N(F), .SCHEME(SCHEME)) u_darb (
      .clk, .rst_n,
      .seed (seed ^ 16'(b * 16'h2D1B) ^ 16'h00F0),
      .req  (dl_want[b]),
      .ok   (bd_ok[b]),
      .gnt  (dl_gnt[b]),
      .sel  (dl_sel[b])
    );
  end

  always_comb begin
    for (int x = 0; x < F; x++) begin
      dsend[x] = 1'b0;
      for (int b = 0; b < F; b++) dsend[x] = dsend[x] | dl_gnt[b][x];
    end
  end

  // ---- phase 1b
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rr_start <= '0;
    else        rr_start <= SW1'((int'(rr_start) + 1) % F);
  end

  always_comb begin
    int b, s;
    b = 0;
    s = 0;
    for (int i = 0; i < F; i++) begin
      line_dn[i]   = |dl_gnt[i];
      refl_src[i]  = 1'b0;
      refl_to[i]   = 1'b0;
      refl_from[i] = '0;
    end
    for (int i = 0; i < F; i++) begin
      b = (int'(rr_start) + i) % F;
      if (!line_dn[b] && !refl_src[b] && bd_ok[b]) begin
        for (int j = 0; j < F; j++) begin
          s = (b + 1 + j) % F;
          if (!refl_to[b] && s != b && bu_req[s] && bu_pkt[s].gdist == '0
              && 32'(bu_pkt[s].dn_tag[level]) == b && !line_dn[s] && !refl_src[s]) begin
            refl_to[b]   = 1'b1;
            refl_from[b] = SW1'(s);
            refl_src[s]  = 1'b1;
            line_dn[b]   = 1'b1;
          end
        end
      end
    end
  end

  // bottom line outputs
  always_comb begin
    for (int b = 0; b < F; b++) begin
      bd_push[b] = line_dn[b];
      bd_pkt[b]  = refl_to[b] ? bu_pkt[refl_from[b]] : q_dh[dl_sel[b]];
    end
  end

  // ---- phase 2 and the queues
  for (genvar x = 0; x < F; x++) begin : g_q
    always_comb begin
      for (int b = 0; b < F; b++)
        up_want[x][b] = bu_req[b] && bu_pkt[b].gdist != '0 && !line_dn[b] && !refl_src[b]
                        && (32'(bu_pkt[b].up_tag[level]) == x);
    end
    assign up_ok[x] = q_okup[x] && !td_push[x] && !dsend[x];

    cr_arbiter #(.N(F), .SCHEME(SCHEME)) u_uarb (
      .clk, .rst_n,
      .seed (seed ^ 16'(x * 16'h3A5B)),
      .req  (up_want[x]),
      .ok   (up_ok[x]),
      .gnt  (up_gnt[x]),
      .sel  (up_sel[x])
    );

    always_comb begin
      up_in[x] = bu_pkt[up_sel[x]];
      up_in[x].gdist = bu_pkt[up_sel[x]].gdist - 1'b1;
    end

    sehd_queue #(.DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .push_up  (|up_gnt[x]),
      .push_dn  (td_push[x]),
      .push_pkt (td_push[x] ? td_pkt[x] : up_in[x]),
      .pop_up   (tu_req[x] && tu_gnt[x]),
      .pop_dn   (dsend[x]),
      .u_valid  (q_uv[x]),
      .u_head   (q_uh[x]),
      .d_valid  (q_dv[x]),
      .d_head   (q_dh[x]),
      .ok_up    (q_okup[x]),
      .ok_dn    (td_ok[x]),
      .u_count  (q_uc[x]),
      .d_count  (q_dc[x])
    );

    assign tu_req[x] = q_uv[x] && !dsend[x];
    assign tu_pkt[x] = q_uh[x];
  end

  // grants to the lines below and events
  always_comb begin
    ev_conflict  = 1'b0;
    ev_blocked   = 1'b0;
    ev_reserve   = 1'b0;
    ev_line_busy = 1'b0;
    ev_reflect   = |refl_src;
    for (int b = 0; b < F; b++) begin
      bu_gnt[b] = refl_src[b];
      for (int x = 0; x < F; x++) bu_gnt[b] = bu_gnt[b] | up_gnt[x][b];
      if (((dl_want[b] & (dl_want[b] - 1'b1)) != '0)) ev_conflict = 1'b1;
      if (|dl_want[b] && !bd_ok[b]) ev_blocked = 1'b1;
      if (bu_req[b] && bu_pkt[b].gdist != '0 && (line_dn[b] || refl_src[b])) ev_line_busy = 1'b1;
    end
    for (int x = 0; x < F; x++) begin
      if (((up_want[x] & (up_want[x] - 1'b1)) != '0)) ev_conflict = 1'b1;
      if (|up_want[x] && !up_ok[x]) ev_blocked = 1'b1;
      if (|up_want[x] && (32'(q_uc[x]) + 32'(q_dc[x]) == DEPTH - 1) && !q_okup[x]) ev_reserve = 1'b1;
    end
  end

endmodule
