// sehd_network: single-ended half-duplex (SEHD) CC-banyan network with the
// processor interfaces.
//
// Same geometry and routing as the SEFD network (levels 0..L of W = F**L
// switches, cylindrical-crossbar wiring, processors below level 0, packets
// climb to the lowest level that can reflect them and descend), but every
// link is a single half-duplex line and every switch keeps only its top-port
// queue units (sehd_queue). The line between top port t of switch j at level
// k and bottom port t of switch (j + t*F**k) mod W at level k+1 carries, per
// cycle, either the ULIST front of the lower queue upward or one packet
// downward into that queue's DLIST. A processor's line likewise either sends
// from its send queue or receives into its receive queue in one cycle.
//
// Each processor has an unbounded-in-principle send queue (PQ_DEPTH here)
// and a receive queue that absorbs one packet per cycle.
// Defaults: the (2,2,7) network, 256 processors, buffer size 16.
// The apex switches' top lines lead nowhere: their inputs are tied off and
// their outputs left unread, which lint reports as unused. The receive
// interface's net_gnt output is left open because this switch decides the
// transfer itself from net_room.
module sehd_network
  import sfl_pkg::*;
#(
  parameter int unsigned F_LOG    = 1,
  parameter int unsigned L        = 7,
  parameter int unsigned DEPTH    = 16,
  parameter cr_scheme_e  SCHEME   = CR_RAND,
  parameter int unsigned PQ_DEPTH = 64,
  parameter int unsigned MQ_DEPTH = 4,
  localparam int unsigned F = 1 << F_LOG,
  localparam int unsigned W = 1 << (F_LOG * L),
  localparam int unsigned N = F * W
) (
  input  logic              clk,
  input  logic              rst_n,
  // processors, sending side
  input  logic              gen_valid [N],
  input  logic [ID_W-1:0]   gen_dest  [N],
  input  logic [DATA_W-1:0] gen_data  [N],
  output logic              gen_ready [N],
  // processors, receiving side
  output logic              rcv_valid [N],
  output packet_t           rcv_pkt   [N],
  input  logic              rcv_ready [N],
  // per level: conflict / blocked / reflection / reserve slot held /
  // half-duplex line busy, this cycle
  output logic [L:0]        lv_conflict,
  output logic [L:0]        lv_blocked,
  output logic [L:0]        lv_reflect,
  output logic [L:0]        lv_reserve,
  output logic [L:0]        lv_line_busy
);
  logic    p_req [N];
  packet_t p_pkt [N];
  logic    p_gnt [N];
  logic    r_push [N];
  packet_t r_pkt [N];
  logic    r_room [N];

  for (genvar p = 0; p < N; p++) begin : g_proc
    src_interface #(.DEPTH(PQ_DEPTH), .F_LOG(F_LOG), .L(L), .SINGLE_ENDED(1'b1)) u_src (
      .clk, .rst_n,
      .port_id   (ID_W'(p)),
      .gen_valid (gen_valid[p]),
      .gen_dest  (gen_dest[p]),
      .gen_data  (gen_data[p]),
      .gen_ready (gen_ready[p]),
      .net_req   (p_req[p]),
      .net_pkt   (p_pkt[p]),
      .net_gnt   (p_gnt[p])
    );
    // the switch only pushes when net_room is set, so net_gnt equals net_req
    sink_interface #(.DEPTH(MQ_DEPTH)) u_rcv (
      .clk, .rst_n,
      .net_req   (r_push[p]),
      .net_pkt   (r_pkt[p]),
      .net_gnt   (),
      .net_room  (r_room[p]),
      .mem_valid (rcv_valid[p]),
      .mem_pkt   (rcv_pkt[p]),
      .mem_ready (rcv_ready[p])
    );
  end

  for (genvar k = 0; k <= L; k++) begin : g_lv
    // top lines of this level's switches
    logic    tu_req  [W][F];
    packet_t tu_pkt  [W][F];
    logic    tu_gnt  [W][F];
    logic    td_ok   [W][F];
    logic    td_push [W][F];
    packet_t td_pkt  [W][F];
    logic [W-1:0] sw_conflict, sw_blocked, sw_reflect, sw_reserve, sw_busy;

    assign lv_conflict[k]  = |sw_conflict;
    assign lv_blocked[k]   = |sw_blocked;
    assign lv_reflect[k]   = |sw_reflect;
    assign lv_reserve[k]   = |sw_reserve;
    assign lv_line_busy[k] = |sw_busy;

    for (genvar j = 0; j < W; j++) begin : g_sw
      logic    bu_req  [F];
      packet_t bu_pkt  [F];
      logic    bu_gnt  [F];
      logic    bd_ok   [F];
      logic    bd_push [F];
      packet_t bd_pkt  [F];

      for (genvar m = 0; m < F; m++) begin : g_port
        if (k == 0) begin : g_bot_proc
          assign bu_req[m]       = p_req[F*j + m];
          assign bu_pkt[m]       = p_pkt[F*j + m];
          assign p_gnt[F*j + m]  = bu_gnt[m];
          assign bd_ok[m]        = r_room[F*j + m];
          assign r_push[F*j + m] = bd_push[m];
          assign r_pkt[F*j + m]  = bd_pkt[m];
        end else begin : g_bot_sw
          localparam int unsigned LJ = (j + W - ((m * (F ** (k-1))) % W)) % W;
          assign bu_req[m] = g_lv[k-1].tu_req[LJ][m];
          assign bu_pkt[m] = g_lv[k-1].tu_pkt[LJ][m];
          assign bd_ok[m]  = g_lv[k-1].td_ok[LJ][m];
          assign g_lv[k-1].tu_gnt[LJ][m]  = bu_gnt[m];
          assign g_lv[k-1].td_push[LJ][m] = bd_push[m];
          assign g_lv[k-1].td_pkt[LJ][m]  = bd_pkt[m];
        end
        if (k == L) begin : g_top_none
          assign tu_gnt[j][m]  = 1'b0;
          assign td_push[j][m] = 1'b0;
          assign td_pkt[j][m]  = '0;
        end
      end

      sehd_switch #(.F(F), .DEPTH(DEPTH), .SCHEME(SCHEME)) u_sw (
        .clk, .rst_n,
        .level   (LVL_W'(k)),
        .seed    (16'((k * 16'h9E37) ^ (j * 16'h7F4B) ^ 16'h2468)),
        .bu_req, .bu_pkt, .bu_gnt, .bd_ok, .bd_push, .bd_pkt,
        .tu_req  (tu_req[j]),
        .tu_pkt  (tu_pkt[j]),
        .tu_gnt  (tu_gnt[j]),
        .td_ok   (td_ok[j]),
        .td_push (td_push[j]),
        .td_pkt  (td_pkt[j]),
        .ev_conflict  (sw_conflict[j]),
        .ev_blocked   (sw_blocked[j]),
        .ev_reflect   (sw_reflect[j]),
        .ev_reserve   (sw_reserve[j]),
        .ev_line_busy (sw_busy[j])
      );
    end
  end

endmodule
