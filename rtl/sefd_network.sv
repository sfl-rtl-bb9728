// sefd_network: single-ended full-duplex (SEFD) CC-banyan network with the
// processor interfaces.
//
// All N = F*W processors sit below the base level 0; levels 0..L hold W =
// F**L switches each. A packet climbs from its processor to the lowest level
// at which a path back down to its destination exists (gdist in the header),
// is reflected there and descends to the destination processor. Top port t of
// switch j at level k is wired to bottom port t of switch (j + t*F**k) mod W
// at level k+1, both directions (cylindrical-crossbar wiring); processor p
// uses bottom port p mod F of base switch p/F, sending through a src_interface
// and receiving through a sink_interface. With this wiring a packet reflected
// at level g can reach every processor within F**g - 1 switch positions on
// either side of its source.
//
// Grants start at the receive interfaces, ripple up through the B-queues to
// the apex and then down through the T-queues to the send interfaces, all
// within one network cycle.
//
// The apex switches' top ports have no level above them: their T-queue
// requests are answered with no grant and their downgoing inputs are tied
// off, so lint reports those apex signals as unused. The receive
// interface's net_room output is left open; this network uses net_gnt.
//
// Defaults: the (2,2,7) network, 256 processors, buffer size 16. PQ_DEPTH and
// MQ_DEPTH (processor send and receive queues) are this design's choices.
module sefd_network
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
  // per level: a queue conflict / a blocked packet / a reflection this cycle
  output logic [L:0]        lv_conflict,
  output logic [L:0]        lv_blocked,
  output logic [L:0]        lv_reflect
);
  logic    p_req [N];
  packet_t p_pkt [N];
  logic    p_gnt [N];
  logic    r_req [N];
  packet_t r_pkt [N];
  logic    r_gnt [N];

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
    sink_interface #(.DEPTH(MQ_DEPTH)) u_rcv (
      .clk, .rst_n,
      .net_req   (r_req[p]),
      .net_pkt   (r_pkt[p]),
      .net_gnt   (r_gnt[p]),
      .net_room  (),
      .mem_valid (rcv_valid[p]),
      .mem_pkt   (rcv_pkt[p]),
      .mem_ready (rcv_ready[p])
    );
  end

  for (genvar k = 0; k <= L; k++) begin : g_lv
    // T-queue fronts of this level (towards level k+1) and their grants
    logic    tu_req [W][F];
    packet_t tu_pkt [W][F];
    logic    tu_gnt [W][F];
    // B-queue fronts of this level (towards level k-1) and their grants
    logic    bd_req [W][F];
    packet_t bd_pkt [W][F];
    logic    bd_gnt [W][F];
    logic [W-1:0] sw_conflict, sw_blocked, sw_reflect;

    assign lv_conflict[k] = |sw_conflict;
    assign lv_blocked[k]  = |sw_blocked;
    assign lv_reflect[k]  = |sw_reflect;

    for (genvar j = 0; j < W; j++) begin : g_sw
      logic    bu_req [F];
      packet_t bu_pkt [F];
      logic    bu_gnt [F];
      logic    td_req [F];
      packet_t td_pkt [F];
      logic    td_gnt [F];

      for (genvar m = 0; m < F; m++) begin : g_port
        // bottom port m
        if (k == 0) begin : g_bot_proc
          assign bu_req[m]      = p_req[F*j + m];
          assign bu_pkt[m]      = p_pkt[F*j + m];
          assign p_gnt[F*j + m] = bu_gnt[m];
          assign r_req[F*j + m] = bd_req[j][m];
          assign r_pkt[F*j + m] = bd_pkt[j][m];
          assign bd_gnt[j][m]   = r_gnt[F*j + m];
        end else begin : g_bot_sw
          localparam int unsigned LJ = (j + W - ((m * (F ** (k-1))) % W)) % W;
          assign bu_req[m] = g_lv[k-1].tu_req[LJ][m];
          assign bu_pkt[m] = g_lv[k-1].tu_pkt[LJ][m];
          assign g_lv[k-1].tu_gnt[LJ][m] = bu_gnt[m];
        end
        // top port m
        if (k == L) begin : g_top_none
          assign td_req[m]    = 1'b0;
          assign td_pkt[m]    = '0;
          assign tu_gnt[j][m] = 1'b0;
        end else begin : g_top_sw
          localparam int unsigned UJ = (j + ((m * (F ** k)) % W)) % W;
          assign td_req[m] = g_lv[k+1].bd_req[UJ][m];
          assign td_pkt[m] = g_lv[k+1].bd_pkt[UJ][m];
          assign g_lv[k+1].bd_gnt[UJ][m] = td_gnt[m];
        end
      end

      sefd_switch #(.F(F), .DEPTH(DEPTH), .SCHEME(SCHEME)) u_sw (
        .clk, .rst_n,
        .level  (LVL_W'(k)),
        .seed   (16'((k * 16'h9E37) ^ (j * 16'h7F4B) ^ 16'h4321)),
        .bu_req, .bu_pkt, .bu_gnt,
        .bd_req (bd_req[j]),
        .bd_pkt (bd_pkt[j]),
        .bd_gnt (bd_gnt[j]),
        .tu_req (tu_req[j]),
        .tu_pkt (tu_pkt[j]),
        .tu_gnt (tu_gnt[j]),
        .td_req, .td_pkt, .td_gnt,
        .ev_conflict (sw_conflict[j]),
        .ev_blocked  (sw_blocked[j]),
        .ev_reflect  (sw_reflect[j])
      );
    end
  end

endmodule
