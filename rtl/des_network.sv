// des_network: double-ended simplex (DES) CC-banyan network with its
// processor and memory interfaces.
//
// Packets travel one way, from N processors on one side to N memories on the
// other, through L+1 stages of W = F**L switches each (N = F*W); a reply
// network would be a second instance. Stage 0 faces the processors (it is the
// apex level of the original level numbering, the memory side being the
// base). Output m of switch j in stage s feeds input m of switch
// (j + m*F**s) mod W in stage s+1 (cylindrical-crossbar wiring); processor p
// feeds input p mod F of stage-0 switch p/F; output m of last-stage switch j
// feeds memory F*j + m. Every processor reaches every memory on exactly one
// path of L+1 switches.
//
// Every network cycle each queue front may move one hop: grants are produced
// by the memory interfaces and ripple back through all stages within the
// cycle, so a full queue whose front leaves can take a new packet at once.
//
// Defaults: the (2,2,7) network (256 processors, 8 stages) with buffer size
// 16 per switch queue, as in the network study. Processor queue depth
// PQ_DEPTH and memory queue depth MQ_DEPTH are this design's choices.
// The memory interface's net_room output is left open: this network uses
// its request/grant pair.
module des_network
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
  // processors
  input  logic              gen_valid [N],
  input  logic [ID_W-1:0]   gen_dest  [N],
  input  logic [DATA_W-1:0] gen_data  [N],
  output logic              gen_ready [N],
  // memories
  output logic              mem_valid [N],
  output packet_t           mem_pkt   [N],
  input  logic              mem_ready [N],
  // per stage: some switch saw a queue conflict / a blocked packet this cycle
  output logic [L:0]        st_conflict,
  output logic [L:0]        st_blocked
);
  // processor interfaces
  logic    p_req [N];
  packet_t p_pkt [N];
  logic    p_gnt [N];

  for (genvar p = 0; p < N; p++) begin : g_src
    src_interface #(.DEPTH(PQ_DEPTH), .F_LOG(F_LOG), .L(L), .SINGLE_ENDED(1'b0)) u_if (
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
  end

  for (genvar s = 0; s <= L; s++) begin : g_st
    // outputs of the switches of this stage
    logic    oreq [W][F];
    packet_t opkt [W][F];
    logic    ognt [W][F];
    logic [W-1:0] sw_conflict, sw_blocked;

    assign st_conflict[s] = |sw_conflict;
    assign st_blocked[s]  = |sw_blocked;

    for (genvar j = 0; j < W; j++) begin : g_sw
      logic    ireq [F];
      packet_t ipkt [F];
      logic    ignt [F];

      for (genvar m = 0; m < F; m++) begin : g_in
        if (s == 0) begin : g_from_proc
          assign ireq[m] = p_req[F*j + m];
          assign ipkt[m] = p_pkt[F*j + m];
          assign p_gnt[F*j + m] = ignt[m];
        end else begin : g_from_sw
          localparam int unsigned PJ = (j + W - ((m * (F ** (s-1))) % W)) % W;
          assign ireq[m] = g_st[s-1].oreq[PJ][m];
          assign ipkt[m] = g_st[s-1].opkt[PJ][m];
          assign g_st[s-1].ognt[PJ][m] = ignt[m];
        end
      end

      des_switch #(.F(F), .DEPTH(DEPTH), .SCHEME(SCHEME)) u_sw (
        .clk, .rst_n,
        .stage   (LVL_W'(s)),
        .seed    (16'((s * 16'h9E37) ^ (j * 16'h7F4B) ^ 16'h1234)),
        .in_req  (ireq),
        .in_pkt  (ipkt),
        .in_gnt  (ignt),
        .out_req (oreq[j]),
        .out_pkt (opkt[j]),
        .out_gnt (ognt[j]),
        .ev_conflict (sw_conflict[j]),
        .ev_blocked  (sw_blocked[j])
      );
    end
  end

  for (genvar j = 0; j < W; j++) begin : g_mem_sw
    for (genvar m = 0; m < F; m++) begin : g_mem
      sink_interface #(.DEPTH(MQ_DEPTH)) u_if (
        .clk, .rst_n,
        .net_req   (g_st[L].oreq[j][m]),
        .net_pkt   (g_st[L].opkt[j][m]),
        .net_gnt   (g_st[L].ognt[j][m]),
        .net_room  (),
        .mem_valid (mem_valid[F*j + m]),
        .mem_pkt   (mem_pkt[F*j + m]),
        .mem_ready (mem_ready[F*j + m])
      );
    end
  end

endmodule
