// sefd_switch: F x F switch of a single-ended full-duplex (SEFD) banyan
// network.
//
// Every port is a pair of simplex lines, one for upgoing and one for
// downgoing packets. The F top ports each own an output queue for upgoing
// packets (T-queue, towards the switch above, SH); the F bottom ports each own
// an output queue for downgoing packets (B-queue, towards the switch or
// processor below, SL). A 2F x 2F crossbar joins them: rows are the inputs
// (upgoing lines from below, downgoing lines from above), columns the queues.
//
// A packet from below with gdist > 0 is still climbing: it goes to T-queue
// up_tag[level] and gdist is decremented. With gdist = 0 this switch reflects
// it into B-queue dn_tag[level]. A packet from above descends into B-queue
// dn_tag[level]. Each queue takes at most one packet per cycle (chosen by its
// own arbiter; a B-queue chooses among the F downgoing and the F reflecting
// candidates) and sends at most one.
//
// Grant order within a cycle: B-queue grants come from below (the processors'
// receive side) and ripple up to the apex; T-queue grants start at the apex
// and ripple down, since a T-queue front can only leave if the switch above
// takes it into a T-queue or reflects it into a B-queue. Both chains are
// combinational, as in the SEFD control unit's sequence. At the apex level
// nothing is wired above, so the T-queues stay empty.
//
// The queue organisation, tag handling and grant order follow the SEFD
// switch model; the one-arbiter-per-queue control unit, the level and seed
// inputs and the event outputs are this design's own.
module sefd_switch
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
  // bottom ports: upgoing line in from SL, B-queue out to SL
  input  logic             bu_req [F],
  input  packet_t          bu_pkt [F],
  output logic             bu_gnt [F],
  output logic             bd_req [F],
  output packet_t          bd_pkt [F],
  input  logic             bd_gnt [F],
  // top ports: T-queue out to SH, downgoing line in from SH
  output logic             tu_req [F],
  output packet_t          tu_pkt [F],
  input  logic             tu_gnt [F],
  input  logic             td_req [F],
  input  packet_t          td_pkt [F],
  output logic             td_gnt [F],
  // events of this cycle
  output logic             ev_conflict,
  output logic             ev_blocked,
  output logic             ev_reflect
);
  localparam int unsigned SW1 = (F > 1) ? $clog2(F) : 1;
  localparam int unsigned SW2 = $clog2(2 * F);

  // T-queues: candidates are the F upgoing lines from below
  logic [F-1:0]   t_want [F];
  logic [F-1:0]   t_gnt  [F];
  logic [SW1-1:0] t_sel  [F];
  logic           t_ok   [F];
  packet_t        t_in   [F];
  // B-queues: candidates 0..F-1 downgoing lines from above,
  // F..2F-1 upgoing lines from below that reflect here
  logic [2*F-1:0] b_want [F];
  logic [2*F-1:0] b_gnt  [F];
  logic [SW2-1:0] b_sel  [F];
  logic           b_ok   [F];
  packet_t        b_cand [2*F];

  always_comb begin
    for (int i = 0; i < F; i++) begin
      b_cand[i]     = td_pkt[i];
      b_cand[F + i] = bu_pkt[i];
    end
  end

  for (genvar q = 0; q < F; q++) begin : g_q
    always_comb begin
      for (int i = 0; i < F; i++) begin
        t_want[q][i]     = bu_req[i] && (bu_pkt[i].gdist != '0)
                           && (32'(bu_pkt[i].up_tag[level]) == q);
        b_want[q][i]     = td_req[i] && (32'(td_pkt[i].dn_tag[level]) == q);
        b_want[q][F + i] = bu_req[i] && (bu_pkt[i].gdist == '0)
                           && (32'(bu_pkt[i].dn_tag[level]) == q);
      end
    end

    cr_arbiter #(.N(F), .SCHEME(SCHEME)) u_tarb (
      .clk, .rst_n,
      .seed (seed ^ 16'(q * 16'h3A5B)),
      .req  (t_want[q]),
      .ok   (t_ok[q]),
      .gnt  (t_gnt[q]),
      .sel  (t_sel[q])
    );

    cr_arbiter #(.N(2 * F), .SCHEME(SCHEME)) u_barb (
      .clk, .rst_n,
      .seed (seed ^ 16'(q * 16'h5C4D) ^ 16'h0F0F),
      .req  (b_want[q]),
      .ok   (b_ok[q]),
      .gnt  (b_gnt[q]),
      .sel  (b_sel[q])
    );

    always_comb begin
      t_in[q] = bu_pkt[t_sel[q]];
      t_in[q].gdist = bu_pkt[t_sel[q]].gdist - 1'b1;
    end

    pkt_queue #(.DEPTH(DEPTH)) u_tq (
      .clk, .rst_n,
      .push       (|t_gnt[q]),
      .push_pkt   (t_in[q]),
      .pop        (tu_req[q] && tu_gnt[q]),
      .head_valid (tu_req[q]),
      .head_pkt   (tu_pkt[q]),
      .can_accept (t_ok[q]),
      .count      ()
    );

    pkt_queue #(.DEPTH(DEPTH)) u_bq (
      .clk, .rst_n,
      .push       (|b_gnt[q]),
      .push_pkt   (b_cand[b_sel[q]]),
      .pop        (bd_req[q] && bd_gnt[q]),
      .head_valid (bd_req[q]),
      .head_pkt   (bd_pkt[q]),
      .can_accept (b_ok[q]),
      .count      ()
    );
  end

  // grants back to the lines
  always_comb begin
    ev_conflict = 1'b0;
    ev_blocked  = 1'b0;
    ev_reflect  = 1'b0;
    for (int i = 0; i < F; i++) begin
      bu_gnt[i] = 1'b0;
      td_gnt[i] = 1'b0;
      for (int q = 0; q < F; q++) begin
        bu_gnt[i] = bu_gnt[i] | t_gnt[q][i] | b_gnt[q][F + i];
        td_gnt[i] = td_gnt[i] | b_gnt[q][i];
        if (b_gnt[q][F + i]) ev_reflect = 1'b1;
      end
    end
    for (int q = 0; q < F; q++) begin
      if (((t_want[q] & (t_want[q] - 1'b1)) != '0) || ((b_want[q] & (b_want[q] - 1'b1)) != '0)) ev_conflict = 1'b1;
      if ((|t_want[q] && !t_ok[q]) || (|b_want[q] && !b_ok[q])) ev_blocked = 1'b1;
    end
  end

endmodule
