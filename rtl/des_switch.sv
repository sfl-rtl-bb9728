// des_switch: F x F packet switch of a double-ended simplex (DES) banyan
// network.
//
// A control unit, an F x F crossbar and F FIFO output queues. In each network
// cycle the control unit reads the routing digit of the packet at the front
// of every predecessor queue (REQI with its tag), lets one arbiter per output
// queue choose among the packets that head for that queue, and grants
// (GRANTO) the winner if the queue has room or its own head leaves in this
// cycle (GRANTI from the successor). The crossbar then steers each granted
// packet into its queue, so at most one packet enters each queue per cycle and
// every queue can receive and send in the same cycle. The front of each queue
// is offered to the successor (REQO with the tag) in the same way.
//
// The structure, the handshake (request with the destination tag, grant back
// like a ripple carry) and the one-in/one-out queue rule follow the DES switch
// model; the stage number and LFSR seed arrive as inputs (not parameters) so
// that all switches of a network share one module body.
//
// Interface: in_* from the F predecessors, out_* to the F successors.
// stage selects which routing digit of the header this switch obeys.
// ev_conflict / ev_blocked flag contention for status counters.
// Timing: requests and packets are registered (queue heads); grants are
// combinational in the successors' grants.
module des_switch
  import sfl_pkg::*;
#(
  parameter int unsigned F      = 2,
  parameter int unsigned DEPTH  = 16,
  parameter cr_scheme_e  SCHEME = CR_RAND
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LVL_W-1:0] stage,
  input  logic [15:0]      seed,
  // predecessors: REQI + packet in, GRANTO out
  input  logic             in_req [F],
  input  packet_t          in_pkt [F],
  output logic             in_gnt [F],
  // successors: REQO + packet out, GRANTI in
  output logic             out_req [F],
  output packet_t          out_pkt [F],
  input  logic             out_gnt [F],
  // events of this cycle: two or more packets head for one queue /
  // a packet heads for a queue that has no vacancy
  output logic             ev_conflict,
  output logic             ev_blocked
);

  logic [F-1:0]  want [F];   // want[q][i]: input i heads for queue q
  logic [F-1:0]  gnt  [F];   // gnt[q][i]: input i enters queue q
  logic          q_ok [F];
  logic [(F>1 ? $clog2(F) : 1)-1:0] q_sel [F];
  logic          q_push [F];
  packet_t       q_in   [F];
  logic          q_pop  [F];

  for (genvar q = 0; q < F; q++) begin : g_q
    // 1-2: destination tags of the packets at the fronts of the predecessors
    always_comb begin
      for (int i = 0; i < F; i++)
        want[q][i] = in_req[i] && (32'(in_pkt[i].up_tag[stage]) == q);
    end

    // 4: conflict resolution against the queue's vacancy
    cr_arbiter #(.N(F), .SCHEME(SCHEME)) u_arb (
      .clk, .rst_n,
      .seed (seed ^ 16'(q * 16'h3A5B)),
      .req  (want[q]),
      .ok   (q_ok[q]),
      .gnt  (gnt[q]),
      .sel  (q_sel[q])
    );

    // 6: crossbar column q
    assign q_push[q] = |gnt[q];
    assign q_in[q]   = in_pkt[q_sel[q]];
    assign q_pop[q]  = out_req[q] && out_gnt[q];

    pkt_queue #(.DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .push       (q_push[q]),
      .push_pkt   (q_in[q]),
      .pop        (q_pop[q]),
      .head_valid (out_req[q]),
      .head_pkt   (out_pkt[q]),
      .can_accept (q_ok[q]),
      .count      ()
    );
  end

  always_comb begin
    ev_conflict = 1'b0;
    ev_blocked  = 1'b0;
    for (int q = 0; q < F; q++) begin
      if (((want[q] & (want[q] - 1'b1)) != '0))      ev_conflict = 1'b1;
      if (|want[q] && !q_ok[q])    ev_blocked  = 1'b1;
    end
  end

  // 5: GRANTO to each predecessor
  always_comb begin
    for (int i = 0; i < F; i++) begin
      in_gnt[i] = 1'b0;
      for (int q = 0; q < F; q++) in_gnt[i] = in_gnt[i] | gnt[q][i];
    end
  end

endmodule
