// pkt_queue: the FIFO output queue of a banyan switch (and of the network
// interfaces).
//
// Holds up to DEPTH packets. In one network cycle it can accept one incoming
// packet and send one outgoing packet. can_accept reports the vacancy the
// switch control unit grants against: the queue has room, or it is full but
// its head leaves in this same cycle. Because pop comes from the grant of the
// next queue downstream, can_accept is combinational in that grant; chained
// through a network this is the ripple-carry grant path of the synchronous
// banyan network.
//
// Interface: push/push_pkt (written at the clock edge), pop (head leaves at
// the clock edge), head_valid/head_pkt (front of the queue), count.
// Timing: a packet pushed in cycle t is at the head in cycle t+1 at the
// earliest. DEPTH default 16 is the buffer size the network study settles on;
// the circular-buffer organisation is this design's own.
module pkt_queue
  import sfl_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  packet_t                    push_pkt,
  input  logic                       pop,
  output logic                       head_valid,
  output packet_t                    head_pkt,
  output logic                       can_accept,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  packet_t        mem [DEPTH];
  logic [AW-1:0]  rd_ptr, wr_ptr;

  assign head_valid = (count != 0);
  assign head_pkt   = mem[rd_ptr];
  assign can_accept = (32'(count) < DEPTH) || pop;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= push_pkt;
  end

  // A grant may only be given against a vacancy, and only a present head can leave.
  a_push_room: assert property (@(posedge clk) disable iff (!rst_n) push |-> can_accept);
  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
