// sink_interface: output interface from the banyan network to a memory (or,
// in a single-ended network, to the receiving side of a processor).
//
// A FIFO queue and a control unit. The control unit takes the request signal
// of the last switch queue and answers with a grant whenever its own queue
// has room this cycle (room counted after the memory drains the front); the
// granted packet enters the queue at the clock edge. The memory side reads
// the front with a valid/ready pair.
//
// Grants start here and ripple back through the switches within the cycle.
// The network study lets a memory absorb one packet per cycle; with
// mem_ready held high this interface does exactly that. The queue depth and
// the valid/ready read side are this design's choices. net_room (room this
// cycle, whether or not a request is present) serves a switch that decides
// the transfer itself, as the half-duplex switch does.
module sink_interface
  import sfl_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // from the last switch: request + packet in, grant out
  input  logic    net_req,
  input  packet_t net_pkt,
  output logic    net_gnt,
  output logic    net_room,
  // to the memory
  output logic    mem_valid,
  output packet_t mem_pkt,
  input  logic    mem_ready
);
  logic room;

  assign net_gnt  = net_req && room;
  assign net_room = room;

  pkt_queue #(.DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .push       (net_gnt),
    .push_pkt   (net_pkt),
    .pop        (mem_valid && mem_ready),
    .head_valid (mem_valid),
    .head_pkt   (mem_pkt),
    .can_accept (room),
    .count      ()
  );

endmodule
