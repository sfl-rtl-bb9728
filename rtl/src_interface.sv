// src_interface: input interface from a processor to the banyan network.
//
// A FIFO queue and a control unit. The processor hands in a destination and
// a payload; the interface builds the packet header (the routing tags of the
// chosen network kind, see sfl_pkg) and queues the packet. The control unit
// raises the request signal while a packet is at the front of the queue and
// removes it when the switch returns the grant signal. The queue absorbs
// bursts and rate mismatch between processor and network.
//
// The network study gives the processor queue infinite room so that the
// network, not the processor, limits throughput; here it is DEPTH deep and
// gen_ready tells the processor when it is full. SINGLE_ENDED selects the
// single-ended header (reflection level and up/down tags) instead of the
// double-ended one.
//
// Timing: a packet accepted in cycle t requests the network from cycle t+1.
module src_interface
  import sfl_pkg::*;
#(
  parameter int unsigned DEPTH        = 64,
  parameter int unsigned F_LOG        = 1,
  parameter int unsigned L            = 7,
  parameter bit          SINGLE_ENDED = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   port_id,
  // from the processor
  input  logic              gen_valid,
  input  logic [ID_W-1:0]   gen_dest,
  input  logic [DATA_W-1:0] gen_data,
  output logic              gen_ready,
  // to the first switch: request + packet out, grant in
  output logic              net_req,
  output packet_t           net_pkt,
  input  logic              net_gnt
);
  packet_t hdr;

  always_comb begin
    if (SINGLE_ENDED) hdr = se_header(F_LOG, L, port_id, gen_dest, gen_data);
    else              hdr = des_header(F_LOG, L, port_id, gen_dest, gen_data);
  end

  pkt_queue #(.DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .push       (gen_valid && gen_ready),
    .push_pkt   (hdr),
    .pop        (net_req && net_gnt),
    .head_valid (net_req),
    .head_pkt   (net_pkt),
    .can_accept (gen_ready),
    .count      ()
  );

endmodule
