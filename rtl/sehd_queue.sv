// sehd_queue: deadlock-avoiding queue unit of a single-ended half-duplex
// (SEHD) switch.
//
// One storage pool of DEPTH packet slots is shared by two FIFO lists: ULIST
// for upgoing packets and DLIST for downgoing packets; the slots in neither
// list form FREE. Each list is a singly linked list through a next-pointer
// array (head and tail pointers per list); a free slot is found with a
// priority encoder over a free-slot bitmap.
//
// Admission rule, which keeps one slot in reserve so that the flow between
// queues can never close a cycle (upgoing packets may turn downward, never
// the reverse): a packet may enter if FREE holds more than one slot, or
// FREE holds exactly one slot and either both lists are non-empty, or ULIST
// is empty and the packet is upgoing, or DLIST is empty and the packet is
// downgoing. ok_up / ok_dn give this rule for an upgoing / downgoing packet,
// from the registered state.
//
// Per network cycle the unit either takes an upgoing packet into ULIST and
// sends the ULIST front, or takes a downgoing packet into DLIST and sends the
// DLIST front (the shared half-duplex line carries one direction at a time);
// the assertions hold the switch to that. The pool, the lists and the rule
// follow the SEHD queue unit; the bitmap free-slot search is this design's.
module sehd_queue
  import sfl_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push_up,
  input  logic    push_dn,
  input  packet_t push_pkt,
  input  logic    pop_up,
  input  logic    pop_dn,
  output logic    u_valid,
  output packet_t u_head,
  output logic    d_valid,
  output packet_t d_head,
  output logic    ok_up,
  output logic    ok_dn,
  output logic [$clog2(DEPTH+1)-1:0] u_count,
  output logic [$clog2(DEPTH+1)-1:0] d_count
);
  localparam int unsigned AW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  packet_t        pool [DEPTH];
  logic [AW-1:0]  nxt  [DEPTH];
  logic [DEPTH-1:0] free_map;
  logic [AW-1:0]  u_hd, u_tl, d_hd, d_tl;
  logic [CW-1:0]  n_free;
  logic [AW-1:0]  slot;

  assign n_free  = CW'(DEPTH) - u_count - d_count;
  assign u_valid = (u_count != 0);
  assign d_valid = (d_count != 0);
  assign u_head  = pool[u_hd];
  assign d_head  = pool[d_hd];

  always_comb begin
    ok_up = (n_free > 1) || (n_free == 1 && ((u_count != 0 && d_count != 0) || u_count == 0));
    ok_dn = (n_free > 1) || (n_free == 1 && ((u_count != 0 && d_count != 0) || d_count == 0));
  end

  // lowest free slot
  always_comb begin
    slot = '0;
    for (int i = DEPTH - 1; i >= 0; i--) if (free_map[i]) slot = AW'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_map <= '1;
      u_count  <= '0;
      d_count  <= '0;
      u_hd <= '0; u_tl <= '0; d_hd <= '0; d_tl <= '0;
    end else begin
      logic [DEPTH-1:0] fm;
      fm = free_map;
      // ULIST
      if (pop_up) begin
        fm[u_hd] = 1'b1;
        u_hd <= nxt[u_hd];
      end
      if (push_up) begin
        fm[slot] = 1'b0;
        u_tl <= slot;
        if (u_count == 0 || (u_count == 1 && pop_up)) u_hd <= slot;
      end
      u_count <= u_count + CW'(push_up) - CW'(pop_up);
      // DLIST
      if (pop_dn) begin
        fm[d_hd] = 1'b1;
        d_hd <= nxt[d_hd];
      end
      if (push_dn) begin
        fm[slot] = 1'b0;
        d_tl <= slot;
        if (d_count == 0 || (d_count == 1 && pop_dn)) d_hd <= slot;
      end
      d_count <= d_count + CW'(push_dn) - CW'(pop_dn);
      free_map <= fm;
    end
  end

  always_ff @(posedge clk) begin
    if (push_up || push_dn) pool[slot] <= push_pkt;
    if (push_up && u_count != 0) nxt[u_tl] <= slot;
    if (push_dn && d_count != 0) nxt[d_tl] <= slot;
  end

  a_one_in:  assert property (@(posedge clk) disable iff (!rst_n) !(push_up && push_dn));
  a_mode:    assert property (@(posedge clk) disable iff (!rst_n)
                              !((push_up || pop_up) && (push_dn || pop_dn)));
  a_rule_up: assert property (@(posedge clk) disable iff (!rst_n) push_up |-> ok_up);
  a_rule_dn: assert property (@(posedge clk) disable iff (!rst_n) push_dn |-> ok_dn);
  a_pop_up:  assert property (@(posedge clk) disable iff (!rst_n) pop_up |-> u_valid);
  a_pop_dn:  assert property (@(posedge clk) disable iff (!rst_n) pop_dn |-> d_valid);

endmodule
