// sfl_pkg: types, constants and routing functions shared by the banyan switch
// network RTL.
//
// A packet ("packet train") moves one hop per network cycle as a whole. Its
// header carries the routing tags that the switches read: one digit per level
// for the way up (T-queue select, or the output queue select of a
// double-ended switch) and one digit per level for the way down (B-queue
// select), plus gdist, the number of up-hops still to go before the packet is
// reflected. The tags are computed once, at the source interface, by the
// functions below; the switches only index them by their own level.
//
// Network geometry (rectangular, spread = fanout = F = 2**F_LOG, levels
// 0..L): each level has W = F**L switches, the network has F*W end ports.
// CC-banyan (cylindrical crossbar) wiring: up port m of switch j at level k
// goes to switch (j + m*F**k) mod W at level k+1, which sees it on its down
// port m. End port p attaches to port (p mod F) of switch p/F at level 0.
// Sizes are fixed here for the largest network the RTL builds: 256 ports
// (8 address bits), up to 8 levels, switch size up to 4.
package sfl_pkg;

  localparam int unsigned MAX_LEVELS = 8;   // levels 0..7 of a (2,2,7) network
  localparam int unsigned ID_W       = 8;   // end-port address width (256 ports)
  localparam int unsigned DIG_W      = 2;   // one routing digit, switch size <= 4
  localparam int unsigned LVL_W      = 4;   // holds a level number 0..MAX_LEVELS
  localparam int unsigned DATA_W     = 32;  // payload carried per network cycle

  // Conflict resolution scheme used by every queue arbiter.
  typedef enum logic [1:0] {
    CR_RAND = 2'd0,  // random starting priority (LFSR)
    CR_FP   = 2'd1,  // fixed priority, lowest requester index wins
    CR_RR   = 2'd2   // round robin, last winner gets lowest priority
  } cr_scheme_e;

  typedef logic [MAX_LEVELS-1:0][DIG_W-1:0] tag_t;

  typedef struct packed {
    logic [ID_W-1:0]   dest;    // destination end port
    logic [ID_W-1:0]   src;     // source end port
    logic [LVL_W-1:0]  gdist;   // up-hops left before reflection (single-ended)
    tag_t              up_tag;  // digit per level: up / forward output select
    tag_t              dn_tag;  // digit per level: down output select
    logic [DATA_W-1:0] data;    // payload
  } packet_t;

  // Digit k (base 2**f_log) of value v.
  function automatic logic [DIG_W-1:0] digit(int unsigned f_log, int unsigned k,
                                             logic [ID_W-1:0] v);
    logic [ID_W-1:0] sh;
    sh = v >> (f_log * k);
    return DIG_W'(sh & ((ID_W'(1) << f_log) - 1'b1));
  endfunction

  // Header of a packet in a double-ended (DES) network with stages 0..l
  // (stage 0 at the sources). Stage s < l forwards on output
  // digit(s) of M = (dest/F - src/F) mod W; the last stage picks dest mod F.
  function automatic packet_t des_header(int unsigned f_log, int unsigned l,
                                         logic [ID_W-1:0] src, logic [ID_W-1:0] dest,
                                         logic [DATA_W-1:0] data);
    packet_t p;
    logic [ID_W-1:0] wmask, m;
    wmask = ID_W'((32'd1 << (f_log * l)) - 1);
    m = ((dest >> f_log) - (src >> f_log)) & wmask;
    p = '0;
    p.dest = dest;
    p.src  = src;
    p.data = data;
    for (int unsigned k = 0; k < MAX_LEVELS; k++)
      if (k < l) p.up_tag[k] = digit(f_log, k, m);
    p.up_tag[l] = digit(f_log, 0, dest);
    return p;
  endfunction

  // Lowest level at which a packet from src can be reflected towards dest
  // in a single-ended CC-banyan of levels 0..l: the smallest g with
  // delta = (dest/F - src/F) mod W in [-(F**g - 1), F**g - 1].
  function automatic logic [LVL_W-1:0] reflect_level(int unsigned f_log, int unsigned l,
                                                     logic [ID_W-1:0] src,
                                                     logic [ID_W-1:0] dest);
    logic [ID_W:0] w, delta, span;
    w = (ID_W+1)'(1) << (f_log * l);
    delta = (ID_W+1)'(ID_W'((dest >> f_log) - (src >> f_log))) & (w - 1'b1);
    for (int unsigned g = 0; g <= l; g++) begin
      span = ((ID_W+1)'(1) << (f_log * g)) - 1'b1;
      if (delta <= span || (w - delta) <= span) return LVL_W'(g);
    end
    return LVL_W'(l);
  endfunction

  // Header of a packet in a single-ended (SEFD/SEHD) network of levels 0..l.
  // The packet climbs g = reflect_level levels choosing T-queue up_tag[k] at
  // level k, turns at level g and descends choosing B-queue dn_tag[k] at
  // level k; dn_tag[0] picks the end port. Net shift U - D = delta with
  // U = delta, D = 0 when delta fits the span, else U = 0, D = W - delta.
  function automatic packet_t se_header(int unsigned f_log, int unsigned l,
                                        logic [ID_W-1:0] src, logic [ID_W-1:0] dest,
                                        logic [DATA_W-1:0] data);
    packet_t p;
    logic [ID_W:0] w, delta, span;
    logic [ID_W-1:0] u, d;
    logic [LVL_W-1:0] g;
    w = (ID_W+1)'(1) << (f_log * l);
    delta = (ID_W+1)'(ID_W'((dest >> f_log) - (src >> f_log))) & (w - 1'b1);
    g = reflect_level(f_log, l, src, dest);
    span = ((ID_W+1)'(1) << (f_log * g)) - 1'b1;
    if (delta <= span) begin
      u = ID_W'(delta);
      d = '0;
    end else begin
      u = '0;
      d = ID_W'(w - delta);
    end
    p = '0;
    p.dest  = dest;
    p.src   = src;
    p.data  = data;
    p.gdist = g;
    for (int unsigned k = 0; k < MAX_LEVELS; k++) begin
      if (k < l) p.up_tag[k] = digit(f_log, k, u);
      if (k >= 1) p.dn_tag[k] = digit(f_log, k - 1, d);
    end
    p.dn_tag[0] = digit(f_log, 0, dest);
    return p;
  endfunction

endpackage
