// tb_walk_pkg: reference model of the CC-banyan wiring for the testbenches.
// It follows a packet header hop by hop through the switch positions of the
// network, independently of the header-building functions, and returns the
// end port the packet reaches, or -1 if the header is inconsistent.
package tb_walk_pkg;
  import sfl_pkg::*;

  // Double-ended: stage s output m of switch j feeds switch (j + m*F**s) mod W.
  function automatic int walk_des(int f_log, int l, packet_t p);
    int f = 1 << f_log;
    int w = 1 << (f_log * l);
    int j = int'(p.src) / f;
    for (int s = 0; s < l; s++) j = (j + int'(p.up_tag[s]) * (f ** s)) % w;
    if (int'(p.up_tag[l]) >= f) return -1;
    return f * j + int'(p.up_tag[l]);
  endfunction

  // Single-ended: climb gdist levels on up_tag, descend on dn_tag.
  function automatic int walk_se(int f_log, int l, packet_t p, output int hops);
    int f = 1 << f_log;
    int w = 1 << (f_log * l);
    int j = int'(p.src) / f;
    int g = int'(p.gdist);
    hops = 0;
    if (g > l) return -1;
    for (int k = 0; k < g; k++) begin
      j = (j + int'(p.up_tag[k]) * (f ** k)) % w;
      hops++;
    end
    for (int k = g; k >= 1; k--) begin
      j = (j + w - (int'(p.dn_tag[k]) * (f ** (k-1))) % w) % w;
      hops++;
    end
    return f * j + int'(p.dn_tag[0]);
  endfunction

  // Smallest reflection level by brute force over reachable base switches.
  function automatic int min_level(int f_log, int l, int src, int dst);
    int f = 1 << f_log;
    int w = 1 << (f_log * l);
    int d = ((dst / f) - (src / f) + w) % w;
    for (int g = 0; g <= l; g++) begin
      int span = (f ** g) - 1;
      for (int u = 0; u <= span; u++)
        for (int v = 0; v <= span; v++)
          if (((u - v) % w + w) % w == d) return g;
    end
    return -1;
  endfunction
endpackage
