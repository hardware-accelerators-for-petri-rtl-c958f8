// Reference model for the testbenches: a plain software Petri-net
// interpreter and breadth-first reachability search, written independently
// of the RTL. A marking of up to 64 bits is held in a longint with place p
// at bits p*tb .. p*tb+tb-1, which is also how the RTL packs it into its
// simulator and storage words. Nets are given as incidence bit vectors,
// pre[t*n+p] / post[t*n+p], for at most 4096 arcs.
package pn_ref_pkg;

  typedef bit [4095:0] net_t;

  function automatic int tokens(longint unsigned mk, int p, int tb);
    return int'((mk >> (p*tb)) & ((64'd1 << tb) - 1));
  endfunction

  function automatic longint unsigned set_tokens(longint unsigned mk, int p, int tb, int v);
    longint unsigned mask;
    mask = ((64'd1 << tb) - 1) << (p*tb);
    return (mk & ~mask) | ((longint'(v) << (p*tb)) & mask);
  endfunction

  function automatic bit enabled(int n, int t, net_t pre, longint unsigned mk, int tb);
    for (int p = 0; p < n; p++)
      if (pre[t*n+p] && tokens(mk, p, tb) == 0) return 0;
    return 1;
  endfunction

  // Fire t; sets ovf when a place would pass 2**tb-1.
  function automatic longint unsigned fire(int n, int t, net_t pre, net_t post,
                                           longint unsigned mk, int tb, output bit ovf);
    longint unsigned r;
    int v;
    r = mk;
    ovf = 0;
    for (int p = 0; p < n; p++) begin
      v = tokens(mk, p, tb) - int'(pre[t*n+p]) + int'(post[t*n+p]);
      if (v > (1 << tb) - 1) ovf = 1;
      else r = set_tokens(r, p, tb, v);
    end
    return r;
  endfunction

  // Breadth-first reachability set. Returns the number of states; "seen"
  // holds them, "arcs" counts enabled (state, transition) pairs.
  function automatic int reach(int n, int m, net_t pre, net_t post, int tb,
                               longint unsigned init, ref bit seen[longint unsigned],
                               output longint arcs, output bit ovf);
    longint unsigned q[$];
    longint unsigned s, nx;
    bit o;
    seen.delete();
    arcs = 0;
    ovf = 0;
    q.push_back(init);
    seen[init] = 1;
    while (q.size() > 0) begin
      s = q.pop_front();
      for (int t = 0; t < m; t++) begin
        if (enabled(n, t, pre, s, tb)) begin
          arcs++;
          nx = fire(n, t, pre, post, s, tb, o);
          if (o) ovf = 1;
          if (!seen.exists(nx)) begin
            seen[nx] = 1;
            q.push_back(nx);
          end
        end
      end
    end
    return seen.num();
  endfunction

  // Is b reachable from a by one firing?
  function automatic bit is_successor(int n, int m, net_t pre, net_t post, int tb,
                                      longint unsigned a, longint unsigned b);
    bit o;
    for (int t = 0; t < m; t++)
      if (enabled(n, t, pre, a, tb) && fire(n, t, pre, post, a, tb, o) == b) return 1;
    return 0;
  endfunction

endpackage
