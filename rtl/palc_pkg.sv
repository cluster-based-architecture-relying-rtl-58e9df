// palc_pkg: Path Analyzer and LUT Creation (PALC).
//
// PALC analyses the optical topology off line and produces the routing table
// that the arbiter keeps in its LITE-LUT. As described, it runs Dijkstra's
// shortest-path algorithm over the network and evaluates every
// source/destination pair. Here that analysis is a constant function that is
// evaluated while the design elaborates, so the table is computed rather
// than stored as a data file.
//
// The topology is a KX x KY torus of optical routers (the HTM optical layer);
// router index r = y*KX + x, north is y+1, east is x+1, both wrapping. All
// links weigh 1. palc_next_port(kx, ky, r, d) runs Dijkstra from d and
// returns the output port router r must use towards d: OP_EJ when r == d,
// otherwise the first neighbour, in the order E, W, N, S, whose distance to d
// is one less than r's. The tie-break order (X before Y) is a choice of this
// design. Following the ports hop by hop from any source gives a shortest
// path, so the table only needs one entry per (switch, destination).
package palc_pkg;
  import htm_pkg::*;

  localparam int MAXN = 256;

  function automatic int nbr(int kx, int ky, int r, int port);
    int x, y;
    x = r % kx;
    y = r / kx;
    case (port)
      OP_E:    x = (x + 1) % kx;
      OP_W:    x = (x + kx - 1) % kx;
      OP_N:    y = (y + 1) % ky;
      OP_S:    y = (y + ky - 1) % ky;
      default: ;
    endcase
    return y * kx + x;
  endfunction

  // Dijkstra from destination d (unit link weights): the hop distance of
  // router r to d.
  function automatic int palc_dist(int kx, int ky, int r, int d);
    int  dd[MAXN];
    bit  done[MAXN];
    int  n, u, best, nd, v;
    n = kx * ky;
    for (int i = 0; i < n; i++) begin
      dd[i]   = 1 << 20;
      done[i] = 1'b0;
    end
    dd[d] = 0;
    for (int it = 0; it < n; it++) begin
      best = 1 << 21;
      u = 0;
      for (int i = 0; i < n; i++)
        if (!done[i] && dd[i] < best) begin
          best = dd[i];
          u = i;
        end
      done[u] = 1'b1;
      for (int p = 1; p < NOPORT; p++) begin
        v  = nbr(kx, ky, u, p);
        nd = dd[u] + 1;
        if (nd < dd[v]) dd[v] = nd;
      end
    end
    return dd[r];
  endfunction

  function automatic logic [2:0] palc_next_port(int kx, int ky, int r, int d);
    int here;
    if (r == d) return 3'(OP_EJ);
    here = palc_dist(kx, ky, r, d);
    if (palc_dist(kx, ky, nbr(kx, ky, r, OP_E), d) == here - 1) return 3'(OP_E);
    if (palc_dist(kx, ky, nbr(kx, ky, r, OP_W), d) == here - 1) return 3'(OP_W);
    if (palc_dist(kx, ky, nbr(kx, ky, r, OP_N), d) == here - 1) return 3'(OP_N);
    return 3'(OP_S);
  endfunction

endpackage
