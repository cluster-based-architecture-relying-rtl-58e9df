// tb_ref_pkg: reference models shared by the testbenches.
// Optical paths in a KX x KY torus are worked out here from the torus
// distance formula, independently of the PALC search in the RTL: from each
// router the first of east, west, north, south that brings the light one
// hop closer to the destination, and ejection at the destination.
package tb_ref_pkg;
  import htm_pkg::*;

  typedef struct {
    int         e;     // router * NOPORT + output port
    logic [2:0] src;   // input port feeding that output
  } hop_t;

  function automatic int tdist(int kx, int ky, int a, int b);
    int dx, dy;
    dx = (a % kx) - (b % kx); if (dx < 0) dx = -dx;
    dy = (a / kx) - (b / kx); if (dy < 0) dy = -dy;
    if (kx - dx < dx) dx = kx - dx;
    if (ky - dy < dy) dy = ky - dy;
    return dx + dy;
  endfunction

  function automatic int neighbour(int kx, int ky, int r, int p);
    int x, y;
    x = r % kx; y = r / kx;
    case (p)
      OP_E: x = (x + 1) % kx;
      OP_W: x = (x + kx - 1) % kx;
      OP_N: y = (y + 1) % ky;
      OP_S: y = (y + ky - 1) % ky;
      default: ;
    endcase
    return y * kx + x;
  endfunction

  function automatic int ref_port(int kx, int ky, int r, int d);
    int order [4] = '{OP_E, OP_W, OP_N, OP_S};
    if (r == d) return OP_EJ;
    foreach (order[k])
      if (tdist(kx, ky, neighbour(kx, ky, r, order[k]), d) == tdist(kx, ky, r, d) - 1)
        return order[k];
    return -1;
  endfunction

  function automatic int opposite(int p);
    case (p)
      OP_E: return OP_W;
      OP_W: return OP_E;
      OP_N: return OP_S;
      OP_S: return OP_N;
      default: return OP_EJ;
    endcase
  endfunction

  // The router outputs a connection s -> d occupies, in path order.
  function automatic void ref_path(int kx, int ky, int s, int d, ref hop_t path [$]);
    int r, inp, p;
    path.delete();
    r = s; inp = OP_EJ;
    for (int k = 0; k < kx + ky + 2; k++) begin
      p = ref_port(kx, ky, r, d);
      path.push_back('{e: r * NOPORT + p, src: 3'(inp)});
      if (p == OP_EJ) break;
      inp = opposite(p);
      r = neighbour(kx, ky, r, p);
    end
  endfunction
endpackage
