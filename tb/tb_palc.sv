// tb_palc: self-checking test of the PALC shortest-path analysis.
// For several torus sizes, every (router, destination) pair: the Dijkstra
// distance must equal the torus distance worked out by formula, and
// following palc_next_port hop by hop must reach the destination in exactly
// that many hops.
module tb_palc;
  import htm_pkg::*;
  import palc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tdist(int kx, int ky, int a, int b);
    int dx, dy;
    dx = (a % kx) - (b % kx); if (dx < 0) dx = -dx;
    dy = (a / kx) - (b / kx); if (dy < 0) dy = -dy;
    if (kx - dx < dx) dx = kx - dx;
    if (ky - dy < dy) dy = ky - dy;
    return dx + dy;
  endfunction

  function automatic int step(int kx, int ky, int r, logic [2:0] p);
    int x, y;
    x = r % kx; y = r / kx;
    case (p)
      3'(OP_E): x = (x + 1) % kx;
      3'(OP_W): x = (x + kx - 1) % kx;
      3'(OP_N): y = (y + 1) % ky;
      3'(OP_S): y = (y + ky - 1) % ky;
      default: ;
    endcase
    return y * kx + x;
  endfunction

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int sizes [4][2] = '{'{3, 3}, '{4, 3}, '{2, 5}, '{5, 5}};
    for (int s = 0; s < 4; s++) begin
      int kx, ky;
      kx = sizes[s][0]; ky = sizes[s][1];
      for (int r = 0; r < kx * ky; r++)
        for (int d = 0; d < kx * ky; d++) begin
          int cur, hops;
          logic [2:0] p;
          check(palc_dist(kx, ky, r, d) == tdist(kx, ky, r, d),
                $sformatf("dist %0dx%0d %0d->%0d", kx, ky, r, d));
          cur = r; hops = 0;
          p = palc_next_port(kx, ky, cur, d);
          while (p != 3'(OP_EJ) && hops < 20) begin
            cur = step(kx, ky, cur, p);
            hops++;
            p = palc_next_port(kx, ky, cur, d);
          end
          check(cur == d && hops == tdist(kx, ky, r, d),
                $sformatf("walk %0dx%0d %0d->%0d hops %0d", kx, ky, r, d, hops));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
