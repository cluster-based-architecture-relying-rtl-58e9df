// tb_optical_torus: self-checking test of the optical layer (3 x 3 torus).
// For every source/destination pair the test sets the routers along a
// path it works out itself (east/west first, then north/south, shortest
// way round the torus), sends a random bit pattern into the source's
// injection port and checks that exactly that pattern leaves the
// destination's ejection port, delayed by one clock per router crossed,
// and that no other ejection port sees light.
module tb_optical_torus;
  import htm_pkg::*;
  localparam int KX = 3, KY = 3, N = KX * KY, NE = N * NOPORT;
  logic  clk = 0, rst_n = 0;
  opt_t  inj [N];
  opt_t  ej  [N];
  ocfg_t cfg [NE];
  int checks = 0, failures = 0;

  optical_torus #(.KX(KX), .KY(KY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) inj[i] = '0;
    for (int e = 0; e < NE; e++) cfg[e] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++) begin
        int x, y, dx, dy, r, nrout;
        logic [2:0] inp;
        logic [31:0] pat;
        opt_t got [$];
        for (int e = 0; e < NE; e++) cfg[e] = '0;
        x = s % KX; y = s / KX;
        dx = (d % KX) - x; dy = (d / KX) - y;
        if (dx > KX / 2) dx -= KX;
        if (dx < -(KX / 2)) dx += KX;
        if (dy > KY / 2) dy -= KY;
        if (dy < -(KY / 2)) dy += KY;
        inp = 3'(OP_EJ); nrout = 0;
        while (dx != 0) begin
          r = y * KX + x;
          cfg[r*NOPORT + (dx > 0 ? OP_E : OP_W)] = '{en: 1'b1, src: inp};
          inp = dx > 0 ? 3'(OP_W) : 3'(OP_E);
          x = dx > 0 ? (x + 1) % KX : (x + KX - 1) % KX;
          dx += dx > 0 ? -1 : 1;
          nrout++;
        end
        while (dy != 0) begin
          r = y * KX + x;
          cfg[r*NOPORT + (dy > 0 ? OP_N : OP_S)] = '{en: 1'b1, src: inp};
          inp = dy > 0 ? 3'(OP_S) : 3'(OP_N);
          y = dy > 0 ? (y + 1) % KY : (y + KY - 1) % KY;
          dy += dy > 0 ? -1 : 1;
          nrout++;
        end
        cfg[d*NOPORT + OP_EJ] = '{en: 1'b1, src: inp};
        nrout++;
        pat = $urandom;
        for (int t = 0; t < 32 + nrout + 2; t++) begin
          @(negedge clk);
          inj[s] = (t < 32) ? '{valid: 1'b1, data: pat[t]} : '0;
          @(posedge clk);
          #1;
          for (int i = 0; i < N; i++)
            if (i != d && ej[i].valid) begin
              checks++; failures++; $display("FAIL light at %0d", i);
            end
          if (t + 1 >= nrout && t + 1 - nrout < 32) begin
            checks++;
            if (ej[d] !== '{valid: 1'b1, data: pat[t + 1 - nrout]}) begin
              failures++; $display("FAIL %0d->%0d bit %0d", s, d, t + 1 - nrout);
            end
          end
        end
        @(negedge clk) inj[s] = '0;
        repeat (4) @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
