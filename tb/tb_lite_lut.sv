// tb_lite_lut: self-checking test of the LITE-LUT on the default 3 x 3
// torus. Every entry is read through two ports and compared with the next
// hop worked out from the torus distance formula and the documented
// tie-break order (east, west, north, south; ejection at the destination).
module tb_lite_lut;
  import htm_pkg::*;
  localparam int KX = 3, KY = 3, N = KX * KY, IW = $clog2(N);
  logic [IW-1:0] rd_router [2];
  logic [IW-1:0] rd_dest   [2];
  logic [2:0]    rd_port   [2];
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  lite_lut #(.KX(KX), .KY(KY), .NRD(2)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tdist(int a, int b);
    int dx, dy;
    dx = (a % KX) - (b % KX); if (dx < 0) dx = -dx;
    dy = (a / KX) - (b / KX); if (dy < 0) dy = -dy;
    if (KX - dx < dx) dx = KX - dx;
    if (KY - dy < dy) dy = KY - dy;
    return dx + dy;
  endfunction

  function automatic logic [2:0] ref_port(int r, int d);
    int x, y;
    x = r % KX; y = r / KX;
    if (r == d) return 3'(OP_EJ);
    if (tdist(y * KX + (x + 1) % KX, d) == tdist(r, d) - 1) return 3'(OP_E);
    if (tdist(y * KX + (x + KX - 1) % KX, d) == tdist(r, d) - 1) return 3'(OP_W);
    if (tdist(((y + 1) % KY) * KX + x, d) == tdist(r, d) - 1) return 3'(OP_N);
    return 3'(OP_S);
  endfunction

  initial begin
    for (int r = 0; r < N; r++)
      for (int d = 0; d < N; d++) begin
        rd_router[0] = IW'(r); rd_dest[0] = IW'(d);
        rd_router[1] = IW'(d); rd_dest[1] = IW'(r);
        @(posedge clk);
        checks += 2;
        if (rd_port[0] != ref_port(r, d)) begin
          failures++; $display("FAIL (%0d,%0d) got %0d", r, d, rd_port[0]);
        end
        if (rd_port[1] != ref_port(d, r)) begin
          failures++; $display("FAIL (%0d,%0d) got %0d", d, r, rd_port[1]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
