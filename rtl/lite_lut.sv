// lite_lut: the arbiter's LITE-LUT, a read-only routing table for the
// optical torus.
//
// Storing the complete route of every source/destination combination would
// be costly, so the table holds only one switch's part of a path: for each
// optical router r and destination d, the output port of r that a
// connection towards d must use (OP_EJ at the destination itself). The
// dynamic setup block assembles whole paths from these entries.
//
// The N x N entries (N = KX*KY) are computed during elaboration by the PALC
// shortest-path analysis (palc_pkg), so the table always matches the torus
// size. NRD independent combinational read ports: rd_port[k] is the entry
// at (rd_router[k], rd_dest[k]) in the same cycle. Addresses of N or more
// return OP_EJ. The read-port count is a choice of this design.
module lite_lut
  import htm_pkg::*;
  import palc_pkg::*;
#(
  parameter int unsigned KX  = 3,
  parameter int unsigned KY  = 3,
  parameter int unsigned NRD = 1,
  localparam int unsigned N  = KX * KY,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [IW-1:0] rd_router [NRD],
  input  logic [IW-1:0] rd_dest   [NRD],
  output logic [2:0]    rd_port   [NRD]
);
  logic [2:0] rom [N][N];

  for (genvar r = 0; r < N; r++) begin : g_r
    for (genvar d = 0; d < N; d++) begin : g_d
      localparam logic [2:0] ENTRY = palc_next_port(KX, KY, r, d);
      assign rom[r][d] = ENTRY;
    end
  end

  always_comb
    for (int k = 0; k < NRD; k++)
      rd_port[k] = (32'(rd_router[k]) < N && 32'(rd_dest[k]) < N)
                   ? rom[rd_router[k]][rd_dest[k]] : 3'(OP_EJ);

endmodule
