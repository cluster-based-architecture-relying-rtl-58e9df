// optical_torus: the HTM optical layer, a KX x KY torus of optical routers.
//
// Router r = y*KX + x sits in cluster r. Its east output feeds the west
// input of the router at x+1 (wrapping), its north output the south input
// of the router at y+1 (wrapping), and likewise for west and south. The
// injection input and ejection output of router r connect to cluster r's
// interface (inj[r], ej[r]). cfg[r*NOPORT+o] sets output o of router r, as
// computed by the arbiter. Each router adds one clock (see optical_router),
// so a path through h routers delays the light by h clocks.
//
// The torus organisation follows the document; the port names and index
// order are this design's.
module optical_torus
  import htm_pkg::*;
#(
  parameter int unsigned KX = 3,
  parameter int unsigned KY = 3,
  localparam int unsigned N  = KX * KY,
  localparam int unsigned NE = N * NOPORT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  opt_t  inj [N],
  output opt_t  ej  [N],
  input  ocfg_t cfg [NE]
);
  opt_t r_in  [N][NOPORT];
  opt_t r_out [N][NOPORT];

  for (genvar r = 0; r < N; r++) begin : g_r
    localparam int RX = r % KX;
    localparam int RY = r / KX;
    localparam int RE = RY * KX + (RX + 1) % KX;
    localparam int RW = RY * KX + (RX + KX - 1) % KX;
    localparam int RN = ((RY + 1) % KY) * KX + RX;
    localparam int RS = ((RY + KY - 1) % KY) * KX + RX;
    ocfg_t c [NOPORT];
    for (genvar o = 0; o < NOPORT; o++) begin : g_c
      assign c[o] = cfg[r*NOPORT+o];
    end
    assign r_in[r][OP_EJ] = inj[r];
    assign r_in[r][OP_W]  = r_out[RW][OP_E];
    assign r_in[r][OP_E]  = r_out[RE][OP_W];
    assign r_in[r][OP_S]  = r_out[RS][OP_N];
    assign r_in[r][OP_N]  = r_out[RN][OP_S];
    assign ej[r]          = r_out[r][OP_EJ];
    optical_router u_or (
      .clk, .rst_n,
      .in_port (r_in[r]),
      .cfg     (c),
      .out_port(r_out[r])
    );
  end

endmodule
