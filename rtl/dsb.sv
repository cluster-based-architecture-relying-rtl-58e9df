// dsb: Dynamic Setup Block of the optical-network arbiter.
//
// For every source cluster i with requested destination dest[i], the block
// computes in the same cycle the complete optical path and the switch
// settings it needs, by walking the LITE-LUT: starting at router i with the
// light entering on the injection port, it reads the output port for
// (router, dest[i]), records "router r, output o is fed from input in",
// moves to the neighbour behind o (arriving on the opposite port) and
// repeats until the LUT answers OP_EJ. A shortest path in a KX x KY torus
// crosses at most KX/2 + KY/2 + 1 routers, so the walk is unrolled that many
// steps, one LITE-LUT copy per step (N read ports each) and all sources in
// parallel.
//
// Outputs, per source i: use[i] has bit r*NOPORT+o set for every router
// output the path occupies (the ejection output of the destination
// included); sel[i][r*NOPORT+o] is the input port that output must take.
// Purely combinational. The document names the block and its job (real-time
// path calculation from the reduced LUT, path attribution); the walk itself
// is this design's.
module dsb
  import htm_pkg::*;
#(
  parameter int unsigned KX = 3,
  parameter int unsigned KY = 3,
  localparam int unsigned N    = KX * KY,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NE   = N * NOPORT,
  localparam int unsigned MAXH = KX / 2 + KY / 2 + 1
) (
  input  logic [IW-1:0] dest [N],
  output logic [NE-1:0] use_map [N],
  output logic [2:0]    sel [N][NE]
);
  // Step h reads the LITE-LUT at the router reached after h hops. Each
  // step's signals live in its own generate scope and accumulate the path
  // found so far (u_acc, s_acc); a path never revisits a router output, so
  // the settings can be merged with OR.
  for (genvar h = 0; h < MAXH; h++) begin : g_step
    logic [IW-1:0] r_cur  [N];
    logic [2:0]    in_cur [N];
    logic          live   [N];
    logic [2:0]    po     [N];
    logic [NE-1:0] u_acc  [N];
    logic [2:0]    s_acc  [N][NE];
    logic [NE-1:0] u_prev [N];
    logic [2:0]    s_prev [N][NE];

    for (genvar i = 0; i < N; i++) begin : g_src
      if (h == 0) begin : g_first
        assign r_cur[i]  = IW'(i);
        assign in_cur[i] = 3'(OP_EJ);
        assign live[i]   = 1'b1;
        assign u_prev[i] = '0;
        for (genvar k = 0; k < NE; k++) begin : g_z
          assign s_prev[i][k] = '0;
        end
      end else begin : g_next
        assign r_cur[i]  = IW'(palc_pkg::nbr(KX, KY, 32'(g_step[h-1].r_cur[i]),
                                             32'(g_step[h-1].po[i])));
        assign in_cur[i] = op_opposite(g_step[h-1].po[i]);
        assign live[i]   = g_step[h-1].live[i] && (g_step[h-1].po[i] != 3'(OP_EJ));
        assign u_prev[i] = g_step[h-1].u_acc[i];
        assign s_prev[i] = g_step[h-1].s_acc[i];
      end

      always_comb begin
        int unsigned e;
        e = 32'(r_cur[i]) * NOPORT + 32'(po[i]);
        for (int k = 0; k < NE; k++) begin
          u_acc[i][k] = u_prev[i][k];
          s_acc[i][k] = s_prev[i][k];
          if (live[i] && 32'(k) == e) begin
            u_acc[i][k] = 1'b1;
            s_acc[i][k] = s_acc[i][k] | in_cur[i];
          end
        end
      end
    end

    lite_lut #(.KX(KX), .KY(KY), .NRD(N)) u_lut (
      .rd_router(r_cur),
      .rd_dest  (dest),
      .rd_port  (po)
    );
  end

  assign use_map = g_step[MAXH-1].u_acc;
  assign sel     = g_step[MAXH-1].s_acc;

endmodule
