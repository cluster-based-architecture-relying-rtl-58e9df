// cluster_noc: the electrical network of one HTM cluster, an NX x NY mesh
// of HERMES-style routers.
//
// Router n = y*NX + x has its local port brought out for the IP it serves
// (ip_in/ip_out with their credits). Neighbours are joined in both
// directions (east of x to west of x+1, north of y to south of y+1); the
// ports on the mesh border are unused. The router at (GW_X, GW_Y) also has
// the CI port that joins the cluster interface (ci_in/ci_out): packets whose
// header names another cluster are routed there by XY routing and leave
// through it, and packets from other clusters enter through it.
//
// Mesh, XY routing and the router come from the document; it does not say
// which router the interface attaches to. The default is the centre one,
// as the optical router is drawn inside the cluster.
module cluster_noc
  import htm_pkg::*;
#(
  parameter int unsigned NX         = 5,
  parameter int unsigned NY         = 5,
  parameter int unsigned CLUSTER_ID = 0,
  parameter int unsigned GW_X       = NX / 2,
  parameter int unsigned GW_Y       = NY / 2,
  parameter int unsigned BUF_DEPTH  = 16,
  localparam int unsigned NR = NX * NY
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t ip_in         [NR],
  output logic  ip_in_credit  [NR],
  output link_t ip_out        [NR],
  input  logic  ip_out_credit [NR],
  input  link_t ci_in,
  output logic  ci_in_credit,
  output link_t ci_out,
  input  logic  ci_out_credit
);
  link_t il [NR][NPORT];
  logic  ic [NR][NPORT];
  link_t ol [NR][NPORT];
  logic  oc [NR][NPORT];

  for (genvar n = 0; n < NR; n++) begin : g_r
    localparam int X = n % NX;
    localparam int Y = n / NX;
    localparam bit GW = (X == GW_X) && (Y == GW_Y);

    // east / west
    if (X < NX - 1) begin : g_e
      assign il[n][P_EAST] = ol[n+1][P_WEST];
      assign oc[n][P_EAST] = ic[n+1][P_WEST];
    end else begin : g_ne
      assign il[n][P_EAST] = '0;
      assign oc[n][P_EAST] = 1'b0;
    end
    if (X > 0) begin : g_w
      assign il[n][P_WEST] = ol[n-1][P_EAST];
      assign oc[n][P_WEST] = ic[n-1][P_EAST];
    end else begin : g_nw
      assign il[n][P_WEST] = '0;
      assign oc[n][P_WEST] = 1'b0;
    end
    // north / south
    if (Y < NY - 1) begin : g_n
      assign il[n][P_NORTH] = ol[n+NX][P_SOUTH];
      assign oc[n][P_NORTH] = ic[n+NX][P_SOUTH];
    end else begin : g_nn
      assign il[n][P_NORTH] = '0;
      assign oc[n][P_NORTH] = 1'b0;
    end
    if (Y > 0) begin : g_s
      assign il[n][P_SOUTH] = ol[n-NX][P_NORTH];
      assign oc[n][P_SOUTH] = ic[n-NX][P_NORTH];
    end else begin : g_ns
      assign il[n][P_SOUTH] = '0;
      assign oc[n][P_SOUTH] = 1'b0;
    end
    // local
    assign il[n][P_LOCAL] = ip_in[n];
    assign oc[n][P_LOCAL] = ip_out_credit[n];
    assign ip_in_credit[n] = ic[n][P_LOCAL];
    assign ip_out[n]       = ol[n][P_LOCAL];
    // cluster interface
    if (GW) begin : g_ci
      assign il[n][P_CI] = ci_in;
      assign oc[n][P_CI] = ci_out_credit;
      assign ci_in_credit = ic[n][P_CI];
      assign ci_out       = ol[n][P_CI];
    end else begin : g_nci
      assign il[n][P_CI] = '0;
      assign oc[n][P_CI] = 1'b0;
    end

    hermes_router #(
      .BUF_DEPTH (BUF_DEPTH),
      .MY_X      (X),
      .MY_Y      (Y),
      .MY_CLUSTER(CLUSTER_ID),
      .GW_X      (GW_X),
      .GW_Y      (GW_Y),
      .HAS_CI    (GW)
    ) u_router (
      .clk, .rst_n,
      .in_link   (il[n]),
      .in_credit (ic[n]),
      .out_link  (ol[n]),
      .out_credit(oc[n])
    );
  end

endmodule
