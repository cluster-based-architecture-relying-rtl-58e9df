// htm_top: Hybrid Torus MPSoC (HTM).
//
// KX x KY clusters. Each cluster is an NX x NY mesh of electrical wormhole
// routers (cluster_noc), one IP per router local port, and carries traffic
// between its own IPs electrically. Traffic for another cluster goes through
// the cluster's interface (cluster_interface) onto a torus of optical
// routers (optical_torus), one optical router per cluster. The optical
// circuits are set up by one centralized arbiter (arbiter) that takes a
// request from each cluster interface, resolves destination conflicts,
// reserves a shortest path through the torus and configures the optical
// routers on it.
//
// Ports: per cluster c and router n (index y*NX + x), the IP-side link pair
// ip_in[c][n] / ip_out[c][n] with credits. A packet is a header flit (bits
// [11:8] destination cluster, [7:4] x, [3:0] y), a size flit S and S payload
// flits; S may be at most MAX_PKT-2. Observation outputs: arb_ack (clusters
// holding an optical path), arb_conflict (destinations requested by two or
// more clusters at once) and ci_overflow (sticky error, expected 0).
//
// Defaults follow the document's drawn configuration: 3 x 3 clusters of
// 5 x 5 routers. The whole design runs on one clock; the document allows a
// separate clock per cluster, which this RTL does not provide. Buffer
// depths and MAX_PKT are this design's.
module htm_top
  import htm_pkg::*;
#(
  parameter int unsigned KX        = 3,
  parameter int unsigned KY        = 3,
  parameter int unsigned NX        = 5,
  parameter int unsigned NY        = 5,
  parameter int unsigned BUF_DEPTH = 16,
  parameter int unsigned CI_DEPTH  = 128,
  parameter int unsigned MAX_PKT   = 66,
  localparam int unsigned N  = KX * KY,
  localparam int unsigned NR = NX * NY,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NE = N * NOPORT,
  localparam int unsigned DRAIN_CYCLES = KX / 2 + KY / 2 + 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  link_t        ip_in         [N][NR],
  output logic         ip_in_credit  [N][NR],
  output link_t        ip_out        [N][NR],
  input  logic         ip_out_credit [N][NR],
  output logic [N-1:0] arb_ack,
  output logic [N-1:0] arb_conflict,
  output logic [N-1:0] ci_overflow
);
  // cluster NoC <-> cluster interface
  link_t noc2ci [N];
  logic  noc2ci_credit [N];
  link_t ci2noc [N];
  logic  ci2noc_credit [N];
  // cluster interface <-> arbiter
  logic [N-1:0]  rx, tail, tail_ack, dest_ready;
  logic [IW-1:0] dest [N];
  ocfg_t         cfg [NE];
  // cluster interface <-> optical layer
  opt_t inj [N];
  opt_t ej  [N];

  for (genvar c = 0; c < N; c++) begin : g_cl
    cluster_noc #(
      .NX(NX), .NY(NY), .CLUSTER_ID(c), .BUF_DEPTH(BUF_DEPTH)
    ) u_noc (
      .clk, .rst_n,
      .ip_in        (ip_in[c]),
      .ip_in_credit (ip_in_credit[c]),
      .ip_out       (ip_out[c]),
      .ip_out_credit(ip_out_credit[c]),
      .ci_in        (ci2noc[c]),
      .ci_in_credit (ci2noc_credit[c]),
      .ci_out       (noc2ci[c]),
      .ci_out_credit(noc2ci_credit[c])
    );

    cluster_interface #(
      .N(N), .CI_DEPTH(CI_DEPTH), .MAX_PKT(MAX_PKT), .DRAIN_CYCLES(DRAIN_CYCLES)
    ) u_ci (
      .clk, .rst_n,
      .from_noc       (noc2ci[c]),
      .from_noc_credit(noc2ci_credit[c]),
      .to_noc         (ci2noc[c]),
      .to_noc_credit  (ci2noc_credit[c]),
      .arb_rx         (rx[c]),
      .arb_dest       (dest[c]),
      .arb_ack        (arb_ack[c]),
      .arb_tail       (tail[c]),
      .arb_tail_ack   (tail_ack[c]),
      .dest_ready     (dest_ready[c]),
      .opt_tx         (inj[c]),
      .opt_rx         (ej[c]),
      .rx_overflow    (ci_overflow[c])
    );
  end

  arbiter #(.KX(KX), .KY(KY)) u_arb (
    .clk, .rst_n,
    .rx             (rx),
    .dest           (dest),
    .dest_ready     (dest_ready),
    .tail           (tail),
    .ack            (arb_ack),
    .tail_ack       (tail_ack),
    .output_conflict(arb_conflict),
    .cfg            (cfg)
  );

  optical_torus #(.KX(KX), .KY(KY)) u_oin (
    .clk, .rst_n,
    .inj(inj),
    .ej (ej),
    .cfg(cfg)
  );

endmodule
