// tb_cluster_noc: self-checking test of a 3 x 3 cluster network.
//
// The cluster is number 1 and its interface port sits at the centre router
// (1,1). Nine IP models and a model of the cluster interface inject
// packets: IPs send to random routers of their own cluster and, one packet
// in four, to cluster 3 (these must leave through the interface port);
// the interface model sends packets to random routers of cluster 1. The
// header's top four bits tag the sender. Sinks at all local outputs and at
// the interface port accept with random credit and check every packet
// arrives at the right place, whole and in order per sender. A lone packet
// from router (0,0) to (2,2) must take two clocks per router (header seen
// at the far local port 9 clocks after it entered).
module tb_cluster_noc;
  import htm_pkg::*;
  localparam int NX = 3, NY = 3, NR = 9, NS = NR + 1;   // sender/sink 9 = CI
  logic  clk = 0, rst_n = 0;
  link_t ip_in [NR];
  logic  ip_in_credit [NR];
  link_t ip_out [NR];
  logic  ip_out_credit [NR];
  link_t ci_in, ci_out;
  logic  ci_in_credit, ci_out_credit;
  int checks = 0, failures = 0, delivered = 0, sent_total = 0, remote = 0;
  bit run = 0;
  flit_t expq [NS][NS][$];
  link_t src_l [NS];
  logic  src_c [NS];
  link_t snk_l [NS];
  logic  snk_c [NS];
  longint cyc = 0;

  cluster_noc #(.NX(NX), .NY(NY), .CLUSTER_ID(1)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar n = 0; n < NR; n++) begin : g_map
    assign ip_in[n]         = src_l[n];
    assign src_c[n]         = ip_in_credit[n];
    assign snk_l[n]         = ip_out[n];
    assign ip_out_credit[n] = snk_c[n];
  end
  assign ci_in          = src_l[NR];
  assign src_c[NR]      = ci_in_credit;
  assign snk_l[NR]      = ci_out;
  assign ci_out_credit  = snk_c[NR];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  for (genvar s = 0; s < NS; s++) begin : g_src
    flit_t pkt [$];
    int npk = 0;
    always @(negedge clk) if (run) begin
      if (pkt.size() == 0 && npk < 40 && ($urandom % 4) == 0) begin
        flit_t h;
        int sz, d, cl;
        cl = (s < NR && ($urandom % 4) == 0) ? 3 : 1;
        d = $urandom % NR;
        h = make_hdr(cl, d % NX, d / NX);
        h[15:12] = 4'(s);
        sz = $urandom % 6;
        pkt.push_back(h);
        pkt.push_back(flit_t'(sz));
        for (int k = 0; k < sz; k++) pkt.push_back(flit_t'({4'(s), 4'(npk), 8'(k)}));
        foreach (pkt[k]) expq[s][cl == 1 ? d : NR].push_back(pkt[k]);
        if (cl != 1) remote++;
        npk++;
        sent_total++;
      end
      src_l[s].valid = pkt.size() > 0 && src_c[s] && ($urandom % 4 != 0);
      src_l[s].data  = pkt.size() > 0 ? pkt[0] : '0;
    end
    always @(posedge clk) if (rst_n && src_l[s].valid) void'(pkt.pop_front());
  end

  for (genvar o = 0; o < NS; o++) begin : g_sink
    int src = -1, left = 0, ph = 0;
    always @(negedge clk) snk_c[o] = run ? ($urandom % 3 != 0) : 1'b1;
    always @(posedge clk) if (rst_n && snk_l[o].valid && snk_c[o]) begin
      flit_t f;
      f = snk_l[o].data;
      if (ph == 0) begin
        src = int'(f[15:12]);
        check(src < NS && expq[src][o].size() > 0, $sformatf("packet expected at sink %0d", o));
        ph = 1;
      end
      if (src < NS && expq[src][o].size() > 0) begin
        check(f == expq[src][o][0], $sformatf("flit at sink %0d from %0d", o, src));
        void'(expq[src][o].pop_front());
      end
      if (ph == 1) ph = 2;
      else if (ph == 2) begin
        left = int'(f);
        ph = (left == 0) ? 0 : 3;
        if (left == 0) delivered++;
      end else if (ph == 3) begin
        left--;
        if (left == 0) begin ph = 0; delivered++; end
      end
    end
  end

  initial begin
    longint c0;
    for (int s = 0; s < NS; s++) begin src_l[s] = '0; snk_c[s] = 1; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // lone packet latency (0,0) -> (2,2)
    @(negedge clk);
    expq[0][8].push_back(make_hdr(1, 2, 2));
    expq[0][8].push_back('0);
    src_l[0].valid = 1; src_l[0].data = make_hdr(1, 2, 2);
    @(posedge clk); #1 c0 = cyc;
    @(negedge clk) src_l[0].data = '0;
    @(posedge clk);
    @(negedge clk) src_l[0].valid = 0;
    wait (ip_out[8].valid);
    #1;
    check(cyc - c0 == 9, $sformatf("lone packet latency %0d", cyc - c0));
    repeat (20) @(posedge clk);
    delivered = 0;
    run = 1;
    wait (sent_total == NS * 40);
    repeat (3000) @(posedge clk);
    run = 0;
    for (int s = 0; s < NS; s++)
      for (int o = 0; o < NS; o++) check(expq[s][o].size() == 0, "all flits delivered");
    check(delivered == NS * 40, $sformatf("delivered %0d", delivered));
    check(remote > 0, "packets for other clusters seen");
    $display("delivered=%0d remote=%0d", delivered, remote);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
