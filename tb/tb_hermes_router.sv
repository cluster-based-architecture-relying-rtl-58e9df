// tb_hermes_router: self-checking test of one router with a CI port.
//
// The router sits at (1,1) of cluster 2 and hosts the cluster interface.
// Six source models send packets into all six inputs (random destinations
// in clusters 2 and 5, random sizes 0..6, header bits [15:12] tagging the
// source); six sinks accept flits with random credit. Each sink checks that
// every packet leaves on the port given by XY routing (or the CI port for
// cluster 5), whole, uninterrupted by other packets, and in order per
// source/output pair. Also checked: a packet on an idle router crosses it
// in 2 clocks (buffer write, then forward), and that output contention and
// credit back-pressure both occur.
module tb_hermes_router;
  import htm_pkg::*;
  localparam int NP = NPORT;
  logic  clk = 0, rst_n = 0;
  link_t in_link [NP];
  logic  in_credit [NP];
  link_t out_link [NP];
  logic  out_credit [NP];
  int checks = 0, failures = 0;
  int contention = 0, stalls = 0, delivered = 0, sent_total = 0;
  bit run = 0;
  flit_t expq [NP][NP][$];   // [src][out] expected flits in order

  hermes_router #(.MY_X(1), .MY_Y(1), .MY_CLUSTER(2), .GW_X(1), .GW_Y(1),
                  .HAS_CI(1'b1)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int exp_port(flit_t h);
    if (hdr_cluster(h) != 4'd2) return P_CI;
    if (hdr_x(h) > 1) return P_EAST;
    if (hdr_x(h) < 1) return P_WEST;
    if (hdr_y(h) > 1) return P_NORTH;
    if (hdr_y(h) < 1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  // sources
  for (genvar p = 0; p < NP; p++) begin : g_src
    flit_t pkt [$];
    int    npk = 0;
    always @(negedge clk) begin
      if (run) begin
        if (pkt.size() == 0 && run && npk < 60 && ($urandom % 3) == 0) begin
          flit_t h;
          int sz, o;
          h = make_hdr(($urandom % 4 == 0) ? 5 : 2, $urandom % 3, $urandom % 3);
          h[15:12] = 4'(p);
          sz = $urandom % 7;
          o = exp_port(h);
          pkt.push_back(h);
          pkt.push_back(flit_t'(sz));
          for (int k = 0; k < sz; k++) pkt.push_back(flit_t'({4'(p), 4'(npk), 8'(k)}));
          foreach (pkt[k]) expq[p][o].push_back(pkt[k]);
          npk++;
          sent_total++;
        end
        in_link[p].valid = pkt.size() > 0 && in_credit[p] && ($urandom % 5 != 0);
        in_link[p].data  = pkt.size() > 0 ? pkt[0] : '0;
        if (pkt.size() > 0 && !in_credit[p]) stalls++;
      end
    end
    always @(posedge clk) if (rst_n && in_link[p].valid) void'(pkt.pop_front());
  end

  // sinks
  for (genvar o = 0; o < NP; o++) begin : g_sink
    int src = -1, left = 0, ph = 0;
    always @(negedge clk) out_credit[o] = run ? ($urandom % 4 != 0) : 1'b1;
    always @(posedge clk) if (rst_n && out_link[o].valid && out_credit[o]) begin
      flit_t f;
      f = out_link[o].data;
      if (ph == 0) begin
        src = int'(f[15:12]);
        check(src < NP && expq[src][o].size() > 0, "packet expected on this output");
        ph = 1;
      end
      if (src < NP && expq[src][o].size() > 0) begin
        check(f == expq[src][o][0], $sformatf("flit on output %0d from %0d", o, src));
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

  // contention: two inputs with a header waiting for the same output
  always @(posedge clk) if (rst_n) begin
    int want [NP];
    for (int o = 0; o < NP; o++) want[o] = 0;
    for (int p = 0; p < NP; p++)
      if (!dut.conn[p] && !dut.empty[p]) want[exp_port(dut.head[p])]++;
    for (int o = 0; o < NP; o++) if (want[o] > 0 && dut.busy[o]) contention++;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin in_link[p] = '0; out_credit[p] = 1; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency of a lone packet: header in at edge t, out during cycle t+1
    @(negedge clk);
    expq[0][P_EAST].push_back(make_hdr(2, 2, 1));
    expq[0][P_EAST].push_back('0);
    in_link[P_WEST].valid = 1;
    in_link[P_WEST].data  = make_hdr(2, 2, 1);
    @(posedge clk); #1;
    in_link[P_WEST] = '0;
    check(!out_link[P_EAST].valid, "not through in the write cycle");
    @(posedge clk); #1;
    check(out_link[P_EAST].valid && out_link[P_EAST].data == make_hdr(2, 2, 1), "header after 2 clocks");
    @(negedge clk);
    in_link[P_WEST].valid = 1; in_link[P_WEST].data = '0;   // size 0
    @(posedge clk); #1;
    in_link[P_WEST] = '0;
    repeat (4) @(posedge clk);
    check(!dut.busy[P_EAST], "output released after size-0 packet");
    // random traffic
    run = 1;
    wait (sent_total == 6 * 60);
    repeat (2000) @(posedge clk);
    run = 0;
    repeat (50) @(posedge clk);
    for (int p = 0; p < NP; p++)
      for (int o = 0; o < NP; o++) check(expq[p][o].size() == 0, "all flits delivered");
    check(delivered == 6 * 60 + 1, $sformatf("packets delivered %0d", delivered));
    check(contention > 0, "output contention seen");
    check(stalls > 0, "credit back-pressure seen");
    $display("delivered=%0d contention=%0d stalls=%0d", delivered, contention, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
