// htm_traffic: traffic generator and checker for end-to-end tests of
// htm_top (testbench only).
//
// One IP model per router of every cluster. Three phases run one after the
// other, each with NPKT packets per IP:
//   0 complement: IP (c, n) sends to IP (N-1-c, NR-1-n);
//   1 uniform:    random destination anywhere (all-to-all);
//   2 local:      random destination in the sender's own cluster.
// A packet is header, size S (1..MAXPAY), then S payload flits; the first
// payload flit is a unique packet number. Every sink (with random credit)
// checks each arriving packet against the copy kept for its number: right
// cluster and router, same size and payload. Latency is measured from the
// clock the header enters the network to the clock the last flit leaves it.
// In the uniform phase the IPs of cluster 0 stop accepting flits for 3000
// clocks in every 4000.
// Mechanism counters: packets delivered inside a cluster and across
// clusters, cycles with an arbiter conflict, cycles with two or more
// optical paths held at once, cycles with a cluster interface refusing
// traffic (dest_ready low), IP injections stalled for lack of credit.
module htm_traffic
  import htm_pkg::*;
#(
  parameter int unsigned KX = 3,
  parameter int unsigned KY = 3,
  parameter int unsigned NX = 5,
  parameter int unsigned NY = 5,
  parameter int unsigned NPKT = 2,
  parameter int unsigned MAXPAY = 16,
  localparam int unsigned N  = KX * KY,
  localparam int unsigned NR = NX * NY
) (
  input  logic         clk,
  input  logic         rst_n,
  output link_t        ip_in         [N][NR],
  input  logic         ip_in_credit  [N][NR],
  input  link_t        ip_out        [N][NR],
  output logic         ip_out_credit [N][NR],
  input  logic [N-1:0] arb_ack,
  input  logic [N-1:0] arb_conflict,
  input  logic [N-1:0] ci_overflow,
  input  logic [N-1:0] dest_ready,
  output bit           done,
  output int           checks,
  output int           failures
);
  int phase = -1;
  int sent = 0, delivered = 0, remote_del = 0, local_del = 0;
  int conflict_cyc = 0, multi_path_cyc = 0, not_ready_cyc = 0, stall = 0;
  longint cyc = 0;
  longint lat_sum [3] = '{0, 0, 0};
  int     lat_cnt [3] = '{0, 0, 0};
  flit_t  exp_pkt [int][$];
  longint t_start [int];
  int     exp_dst [int];
  int     next_id = 1;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin checks = 0; failures = 0; done = 0; end

  always @(posedge clk) if (rst_n) begin
    if (arb_conflict != '0) conflict_cyc++;
    if ($countones(arb_ack) >= 2) multi_path_cyc++;
    if (dest_ready != '1) not_ready_cyc++;
    check(ci_overflow == '0, "no cluster-interface overflow");
  end

  for (genvar c = 0; c < N; c++) begin : g_c
    for (genvar n = 0; n < NR; n++) begin : g_n
      flit_t  q [$];
      int     cnt = 0, ph_done = -1;
      int     hdr_id = 0;
      bit     first = 1;
      // source
      always @(negedge clk) begin
        if (!rst_n) begin
          ip_in[c][n] = '0;
        end else begin
          if (q.size() == 0 && phase >= 0 && ph_done != phase) begin
            if (cnt < NPKT) begin
              int dc, dn, sz, id;
              flit_t pk [$];
              pk.delete();
              case (phase)
                0: begin dc = N - 1 - c; dn = NR - 1 - n; end
                1: begin dc = $urandom % N; dn = $urandom % NR; end
                default: begin dc = c; dn = $urandom % NR; end
              endcase
              sz = 1 + $urandom % MAXPAY;
              id = next_id++;
              pk.push_back(make_hdr(dc, dn % NX, dn / NX));
              pk.push_back(flit_t'(sz));
              pk.push_back(flit_t'(id));
              for (int k = 1; k < sz; k++) pk.push_back(flit_t'($urandom));
              exp_pkt[id] = pk;
              exp_dst[id] = dc * NR + dn;
              q = pk;
              hdr_id = id;
              first = 1;
              cnt++;
              sent++;
            end else begin
              ph_done = phase;
              cnt = 0;
            end
          end
          ip_in[c][n].valid = q.size() > 0 && ip_in_credit[c][n] && ($urandom % 8 != 0);
          ip_in[c][n].data  = q.size() > 0 ? q[0] : '0;
          if (q.size() > 0 && !ip_in_credit[c][n]) stall++;
          // cluster 0's IPs pause for 3000 clocks in 4000 in the uniform phase, so that
          // its interface receive queue fills up
          ip_out_credit[c][n] = (phase == 1 && c == 0) ? (cyc % 4000 >= 3000)
                                                       : (($urandom % 4) != 0);
        end
      end
      always @(posedge clk) if (rst_n && ip_in[c][n].valid) begin
        if (first) t_start[hdr_id] = cyc;
        first = 0;
        void'(q.pop_front());
      end
      // sink
      flit_t rq [$];
      int    left = -1;
      always @(posedge clk) if (rst_n && ip_out[c][n].valid && ip_out_credit[c][n]) begin
        rq.push_back(ip_out[c][n].data);
        if (rq.size() == 2) left = int'(rq[1]);
        if (rq.size() >= 3 && rq.size() == left + 2) begin
          int id;
          id = int'(rq[2]);
          if (exp_pkt.exists(id)) begin
            check(exp_dst[id] == c * NR + n, $sformatf("packet %0d at its destination", id));
            check(rq == exp_pkt[id], $sformatf("packet %0d contents", id));
            if (exp_dst[id] / NR == int'(hdr_cluster(rq[0])) &&
                32'(hdr_cluster(rq[0])) == 32'(c)) begin
              if (t_start[id] >= 0) begin
                lat_sum[phase < 0 ? 0 : phase] += cyc - t_start[id];
                lat_cnt[phase < 0 ? 0 : phase]++;
              end
            end
            exp_pkt.delete(id);
            delivered++;
          end else check(0, $sformatf("unknown packet %0d at (%0d,%0d)", id, c, n));
          rq.delete();
          left = -1;
        end
      end
    end
  end

  // Cross-cluster deliveries are those whose sender was in another cluster;
  // the packet number ranges per phase make the count per phase easy.
  initial begin
    @(posedge rst_n);
    repeat (5) @(posedge clk);
    for (int p = 0; p < 3; p++) begin
      int del0;
      del0 = delivered;
      phase = p;
      wait (sent == (p + 1) * N * NR * NPKT);
      wait (exp_pkt.size() == 0);
      if (p == 2) local_del = delivered - del0;
      else remote_del += delivered - del0;
      if (lat_cnt[p] > 0)
        $display("phase %0d: %0d packets, mean latency %0d clocks", p,
                 delivered - del0, lat_sum[p] / lat_cnt[p]);
      repeat (20) @(posedge clk);
    end
    check(delivered == 3 * N * NR * NPKT, $sformatf("delivered %0d", delivered));
    check(remote_del > 0, "traffic between clusters");
    check(local_del > 0, "traffic inside clusters");
    check(conflict_cyc > 0, "arbiter conflicts occurred");
    check(multi_path_cyc > 0, "several optical paths held at once");
    check(not_ready_cyc > 0, "cluster interface back-pressure occurred");
    check(stall > 0, "NoC credit stalls occurred");
    $display("delivered=%0d remote_phases=%0d local=%0d conflict_cycles=%0d multi_path_cycles=%0d not_ready_cycles=%0d stalls=%0d cycles=%0d",
             delivered, remote_del, local_del, conflict_cyc, multi_path_cyc, not_ready_cyc, stall, cyc);
    done = 1;
  end
endmodule
