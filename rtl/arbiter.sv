// arbiter: centralized low-latency arbiter of the HTM optical layer.
//
// Each of the N = KX*KY clusters owns one arbiter port. Handshake per port i:
//   rx[i] with dest[i]  request a connection to cluster dest[i]; hold both
//                       until ack[i] rises;
//   ack[i]              rises one clock after the request is seen when it
//                       can be served, and stays high while the optical path
//                       is reserved for port i;
//   tail[i]             end of the communication; the path is released at
//                       the next clock edge, and ack[i] falls there;
//   tail_ack[i]         tail[i] delayed by one clock;
//   output_conflict[j]  two or more ports are requesting destination j
//                       (combinational, from the current requests).
// A waiting request needs: its destination's ejection port and every router
// output on its path free (or being released in this cycle) and
// dest_ready[dest] high. The conflict resolution block (crb) chooses
// round-robin among the eligible requesters of each destination; the
// dynamic setup block (dsb) builds each path from the LITE-LUT. Candidates
// of different destinations are admitted in destination order, each only if
// its path does not overlap a path admitted before it in the same cycle.
//
// cfg[r*NOPORT+o] is the registered setting of output o of optical router r
// ({en, input port}); it changes at the clock edge where ack rises or falls.
//
// From the document: the three parts (CRB, LUT, DSB), the port signals of
// its arbiter waveform (rx, ack, tail, tail_ack, output_conflict, dest),
// the one-cycle request-to-ack latency and the release by tail. This
// design's choices: reserving whole paths in the torus, the same-cycle
// release/regrant, dest_ready and the admission order.
module arbiter
  import htm_pkg::*;
#(
  parameter int unsigned KX = 3,
  parameter int unsigned KY = 3,
  localparam int unsigned N  = KX * KY,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NE = N * NOPORT
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  rx,
  input  logic [IW-1:0] dest [N],
  input  logic [N-1:0]  dest_ready,
  input  logic [N-1:0]  tail,
  output logic [N-1:0]  ack,
  output logic [N-1:0]  tail_ack,
  output logic [N-1:0]  output_conflict,
  output ocfg_t         cfg [NE]
);
  // Reservation table: one entry per optical router output.
  logic [NE-1:0] busy;
  logic [IW-1:0] owner [NE];
  logic [2:0]    insel [NE];

  logic [NE-1:0] use_map [N];
  logic [2:0]    sel [N][NE];

  logic [N-1:0]  pending, release_i, elig, grant, taken, win_vld;
  logic [IW-1:0] win_idx [N];
  logic [NE-1:0] rel_mask, busy_base;

  dsb #(.KX(KX), .KY(KY)) u_dsb (
    .dest   (dest),
    .use_map(use_map),
    .sel    (sel)
  );

  crb #(.N(N)) u_crb (
    .clk, .rst_n,
    .req     (pending),
    .dest    (dest),
    .elig    (elig),
    .taken   (taken),
    .conflict(output_conflict),
    .win_vld (win_vld),
    .win_idx (win_idx)
  );

  always_comb begin
    release_i = tail & ack;
    pending   = rx & ~ack;
    for (int e = 0; e < NE; e++)
      rel_mask[e] = busy[e] && release_i[owner[e]];
    busy_base = busy & ~rel_mask;
    for (int i = 0; i < N; i++)
      elig[i] = pending[i] && ((use_map[i] & busy_base) == '0)
                && dest_ready[dest[i]];
  end

  always_comb begin
    logic [NE-1:0] claimed;
    // Admit the per-destination candidates in order, without overlap.
    claimed = busy_base;
    grant   = '0;
    taken   = '0;
    for (int j = 0; j < N; j++) begin
      if (win_vld[j] && ((use_map[win_idx[j]] & claimed) == '0)) begin
        grant[win_idx[j]] = 1'b1;
        taken[j]          = 1'b1;
        claimed           = claimed | use_map[win_idx[j]];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ack      <= '0;
      tail_ack <= '0;
      busy     <= '0;
      for (int e = 0; e < NE; e++) begin
        owner[e] <= '0;
        insel[e] <= '0;
      end
    end else begin
      ack      <= (ack & ~release_i) | grant;
      tail_ack <= tail;
      for (int e = 0; e < NE; e++) begin
        if (rel_mask[e]) busy[e] <= 1'b0;
        for (int i = 0; i < N; i++) begin
          if (grant[i] && use_map[i][e]) begin
            busy[e]  <= 1'b1;
            owner[e] <= IW'(i);
            insel[e] <= sel[i][e];
          end
        end
      end
    end
  end

  always_comb
    for (int e = 0; e < NE; e++) begin
      cfg[e].en  = busy[e];
      cfg[e].src = insel[e];
    end

  // Only waiting requests are granted, and a held path is never re-granted.
  a_grant_pending: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~pending) == '0);

endmodule
