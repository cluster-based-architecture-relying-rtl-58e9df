// hermes_router: electrical wormhole router of the HTM cluster networks.
//
// Follows the HERMES organisation: one input buffer per port (East, West,
// North, South, Local), a central control logic that routes one waiting
// packet header at a time, chosen round-robin among the inputs, XY routing,
// and credit-based flow control on every link. The router that hosts its
// cluster's interface (HAS_CI = 1) has a sixth port, P_CI, towards the
// cluster interface; in the others that port does not exist and its outputs
// are held at zero.
//
// Packets are wormhole-switched: a header flit, a size flit S, then S payload
// flits. When the control logic routes a header it connects the input to the
// chosen output if that output is free; the connection carries the whole
// packet and is released after its last flit. Routing (1 cycle per header):
//   destination cluster != MY_CLUSTER -> go to (GW_X, GW_Y), the router
//     holding the cluster interface, and leave there through P_CI;
//   otherwise XY: first along x (East when the target x is larger), then
//     along y (North when the target y is larger), then Local.
// Link protocol: in_credit[p] is 1 while input buffer p has a free slot;
// a sender raises valid only while it holds that credit, and the flit is
// written at that clock edge. A flit sent without credit is a protocol
// error (asserted). Flits cross the router in the cycle after they are
// written to its buffer at the earliest.
//
// From the document: the port set, buffers, central control, round-robin
// scheduling, XY routing and credit flow control. This design's choices:
// the flit and header format, buffer depth, the one-cycle routing decision,
// the round-robin pointer moving past every examined input, and the CI port.
module hermes_router
  import htm_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 16,
  parameter int unsigned MY_X       = 0,
  parameter int unsigned MY_Y       = 0,
  parameter int unsigned MY_CLUSTER = 0,
  parameter int unsigned GW_X       = 0,
  parameter int unsigned GW_Y       = 0,
  parameter bit          HAS_CI     = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  link_t in_link    [NPORT],
  output logic  in_credit  [NPORT],
  output link_t out_link   [NPORT],
  input  logic  out_credit [NPORT]
);
  typedef enum logic [1:0] {PH_HDR, PH_SIZE, PH_PAY} phase_e;

  localparam int NP = HAS_CI ? NPORT : NPORT - 1;

  flit_t      head  [NPORT];
  logic       empty [NPORT];
  logic       pop   [NPORT];

  // Per-input connection state.
  logic       conn    [NPORT];
  logic [2:0] conn_out[NPORT];
  phase_e     phase   [NPORT];
  flit_t      left    [NPORT];

  // Per-output allocation.
  logic       busy    [NPORT];
  logic [2:0] src     [NPORT];

  // ---------------------------------------------------------------- buffers
  for (genvar p = 0; p < NPORT; p++) begin : g_in
    if (p < NP) begin : g_buf
      logic full;
      logic [$clog2(BUF_DEPTH+1)-1:0] cnt;  // occupancy, not needed by the router
      circ_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
        .clk, .rst_n,
        .wr_en  (in_link[p].valid),
        .wr_data(in_link[p].data),
        .rd_en  (pop[p]),
        .rd_data(head[p]),
        .full   (full),
        .empty  (empty[p]),
        .count  (cnt)
      );
      assign in_credit[p] = !full;
      a_credit: assert property (@(posedge clk) disable iff (!rst_n)
        in_link[p].valid |-> in_credit[p])
        else $error("flit offered to a full buffer on port %0d", p);
    end else begin : g_nobuf
      assign head[p]      = '0;
      assign empty[p]     = 1'b1;
      assign in_credit[p] = 1'b0;
    end
  end

  // ------------------------------------------------------------ routing
  function automatic logic [2:0] route(flit_t h);
    int unsigned tx, ty;
    if (32'(hdr_cluster(h)) != MY_CLUSTER) begin
      if (HAS_CI) return 3'(P_CI);
      tx = GW_X;
      ty = GW_Y;
    end else begin
      tx = 32'(hdr_x(h));
      ty = 32'(hdr_y(h));
    end
    if (tx > MY_X) return 3'(P_EAST);
    if (tx < MY_X) return 3'(P_WEST);
    if (ty > MY_Y) return 3'(P_NORTH);
    if (ty < MY_Y) return 3'(P_SOUTH);
    return 3'(P_LOCAL);
  endfunction

  // Central control: pick one waiting header, round-robin from rr_ptr.
  logic [2:0] rr_ptr;
  logic       sel_vld;
  logic [2:0] sel;
  logic [2:0] sel_out;
  logic       grant;

  always_comb begin
    int unsigned q;
    sel_vld = 1'b0;
    sel     = '0;
    for (int k = NP - 1; k >= 0; k--) begin
      q = (32'(rr_ptr) + 32'(k)) % NP;
      if (!empty[q] && !conn[q]) begin
        sel_vld = 1'b1;
        sel     = 3'(q);
      end
    end
    sel_out = route(head[sel]);
    grant   = sel_vld && !busy[sel_out];
  end

  // ------------------------------------------------------------ crossbar
  logic fire [NPORT];
  always_comb begin
    for (int p = 0; p < NPORT; p++) pop[p] = 1'b0;
    for (int o = 0; o < NPORT; o++) begin
      out_link[o].valid = 1'b0;
      out_link[o].data  = '0;
      fire[o]           = 1'b0;
      if (o < NP && busy[o]) begin
        fire[o]           = !empty[src[o]] && out_credit[o];
        out_link[o].valid = fire[o];
        out_link[o].data  = head[src[o]];
        if (fire[o]) pop[src[o]] = 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_ptr <= '0;
      for (int p = 0; p < NPORT; p++) begin
        conn[p]     <= 1'b0;
        conn_out[p] <= '0;
        phase[p]    <= PH_HDR;
        left[p]     <= '0;
        busy[p]     <= 1'b0;
        src[p]      <= '0;
      end
    end else begin
      if (sel_vld) rr_ptr <= 3'((32'(sel) + 1) % NP);
      if (grant) begin
        conn[sel]      <= 1'b1;
        conn_out[sel]  <= sel_out;
        phase[sel]     <= PH_HDR;
        busy[sel_out]  <= 1'b1;
        src[sel_out]   <= sel;
      end
      for (int p = 0; p < NP; p++) begin
        if (conn[p] && pop[p]) begin
          unique case (phase[p])
            PH_HDR:  phase[p] <= PH_SIZE;
            PH_SIZE: begin
              left[p]  <= head[p];
              phase[p] <= PH_PAY;
              if (head[p] == '0) begin
                conn[p]           <= 1'b0;
                busy[conn_out[p]] <= 1'b0;
              end
            end
            PH_PAY: begin
              left[p] <= left[p] - 1'b1;
              if (left[p] == flit_t'(1)) begin
                conn[p]           <= 1'b0;
                busy[conn_out[p]] <= 1'b0;
              end
            end
            default: ;
          endcase
        end
      end
    end
  end

endmodule
