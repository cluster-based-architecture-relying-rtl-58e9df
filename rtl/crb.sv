// crb: Conflict Resolution Block of the optical-network arbiter.
//
// The pending requests form an N x N matrix M, row i = source, column j =
// destination, M[i][j] = 1 when source i asks for destination j. The block
// works on every column in parallel, one process per port:
//   1. conflict detection: conflict[j] = 1 when two or more sources target
//      destination j in the same cycle;
//   2. resolution: a round-robin choice among the eligible requesters of
//      column j. Each column keeps the index of the source it last served;
//      the search starts just after it and wraps.
// A request is eligible (elig[i]) when the rest of the arbiter can serve
// it now (path free, destination ready); an ineligible request still counts
// for conflict detection. win_vld[j]/win_idx[j] name column j's candidate
// in the same cycle. taken[j] tells the block the candidate of column j
// was granted; its pointer then moves to that source at the next clock.
// Pointers reset to 0, so after reset source 0 is served last.
//
// The matrix view, column-wise conflict detection and round-robin policy
// follow the document. It writes the test as NOT XOR(column) AND
// OR(column); that is true for two requesters but not for three, so this
// block uses the stated meaning, "more than one". Pointer reset value and
// the eligibility input are this design's choices.
module crb #(
  parameter int unsigned N  = 64,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic [IW-1:0] dest [N],
  input  logic [N-1:0]  elig,
  input  logic [N-1:0]  taken,
  output logic [N-1:0]  conflict,
  output logic [N-1:0]  win_vld,
  output logic [IW-1:0] win_idx [N]
);
  logic [IW-1:0] last [N];
  logic [N-1:0]  col  [N];   // col[j][i] = M[i][j]

  always_comb begin
    int unsigned q;
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++)
        col[j][i] = req[i] && (32'(dest[i]) == 32'(j));
      conflict[j] = $countones(col[j]) > 1;
      win_vld[j]  = 1'b0;
      win_idx[j]  = '0;
      for (int k = N; k >= 1; k--) begin
        q = (32'(last[j]) + 32'(k)) % N;
        if (col[j][q] && elig[q]) begin
          win_vld[j] = 1'b1;
          win_idx[j] = IW'(q);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < N; j++) last[j] <= '0;
    end else begin
      for (int j = 0; j < N; j++)
        if (taken[j] && win_vld[j]) last[j] <= win_idx[j];
    end
  end

endmodule
