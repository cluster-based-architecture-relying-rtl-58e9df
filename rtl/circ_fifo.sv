// circ_fifo: circular FIFO queue.
//
// The cluster interface stores the traffic crossing between the electrical
// and optical layers in two circular queues; the same structure serves as
// the input buffer of each electrical router. DEPTH slots form a ring: the
// write pointer advances on each push, the read pointer on each pop, and
// both wrap from DEPTH-1 back to 0. An occupancy counter tells full from
// empty.
//
// Interface: push with wr_en/wr_data (ignored when full), pop with rd_en
// (ignored when empty). rd_data always shows the oldest entry
// (first-word fall-through), so a pop and its data happen in the same
// cycle. A push and a pop may happen together. count is the occupancy.
// Reset (active low, synchronous) empties the queue. The depth, widths and
// fall-through read are choices of this design; the document gives only
// the circular organisation.
module circ_fifo #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [WIDTH-1:0]           wr_data,
  input  logic                       rd_en,
  output logic [WIDTH-1:0]           rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rptr];

  function automatic logic [AW-1:0] wrap_inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= wrap_inc(wptr);
      if (do_rd) rptr <= wrap_inc(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk)
    if (do_wr) mem[wptr] <= wr_data;

endmodule
