// htm_pkg: types and constants shared by the Hybrid Torus MPSoC (HTM) blocks.
//
// Electrical side: a flit is 16 bits. A packet is a header flit, a size flit
// (number of payload flits that follow) and the payload, as in HERMES-style
// wormhole networks. The header carries the destination cluster in bits
// [11:8] and the destination router coordinates x in [7:4], y in [3:0]. The
// 16-bit flit and this header layout are choices of this design.
//
// Router ports are numbered EAST, WEST, NORTH, SOUTH, LOCAL as in the HERMES
// router, plus a sixth port (CI) used only by the router that hosts the
// cluster interface. Optical router ports are the injection/ejection port
// and the four torus directions.
package htm_pkg;

  localparam int FLIT_W = 16;
  typedef logic [FLIT_W-1:0] flit_t;

  // One direction of an electrical link: a flit and its valid strobe. The
  // receiver returns a credit bit (buffer not full) in the other direction.
  typedef struct packed {
    logic  valid;
    flit_t data;
  } link_t;

  // Electrical router ports.
  localparam int P_EAST  = 0;
  localparam int P_WEST  = 1;
  localparam int P_NORTH = 2;
  localparam int P_SOUTH = 3;
  localparam int P_LOCAL = 4;
  localparam int P_CI    = 5;
  localparam int NPORT   = 6;

  // Optical router ports.
  localparam int OP_EJ = 0;   // injection (input) / ejection (output)
  localparam int OP_N  = 1;
  localparam int OP_S  = 2;
  localparam int OP_E  = 3;
  localparam int OP_W  = 4;
  localparam int NOPORT = 5;

  // One optical channel as seen by the digital side: light present (valid)
  // and the modulated bit.
  typedef struct packed {
    logic valid;
    logic data;
  } opt_t;

  // Configuration of one output of an optical router: which input feeds it.
  typedef struct packed {
    logic       en;
    logic [2:0] src;
  } ocfg_t;

  // Header field helpers.
  function automatic logic [3:0] hdr_cluster(flit_t f);
    return f[11:8];
  endfunction
  function automatic logic [3:0] hdr_x(flit_t f);
    return f[7:4];
  endfunction
  function automatic logic [3:0] hdr_y(flit_t f);
    return f[3:0];
  endfunction
  function automatic flit_t make_hdr(int unsigned cl, int unsigned x, int unsigned y);
    flit_t f;
    f = '0;
    f[11:8] = 4'(cl);
    f[7:4]  = 4'(x);
    f[3:0]  = 4'(y);
    return f;
  endfunction

  // Port on the far side of an optical link leaving through port p.
  function automatic logic [2:0] op_opposite(logic [2:0] p);
    case (p)
      3'(OP_N): return 3'(OP_S);
      3'(OP_S): return 3'(OP_N);
      3'(OP_E): return 3'(OP_W);
      3'(OP_W): return 3'(OP_E);
      default:  return 3'(OP_EJ);
    endcase
  endfunction

endpackage
