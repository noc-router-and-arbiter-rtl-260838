// Shared types and constants of the Dual-Split-Merge (DSM) network-on-chip.
//
// A flit is a FLIT_W-bit data word plus sideband: head/tail flags and the
// look-ahead port field, which tells the next internal router which of its
// three output ports the packet leaves by. The VC a flit travels on is sent
// next to it on the link (a one-hot label in the thesis that introduced the
// router; a binary index here). The head flit's data word carries the
// destination and source coordinates and the payload length; body and tail
// flits carry payload. The field layout of the head word is this design's
// own choice.
package dsm_pkg;

  // Flit width of the evaluated configuration (32 bits).
  localparam int unsigned FLIT_W  = 32;
  // Coordinate width: a 4x4 mesh needs 2 bits per axis.
  localparam int unsigned COORD_W = 2;
  // Payload-length field of the head flit (counts payload flits, 1..7 for an
  // 8-flit packet).
  localparam int unsigned LEN_W   = 4;

  // Ports of one internal (one-dimensional) router.
  typedef enum logic [1:0] {
    PORT_LOCAL = 2'd0,  // X router: from PE / to Y router; Y router: from X router / to PE
    PORT_LEFT  = 2'd1,  // towards the lower coordinate (West or South)
    PORT_RIGHT = 2'd2   // towards the higher coordinate (East or North)
  } port_e;

  // Mesh link directions of a DSM router.
  typedef enum logic [1:0] {
    DIR_W = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_N = 2'd3
  } dir_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    port_e             la_port;   // output port at the internal router that receives it
    logic [FLIT_W-1:0] data;
  } flit_t;


  // Head-flit data layout (low bits): dst_x, dst_y, src_x, src_y, length.
  typedef struct packed {
    logic [FLIT_W-4*COORD_W-LEN_W-1:0] unused;
    logic [LEN_W-1:0]   len;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
  } head_t;

  // Width of an index into n items (at least 1 bit).
  function automatic int unsigned idx_w(input int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Output port of a one-dimensional router at coordinate cur for a packet
  // heading to coordinate dst along the same axis (XY dimension order).
  function automatic port_e route_dim(input logic [COORD_W-1:0] cur,
                                      input logic [COORD_W-1:0] dst);
    if (dst < cur)      return PORT_LEFT;
    else if (dst > cur) return PORT_RIGHT;
    else                return PORT_LOCAL;
  endfunction

endpackage
