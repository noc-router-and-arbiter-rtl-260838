// Look-ahead route computation for one internal router of a DSM router.
//
// The router routes dimension-ordered (XY): a packet first travels along X in
// the X internal routers, turns once into the Y internal router of the
// column it has reached, and travels along Y until it is ejected. To take
// route computation off the split path, every head flit already carries the
// port it must leave by at the internal router it is entering; this block
// works out, in parallel with the split, the port for the internal router
// after this one, given the port the flit leaves by here:
//   X router, out Left/Right: next is the X router of node x-1/x+1;
//   X router, out Local:      next is the Y router of this node;
//   Y router, out Left/Right: next is the Y router of node y-1/y+1;
//   Y router, out Local:      the flit goes to the network interface (no route).
// Left is the lower coordinate (West, South), Right the higher one. Purely
// combinational. Look-ahead per internal router and XY order follow the
// thesis; the port numbering is this design's own.
module lookahead_route #(
  parameter bit          DIM   = 1'b0,   // 0: X internal router, 1: Y
  parameter int unsigned X_POS = 0,
  parameter int unsigned Y_POS = 0
) (
  input  dsm_pkg::port_e                 out_port,
  input  logic [dsm_pkg::COORD_W-1:0]    dst_x,
  input  logic [dsm_pkg::COORD_W-1:0]    dst_y,
  output dsm_pkg::port_e                 next_port
);
  import dsm_pkg::*;
  localparam logic [COORD_W-1:0] MY_X = COORD_W'(X_POS);
  localparam logic [COORD_W-1:0] MY_Y = COORD_W'(Y_POS);

  always_comb begin
    next_port = PORT_LOCAL;
    if (!DIM) begin
      unique case (out_port)
        PORT_LEFT:  next_port = route_dim(MY_X - 1'b1, dst_x);
        PORT_RIGHT: next_port = route_dim(MY_X + 1'b1, dst_x);
        default:    next_port = route_dim(MY_Y, dst_y);
      endcase
    end else begin
      unique case (out_port)
        PORT_LEFT:  next_port = route_dim(MY_Y - 1'b1, dst_y);
        PORT_RIGHT: next_port = route_dim(MY_Y + 1'b1, dst_y);
        default:    next_port = PORT_LOCAL;
      endcase
    end
  end
endmodule
