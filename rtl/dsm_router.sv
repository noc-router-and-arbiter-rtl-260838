// Dual-Split-Merge (DSM) router: a 5-port 2D-mesh router made of two 3-port
// internal routers, one per dimension.
//
// The X internal router connects the processing element's injection link
// (its Local input) with the West (Left) and East (Right) links. The Y
// internal router connects North and South. The X router's Local output feeds
// the Y router's Local input, which is the single place a packet turns from X
// to Y; the Y router's Local output is the ejection link to the network
// interface. A packet going straight along one dimension only crosses one
// internal router per hop, and each internal router only needs 2- and 3-way
// splits and merges, which is what keeps the logic shallow. The turn costs
// one internal-router traversal more than a single 5-port router would.
//
// Links: every link has valid, a VC index and a flit one way, and one ready
// bit per VC back (backpressure flow control). Direction index of the
// link arrays: 0 West, 1 East, 2 South, 3 North (dsm_pkg::dir_e). Links
// towards the mesh edge are left unconnected by the mesh (tie inputs to 0).
// Latency: 2 cycles per internal router crossed, at zero load.
//
// Two internal routers, X-then-Y routing, look-ahead routing and backpressure
// follow the thesis; the link signal set and direction numbering are this
// design's own.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module dsm_router #(
  parameter int unsigned X_POS      = 0,
  parameter int unsigned Y_POS      = 0,
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned PORT_DEPTH = 32,
  parameter bit          DYNAMIC    = 1'b0,
  parameter int unsigned ARB_K      = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // injection from the network interface
  input  logic                                   pe_in_valid,
  input  logic [dsm_pkg::idx_w(NUM_VC)-1:0]      pe_in_vc,
  input  dsm_pkg::flit_t                         pe_in_flit,
  output logic [NUM_VC-1:0]                      pe_in_ready,
  // ejection to the network interface
  output logic                                   pe_out_valid,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]      pe_out_vc,
  output dsm_pkg::flit_t                         pe_out_flit,
  input  logic [NUM_VC-1:0]                      pe_out_ready,
  // mesh links, index dsm_pkg::dir_e
  input  logic [3:0]                             link_in_valid,
  input  logic [3:0][dsm_pkg::idx_w(NUM_VC)-1:0] link_in_vc,
  input  dsm_pkg::flit_t [3:0]                   link_in_flit,
  output logic [3:0][NUM_VC-1:0]                 link_in_ready,
  output logic [3:0]                             link_out_valid,
  output logic [3:0][dsm_pkg::idx_w(NUM_VC)-1:0] link_out_vc,
  output dsm_pkg::flit_t [3:0]                   link_out_flit,
  input  logic [3:0][NUM_VC-1:0]                 link_out_ready
);
  import dsm_pkg::*;
  localparam int unsigned VCW = idx_w(NUM_VC);

  // Internal router port bundles, [router][port], router 0 = X, 1 = Y.
  logic  [1:0][2:0]             r_in_valid, r_out_valid;
  logic  [1:0][2:0][VCW-1:0]    r_in_vc, r_out_vc;
  flit_t [1:0][2:0]             r_in_flit, r_out_flit;
  logic  [1:0][2:0][NUM_VC-1:0] r_in_ready, r_out_ready;

  for (genvar d = 0; d < 2; d++) begin : g_dim
    internal_router #(
      .DIM(d[0]), .X_POS(X_POS), .Y_POS(Y_POS), .NUM_VC(NUM_VC),
      .PORT_DEPTH(PORT_DEPTH), .DYNAMIC(DYNAMIC), .ARB_K(ARB_K)
    ) u_ir (
      .clk, .rst_n,
      .in_valid(r_in_valid[d]), .in_vc(r_in_vc[d]), .in_flit(r_in_flit[d]),
      .in_ready(r_in_ready[d]),
      .out_valid(r_out_valid[d]), .out_vc(r_out_vc[d]), .out_flit(r_out_flit[d]),
      .out_ready(r_out_ready[d])
    );
    // Left/Right ports to the mesh links of this dimension.
    for (genvar p = 1; p < 3; p++) begin : g_lr
      localparam int unsigned L = 2*d + p - 1;   // W,E for X; S,N for Y
      assign r_in_valid[d][p]  = link_in_valid[L];
      assign r_in_vc[d][p]     = link_in_vc[L];
      assign r_in_flit[d][p]   = link_in_flit[L];
      assign link_in_ready[L]  = r_in_ready[d][p];
      assign link_out_valid[L] = r_out_valid[d][p];
      assign link_out_vc[L]    = r_out_vc[d][p];
      assign link_out_flit[L]  = r_out_flit[d][p];
      assign r_out_ready[d][p] = link_out_ready[L];
    end
  end

  // PE -> X router Local input.
  assign r_in_valid[0][0] = pe_in_valid;
  assign r_in_vc[0][0]    = pe_in_vc;
  assign r_in_flit[0][0]  = pe_in_flit;
  assign pe_in_ready      = r_in_ready[0][0];
  // X router Local output -> Y router Local input (the X-to-Y turn).
  assign r_in_valid[1][0]  = r_out_valid[0][0];
  assign r_in_vc[1][0]     = r_out_vc[0][0];
  assign r_in_flit[1][0]   = r_out_flit[0][0];
  assign r_out_ready[0][0] = r_in_ready[1][0];
  // Y router Local output -> network interface.
  assign pe_out_valid      = r_out_valid[1][0];
  assign pe_out_vc         = r_out_vc[1][0];
  assign pe_out_flit       = r_out_flit[1][0];
  assign r_out_ready[1][0] = pe_out_ready;
endmodule
