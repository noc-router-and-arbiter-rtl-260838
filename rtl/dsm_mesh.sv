// 2D-mesh network-on-chip of DSM routers: the top of the design.
//
// MESH_X x MESH_Y nodes (4 x 4 = 16 by default), each a DSM router plus a
// network interface that gives one processing element (PE) a word-level
// send and receive port. Packets are routed X first, then Y, with wormhole
// switching, NUM_VC virtual channels per link and per-VC backpressure.
// Node n = y*MESH_X + x sits at column x (West to East) and row y (South to
// North). Links at the mesh border are tied off: dimension-order routing
// never uses them.
//
// PE interface, per node n (all arrays indexed by n):
//   send:    tx_valid/tx_ready, tx_data, tx_dst_x/tx_dst_y (word's target node)
//   receive: rx_valid/rx_ready, rx_data, rx_src_x/rx_src_y, rx_last (last word
//            of a packet), rx_vc (VC it came on: packets on different VCs
//            may interleave, those on one VC arrive whole), rx_err_count (misrouted or malformed packets seen)
// Zero-load latency from a word in tx_data to rx_data is a few cycles of
// packetising plus 2 cycles per internal router crossed: one X router per
// column travelled, one Y router per row, and the turn between them.
//
// The 16-node mesh, 32-bit flits, 32-flit port buffers and 8-flit packets
// are the configuration the thesis evaluates. The coordinate fields of the
// head flit are 2 bits wide, so neither side may exceed 4 nodes unless
// dsm_pkg::COORD_W is widened.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module dsm_mesh #(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned PORT_DEPTH = 32,
  parameter bit          DYNAMIC    = 1'b0,
  parameter int unsigned NI_DEPTH   = 32,
  parameter int unsigned PKT_LEN    = 8,
  parameter int unsigned ARB_K      = 2
) (
  input  logic                                              clk,
  input  logic                                              rst_n,
  input  logic [MESH_X*MESH_Y-1:0]                          tx_valid,
  output logic [MESH_X*MESH_Y-1:0]                          tx_ready,
  input  logic [MESH_X*MESH_Y-1:0][dsm_pkg::FLIT_W-1:0]     tx_data,
  input  logic [MESH_X*MESH_Y-1:0][dsm_pkg::COORD_W-1:0]    tx_dst_x,
  input  logic [MESH_X*MESH_Y-1:0][dsm_pkg::COORD_W-1:0]    tx_dst_y,
  output logic [MESH_X*MESH_Y-1:0]                          rx_valid,
  input  logic [MESH_X*MESH_Y-1:0]                          rx_ready,
  output logic [MESH_X*MESH_Y-1:0][dsm_pkg::FLIT_W-1:0]     rx_data,
  output logic [MESH_X*MESH_Y-1:0][dsm_pkg::COORD_W-1:0]    rx_src_x,
  output logic [MESH_X*MESH_Y-1:0][dsm_pkg::COORD_W-1:0]    rx_src_y,
  output logic [MESH_X*MESH_Y-1:0]                          rx_last,
  output logic [MESH_X*MESH_Y-1:0][dsm_pkg::idx_w(NUM_VC)-1:0] rx_vc,
  output logic [MESH_X*MESH_Y-1:0][15:0]                    rx_err_count
);
  import dsm_pkg::*;
  localparam int unsigned NN  = MESH_X * MESH_Y;
  localparam int unsigned VCW = idx_w(NUM_VC);

  // Router link outputs and the ready bits they receive, per node and direction.
  logic  [NN-1:0][3:0]             lo_valid, li_valid;
  logic  [NN-1:0][3:0][VCW-1:0]    lo_vc, li_vc;
  flit_t [NN-1:0][3:0]             lo_flit, li_flit;
  logic  [NN-1:0][3:0][NUM_VC-1:0] lo_ready, li_ready;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y*MESH_X + x;

      logic              inj_valid, ej_valid;
      logic [VCW-1:0]    inj_vc, ej_vc;
      flit_t             inj_flit, ej_flit;
      logic [NUM_VC-1:0] inj_ready, ej_ready;
      logic              hdr_err_unused;

      network_interface #(.X_POS(x), .Y_POS(y), .NUM_VC(NUM_VC), .BUF_DEPTH(NI_DEPTH),
                          .PKT_LEN(PKT_LEN), .ARB_K(ARB_K)) u_ni (
        .clk, .rst_n,
        .tx_valid(tx_valid[N]), .tx_ready(tx_ready[N]), .tx_data(tx_data[N]),
        .tx_dst_x(tx_dst_x[N]), .tx_dst_y(tx_dst_y[N]),
        .rx_valid(rx_valid[N]), .rx_ready(rx_ready[N]), .rx_data(rx_data[N]),
        .rx_src_x(rx_src_x[N]), .rx_src_y(rx_src_y[N]), .rx_last(rx_last[N]), .rx_vc(rx_vc[N]),
        .rx_hdr_err(hdr_err_unused), .rx_err_count(rx_err_count[N]),
        .inj_valid, .inj_vc, .inj_flit, .inj_ready,
        .ej_valid, .ej_vc, .ej_flit, .ej_ready
      );

      dsm_router #(.X_POS(x), .Y_POS(y), .NUM_VC(NUM_VC), .PORT_DEPTH(PORT_DEPTH),
                   .DYNAMIC(DYNAMIC), .ARB_K(ARB_K)) u_router (
        .clk, .rst_n,
        .pe_in_valid(inj_valid), .pe_in_vc(inj_vc), .pe_in_flit(inj_flit),
        .pe_in_ready(inj_ready),
        .pe_out_valid(ej_valid), .pe_out_vc(ej_vc), .pe_out_flit(ej_flit),
        .pe_out_ready(ej_ready),
        .link_in_valid(li_valid[N]), .link_in_vc(li_vc[N]), .link_in_flit(li_flit[N]),
        .link_in_ready(li_ready[N]),
        .link_out_valid(lo_valid[N]), .link_out_vc(lo_vc[N]), .link_out_flit(lo_flit[N]),
        .link_out_ready(lo_ready[N])
      );

      // Neighbour feeding each input direction: West input comes from the
      // East output of node x-1, and so on. Border inputs are idle.
      for (genvar d = 0; d < 4; d++) begin : g_dir
        localparam bit HAS = (d == DIR_W) ? (x > 0) :
                             (d == DIR_E) ? (x < MESH_X-1) :
                             (d == DIR_S) ? (y > 0) : (y < MESH_Y-1);
        localparam int unsigned NB = (d == DIR_W) ? N - 1 :
                                     (d == DIR_E) ? N + 1 :
                                     (d == DIR_S) ? N - MESH_X : N + MESH_X;
        localparam int unsigned OPP = d ^ 1;     // W<->E, S<->N
        if (HAS) begin : g_link
          assign li_valid[N][d] = lo_valid[NB][OPP];
          assign li_vc[N][d]    = lo_vc[NB][OPP];
          assign li_flit[N][d]  = lo_flit[NB][OPP];
          assign lo_ready[N][d] = li_ready[NB][OPP];
        end else begin : g_edge
          assign li_valid[N][d] = 1'b0;
          assign li_vc[N][d]    = '0;
          assign li_flit[N][d]  = '0;
          assign lo_ready[N][d] = '0;
        end
      end
    end
  end

  initial assert (MESH_X <= 2**COORD_W && MESH_Y <= 2**COORD_W)
    else $error("dsm_mesh: mesh larger than the head-flit coordinate fields");
endmodule
