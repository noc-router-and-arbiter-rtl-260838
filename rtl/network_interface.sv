// Network interface of one DSM mesh node.
//
// Two independent halves between a processing element (PE) and its router:
// ni_tx turns the PE's outgoing words into packets and injects them into
// the router's X internal router; ni_rx takes the flits the router's Y
// internal router ejects and hands their payload to the PE. Both halves are
// buffered, so PE and network never wait on each other cycle by cycle, and
// both forward as soon as they can rather than storing whole packets. See
// ni_tx and ni_rx for the packet rules and timing. The two-part structure
// follows the thesis. PE side and network side are both FLIT_W bits wide
// here; the width conversion the thesis allows between them is not built.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module network_interface #(
  parameter int unsigned X_POS     = 0,
  parameter int unsigned Y_POS     = 0,
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 32,
  parameter int unsigned PKT_LEN   = 8,
  parameter int unsigned ARB_K     = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // PE -> network
  input  logic                               tx_valid,
  output logic                               tx_ready,
  input  logic [dsm_pkg::FLIT_W-1:0]         tx_data,
  input  logic [dsm_pkg::COORD_W-1:0]        tx_dst_x,
  input  logic [dsm_pkg::COORD_W-1:0]        tx_dst_y,
  // network -> PE
  output logic                               rx_valid,
  input  logic                               rx_ready,
  output logic [dsm_pkg::FLIT_W-1:0]         rx_data,
  output logic [dsm_pkg::COORD_W-1:0]        rx_src_x,
  output logic [dsm_pkg::COORD_W-1:0]        rx_src_y,
  output logic                               rx_last,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]  rx_vc,
  output logic                               rx_hdr_err,
  output logic [15:0]                        rx_err_count,
  // router injection port
  output logic                               inj_valid,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]  inj_vc,
  output dsm_pkg::flit_t                     inj_flit,
  input  logic [NUM_VC-1:0]                  inj_ready,
  // router ejection port
  input  logic                               ej_valid,
  input  logic [dsm_pkg::idx_w(NUM_VC)-1:0]  ej_vc,
  input  dsm_pkg::flit_t                     ej_flit,
  output logic [NUM_VC-1:0]                  ej_ready
);
  ni_tx #(.X_POS(X_POS), .Y_POS(Y_POS), .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH),
          .PKT_LEN(PKT_LEN), .ARB_K(ARB_K)) u_tx (
    .clk, .rst_n,
    .pe_valid(tx_valid), .pe_ready(tx_ready), .pe_data(tx_data),
    .pe_dst_x(tx_dst_x), .pe_dst_y(tx_dst_y),
    .net_valid(inj_valid), .net_vc(inj_vc), .net_flit(inj_flit), .net_ready(inj_ready)
  );

  ni_rx #(.X_POS(X_POS), .Y_POS(Y_POS), .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH)) u_rx (
    .clk, .rst_n,
    .in_valid(ej_valid), .in_vc(ej_vc), .in_flit(ej_flit), .in_ready(ej_ready),
    .pe_valid(rx_valid), .pe_ready(rx_ready), .pe_data(rx_data),
    .pe_src_x(rx_src_x), .pe_src_y(rx_src_y), .pe_last(rx_last), .pe_vc(rx_vc),
    .hdr_err(rx_hdr_err), .err_count(rx_err_count)
  );
endmodule
