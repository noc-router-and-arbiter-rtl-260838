// Port buffer with NUM_VC virtual channels, static or dynamic.
//
// Used for every input buffer and every output queue of an internal router.
// With DYNAMIC = 0 (static VCs, the default) each VC owns its own FIFO of
// PORT_DEPTH/NUM_VC flits. With DYNAMIC = 1 the VCs share PORT_DEPTH slots
// through a DVOQR buffer, so a busy VC can grow into the space an idle one
// does not use. The interface is the same in both cases:
//  * write side: wr_en with wr_vc and the flit; ready[v] says VC v can take
//    a flit this cycle (this is the backpressure bit per VC);
//  * read side: valid[v] and head[v] show each VC's oldest flit; rd_en with
//    rd_vc removes it. One write and one read per cycle.
// Both outputs depend on registered state only. The equal total storage of
// the two kinds is this design's choice, so that they can be compared at
// the same port depth.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module vc_buffer #(
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned PORT_DEPTH = 32,
  parameter bit          DYNAMIC    = 1'b0
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 wr_en,
  input  logic [dsm_pkg::idx_w(NUM_VC)-1:0]    wr_vc,
  input  dsm_pkg::flit_t                       wr_data,
  output logic [NUM_VC-1:0]                    ready,
  input  logic                                 rd_en,
  input  logic [dsm_pkg::idx_w(NUM_VC)-1:0]    rd_vc,
  output dsm_pkg::flit_t [NUM_VC-1:0]          head,
  output logic [NUM_VC-1:0]                    valid
);
  import dsm_pkg::*;
  localparam int unsigned W = $bits(flit_t);

  if (DYNAMIC) begin : g_dvc
    logic full;
    logic [NUM_VC-1:0]        empty;
    logic [NUM_VC-1:0][W-1:0] rd_data;
    dvoqr_buffer #(.W(W), .NUM_VC(NUM_VC), .DEPTH(PORT_DEPTH)) u_dvoqr (
      .clk, .rst_n,
      .wr_en, .wr_vc, .wr_data(W'(wr_data)), .full,
      .rd_en, .rd_vc, .rd_data, .empty
    );
    for (genvar v = 0; v < NUM_VC; v++) begin : g_o
      assign ready[v] = !full;
      assign valid[v] = !empty[v];
      assign head[v]  = flit_t'(rd_data[v]);
    end
  end else begin : g_svc
    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      logic full, empty;
      logic [W-1:0] rd_data;
      flit_fifo #(.W(W), .DEPTH(PORT_DEPTH / NUM_VC)) u_fifo (
        .clk, .rst_n,
        .wr_en   (wr_en && wr_vc == idx_w(NUM_VC)'(v)),
        .wr_data (W'(wr_data)),
        .full,
        .rd_en   (rd_en && rd_vc == idx_w(NUM_VC)'(v)),
        .rd_data,
        .empty
      );
      assign ready[v] = !full;
      assign valid[v] = !empty;
      assign head[v]  = flit_t'(rd_data);
    end
  end

  a_wr_ready: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> ready[wr_vc]);
  a_rd_valid: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> valid[rd_vc]);
endmodule
