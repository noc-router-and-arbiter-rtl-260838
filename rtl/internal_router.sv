// Internal router: a 3-port, one-dimensional router built from split and
// merge units, with no crossbar and no switch allocator.
//
// Ports: 0 Local, 1 Left (lower coordinate), 2 Right (higher coordinate).
// A DSM router holds two of these, one per dimension. The datapath has two
// pipeline stages:
//  * split stage: each input port has a VC buffer (vc_buffer) and a SplitVC
//    unit that moves one flit per cycle into a queue dedicated to the pair
//    (this input, its output);
//  * merge stage: each output port has the queues of all inputs that can
//    reach it and a MergeVC unit that sends one flit per cycle on the link.
// Queues exist only for turns dimension-order routing can take: Left and
// Right inputs never go back the way they came, the Local input can go
// anywhere (including Local, when the packet needs no travel in this
// dimension). That gives 3 input buffers and 7 output queue groups.
//
// Link interface, per port p: in_valid/in_vc/in_flit with in_ready[p][v]
// (one backpressure bit per VC); out_valid/out_vc/out_flit with
// out_ready[p][v] from the receiver. A flit moves when valid is high and the
// ready bit of its VC is set. A flit written into an input buffer can leave
// the output link two cycles later at the earliest.
//
// The split/merge structure, the queue count and the two-stage pipeline
// follow the thesis. The deeper 4-stage variant (registers between each
// split/merge unit and its buffers) is not built here.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module internal_router #(
  parameter bit          DIM        = 1'b0,  // 0: X, 1: Y
  parameter int unsigned X_POS      = 0,
  parameter int unsigned Y_POS      = 0,
  parameter int unsigned NUM_VC     = 2,
  parameter int unsigned PORT_DEPTH = 32,
  parameter bit          DYNAMIC    = 1'b0,
  parameter int unsigned ARB_K      = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [2:0]                             in_valid,
  input  logic [2:0][dsm_pkg::idx_w(NUM_VC)-1:0] in_vc,
  input  dsm_pkg::flit_t [2:0]                   in_flit,
  output logic [2:0][NUM_VC-1:0]                 in_ready,
  output logic [2:0]                             out_valid,
  output logic [2:0][dsm_pkg::idx_w(NUM_VC)-1:0] out_vc,
  output dsm_pkg::flit_t [2:0]                   out_flit,
  input  logic [2:0][NUM_VC-1:0]                 out_ready
);
  import dsm_pkg::*;
  localparam int unsigned VCW = idx_w(NUM_VC);

  // Is there a queue from input i to output o?
  function automatic bit legal(int i, int o);
    return (i != o) || (i == int'(PORT_LOCAL));
  endfunction

  // ---------------- split stage ----------------
  logic  [2:0][NUM_VC-1:0] ib_valid;
  flit_t [2:0][NUM_VC-1:0] ib_head;
  logic  [2:0]             ib_rd;
  logic  [2:0][VCW-1:0]    ib_rd_vc;

  // Output queue signals, indexed [input][output].
  logic  [2:0][2:0][NUM_VC-1:0] oq_ready;
  logic  [2:0][2:0]             oq_wr;
  logic  [2:0][VCW-1:0]         sp_vc;
  flit_t [2:0]                  sp_flit;
  logic  [2:0][2:0][NUM_VC-1:0] oq_valid;
  flit_t [2:0][2:0][NUM_VC-1:0] oq_head;
  logic  [2:0][2:0]             oq_rd;
  logic  [2:0][VCW-1:0]         mg_rd_vc;   // per output

  for (genvar i = 0; i < 3; i++) begin : g_inport
    vc_buffer #(.NUM_VC(NUM_VC), .PORT_DEPTH(PORT_DEPTH), .DYNAMIC(DYNAMIC)) u_ibuf (
      .clk, .rst_n,
      .wr_en(in_valid[i]), .wr_vc(in_vc[i]), .wr_data(in_flit[i]), .ready(in_ready[i]),
      .rd_en(ib_rd[i]), .rd_vc(ib_rd_vc[i]), .head(ib_head[i]), .valid(ib_valid[i])
    );
    split_vc #(.NUM_VC(NUM_VC), .DIM(DIM), .X_POS(X_POS), .Y_POS(Y_POS), .ARB_K(ARB_K)) u_split (
      .clk, .rst_n,
      .in_valid(ib_valid[i]), .in_head(ib_head[i]),
      .rd_en(ib_rd[i]), .rd_vc(ib_rd_vc[i]),
      .out_ready(oq_ready[i]), .out_wr(oq_wr[i]), .out_vc(sp_vc[i]), .out_flit(sp_flit[i])
    );

    for (genvar o = 0; o < 3; o++) begin : g_q
      if (legal(i, o)) begin : g_yes
        vc_buffer #(.NUM_VC(NUM_VC), .PORT_DEPTH(PORT_DEPTH), .DYNAMIC(DYNAMIC)) u_oq (
          .clk, .rst_n,
          .wr_en(oq_wr[i][o]), .wr_vc(sp_vc[i]), .wr_data(sp_flit[i]), .ready(oq_ready[i][o]),
          .rd_en(oq_rd[o][i]), .rd_vc(mg_rd_vc[o]), .head(oq_head[i][o]), .valid(oq_valid[i][o])
        );
      end else begin : g_no
        assign oq_ready[i][o] = '0;
        assign oq_valid[i][o] = '0;
        assign oq_head[i][o]  = '0;
      end
    end
  end

  // ---------------- merge stage ----------------
  // Output o merges the queues of the inputs that can reach it, in input
  // port order: Local out takes {Local, Left, Right}, Left out {Local,
  // Right}, Right out {Local, Left}.
  for (genvar o = 0; o < 3; o++) begin : g_outport
    localparam int unsigned NIN = (o == 0) ? 3 : 2;
    logic  [NIN-1:0][NUM_VC-1:0] mv;
    flit_t [NIN-1:0][NUM_VC-1:0] mh;
    logic  [NIN-1:0]             mrd;
    if (o == 0) begin : g_l
      for (genvar k = 0; k < 3; k++) begin : g_k
        assign mv[k] = oq_valid[k][0];
        assign mh[k] = oq_head[k][0];
        assign oq_rd[0][k] = mrd[k];
      end
    end else begin : g_lr
      localparam int unsigned OTHER = (o == 1) ? 2 : 1;
      assign mv[0] = oq_valid[0][o];
      assign mh[0] = oq_head[0][o];
      assign mv[1] = oq_valid[OTHER][o];
      assign mh[1] = oq_head[OTHER][o];
      assign oq_rd[o][0]     = mrd[0];
      assign oq_rd[o][OTHER] = mrd[1];
      assign oq_rd[o][o]     = 1'b0;
    end
    merge_vc #(.NIN(NIN), .NUM_VC(NUM_VC), .ARB_K(ARB_K)) u_merge (
      .clk, .rst_n,
      .q_valid(mv), .q_head(mh), .q_rd(mrd), .q_rd_vc(mg_rd_vc[o]),
      .out_valid(out_valid[o]), .out_vc(out_vc[o]), .out_flit(out_flit[o]),
      .out_ready(out_ready[o])
    );
  end
endmodule
