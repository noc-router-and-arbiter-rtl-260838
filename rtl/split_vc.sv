// SplitVC unit: the split stage of one input port of an internal router.
//
// The input port's buffer holds one queue per VC. Every cycle a
// Priority-Select round-robin arbiter picks one VC whose oldest flit can move
// on, that is whose target output queue (this input, that output, same VC)
// has room. The chosen flit is removed from the input buffer and written to
// that output queue. Because a blocked VC is simply not eligible, the unit
// switches to any other VC instead of stalling behind it (no head-of-line
// blocking between VCs).
//
// Routing: a head flit names its output port here in its look-ahead field;
// the unit stores it per VC so the body and tail flits of the packet follow
// it. In the same cycle a lookahead_route block computes the port for the
// next internal router and writes it into the head flit on its way out.
//
// Interface: in_valid/in_head are the input buffer's per-VC outputs, rd_en
// and rd_vc pop it. out_ready[o][v] is the space of output queue o, VC v;
// out_wr[o], out_vc and out_flit write it. Combinational from buffer state
// to the write; the registers are the buffers on either side. The arbiter
// choice, look-ahead routing and VC switching follow the thesis; the per-VC
// route register is this design's choice.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
// Lint note: only the destination fields of the head's data are read.
module split_vc #(
  parameter int unsigned NUM_VC = 2,
  parameter bit          DIM    = 1'b0,
  parameter int unsigned X_POS  = 0,
  parameter int unsigned Y_POS  = 0,
  parameter int unsigned ARB_K  = 2
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NUM_VC-1:0]                    in_valid,
  input  dsm_pkg::flit_t [NUM_VC-1:0]          in_head,
  output logic                                 rd_en,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]    rd_vc,
  input  logic [2:0][NUM_VC-1:0]               out_ready,
  output logic [2:0]                           out_wr,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]    out_vc,
  output dsm_pkg::flit_t                       out_flit
);
  import dsm_pkg::*;
  localparam int unsigned VCW = idx_w(NUM_VC);

  port_e [NUM_VC-1:0] route_q;    // output port of the packet in each VC
  port_e [NUM_VC-1:0] target;
  logic  [NUM_VC-1:0] elig;

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) begin
      target[v] = in_head[v].head ? in_head[v].la_port : route_q[v];
      elig[v]   = in_valid[v] && out_ready[target[v]][v];
    end
  end

  logic [NUM_VC-1:0]            gnt;
  logic [$clog2(NUM_VC+1)-1:0]  gidx;
  logic                         any;
  ps_arbiter #(.N(NUM_VC), .K(ARB_K)) u_vc_arb (
    .clk, .rst_n, .req(elig), .ack(1'b1),
    .grant(gnt), .grant_idx(gidx), .any_grant(any)
  );

  flit_t  sel;
  port_e  sel_port, next_port;
  head_t  hdr;
  assign sel      = in_head[gidx];
  assign sel_port = target[gidx];
  assign hdr      = head_t'(sel.data);

  lookahead_route #(.DIM(DIM), .X_POS(X_POS), .Y_POS(Y_POS)) u_la (
    .out_port(sel_port), .dst_x(hdr.dst_x), .dst_y(hdr.dst_y), .next_port
  );

  assign rd_en  = any;
  assign rd_vc  = VCW'(gidx);
  assign out_vc = VCW'(gidx);
  always_comb begin
    out_flit = sel;
    if (sel.head) out_flit.la_port = next_port;
    out_wr = '0;
    if (any) out_wr[sel_port] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      route_q <= '{default: PORT_LOCAL};
    else if (any && sel.head)
      route_q[gidx] <= sel.la_port;
  end

  a_port_legal: assert property (@(posedge clk) disable iff (!rst_n)
                                 any |-> sel_port != 2'd3);
  a_one_vc: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
