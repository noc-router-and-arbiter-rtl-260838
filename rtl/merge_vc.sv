// MergeVC unit: the merge stage of one output port of an internal router.
//
// The output port has one queue per (input port, VC): NIN x NUM_VC queues.
// Each cycle one flit leaves on the output link. Arbitration is split in two
// small Priority-Select round-robin arbiters instead of one large one: for
// each input port an arbiter first picks among that port's VCs, then one
// arbiter picks among the input ports that have a candidate.
//
// A (input, VC) queue is a candidate only if the downstream buffer of that VC
// has room (its ready bit, the backpressure flow control) and the output VC
// is free for it: a head flit may claim an idle output VC, and once claimed
// the VC carries only that packet until its tail flit has gone. This keeps
// the flits of one packet together in each downstream VC queue (wormhole
// switching), while flits of packets on different VCs may interleave on the
// link. VCs are kept end to end: a flit leaves on the VC it arrived on.
//
// Interface: q_valid/q_head are the queues' per-VC outputs, q_rd/q_rd_vc pop
// one of them; out_valid, out_vc, out_flit drive the link; out_ready is the
// downstream per-VC ready. The output is combinational from registered
// queue state and downstream ready (registered in the receiver). Two-stage
// arbitration (VCs, then ports) follows the thesis; the per-VC ownership
// lock and fixed VC per packet are this design's choices.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module merge_vc #(
  parameter int unsigned NIN    = 3,
  parameter int unsigned NUM_VC = 2,
  parameter int unsigned ARB_K  = 2
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [NIN-1:0][NUM_VC-1:0]           q_valid,
  input  dsm_pkg::flit_t [NIN-1:0][NUM_VC-1:0] q_head,
  output logic [NIN-1:0]                       q_rd,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]    q_rd_vc,
  output logic                                 out_valid,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]    out_vc,
  output dsm_pkg::flit_t                       out_flit,
  input  logic [NUM_VC-1:0]                    out_ready
);
  import dsm_pkg::*;
  localparam int unsigned VCW = idx_w(NUM_VC);
  localparam int unsigned IW  = idx_w(NIN);

  logic [NUM_VC-1:0]         locked;   // output VC carries a packet
  logic [NUM_VC-1:0][IW-1:0] owner;    // input port that owns it

  // Stage 1: per input port, arbitrate among its VCs.
  logic [NIN-1:0][NUM_VC-1:0]           elig;
  logic [NIN-1:0]                       has;
  logic [NIN-1:0][$clog2(NUM_VC+1)-1:0] vc_sel;
  logic [NIN-1:0]                       port_gnt;
  logic [$clog2(NIN+1)-1:0]             pidx;
  logic                                 pany;

  for (genvar i = 0; i < NIN; i++) begin : g_in
    always_comb begin
      for (int v = 0; v < NUM_VC; v++)
        elig[i][v] = q_valid[i][v] && out_ready[v] &&
                     (locked[v] ? (owner[v] == IW'(i)) : q_head[i][v].head);
    end
    logic [NUM_VC-1:0] g_unused;
    ps_arbiter #(.N(NUM_VC), .K(ARB_K)) u_vc_arb (
      .clk, .rst_n, .req(elig[i]), .ack(port_gnt[i]),
      .grant(g_unused), .grant_idx(vc_sel[i]), .any_grant(has[i])
    );
  end

  // Stage 2: arbitrate among the input ports.
  ps_arbiter #(.N(NIN), .K(ARB_K)) u_port_arb (
    .clk, .rst_n, .req(has), .ack(1'b1),
    .grant(port_gnt), .grant_idx(pidx), .any_grant(pany)
  );

  logic [VCW-1:0] win_vc;
  assign win_vc    = VCW'(vc_sel[pidx]);
  assign out_valid = pany;
  assign out_vc    = win_vc;
  assign out_flit  = q_head[pidx][win_vc];
  assign q_rd      = pany ? port_gnt : '0;
  assign q_rd_vc   = win_vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= '0;
      owner  <= '0;
    end else if (pany) begin
      if (out_flit.head && !out_flit.tail) begin
        locked[win_vc] <= 1'b1;
        owner[win_vc]  <= IW'(pidx);
      end else if (out_flit.tail) begin
        locked[win_vc] <= 1'b0;
      end
    end
  end

  a_link_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 out_valid |-> out_ready[out_vc]);
  a_one_port: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(q_rd));
endmodule
