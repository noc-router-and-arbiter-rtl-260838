// Priority-Select (PS) round-robin arbiter.
//
// An N-request round-robin arbiter split into G = ceil(N/K) groups of K bits.
// Only the group that holds the priority pointer (the priority group) needs a
// programmable priority; every other group uses a plain fixed-priority
// arbiter with its lowest bit first. Inside the priority group the
// round-robin part is an exhaustive priority-encoder arbiter with the
// wrap-around removed: K truncated encoders of K, K-1, ..., 1 bits, the one
// starting at the pointer's bit m being selected. It answers only requests at
// or above m. A small group-level controller then picks the winning group in
// the order priority group (bits >= m), following groups (wrapping), and last
// the priority group's own bits below m, for which the group's fixed arbiter
// output is selected. Together this gives exact round-robin order starting at
// the pointer.
//
// Interface: req is sampled combinationally; grant is one-hot (or zero when no
// request) in the same cycle. When ack is high the pointer moves to the bit
// after the granted one, so the last winner gets the lowest priority. After
// reset the pointer is at bit 0.
//
// The grouping, the truncated exhaustive-PE round-robin part and the
// selection rule follow the thesis that proposed the arbiter. The binary
// pointer register, the ack input and the padding of N up to a multiple of K
// are choices of this design.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module ps_arbiter #(
  parameter int unsigned N = 4,   // number of requesters
  parameter int unsigned K = 2    // group (unit) size
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 ack,       // grant taken: rotate priority
  output logic [N-1:0]         grant,
  output logic [$clog2(N+1)-1:0] grant_idx,
  output logic                 any_grant
);
  localparam int unsigned G  = (N + K - 1) / K;   // number of groups
  localparam int unsigned NP = G * K;              // padded width
  localparam int unsigned PW = (NP > 1) ? $clog2(NP) : 1;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1;

  logic [PW-1:0] ptr;             // bit with the highest priority
  logic [NP-1:0] req_p;
  assign req_p = NP'(req);

  logic [GW-1:0] pgrp;            // priority group
  logic [KW-1:0] pbit;            // pointer position inside it
  assign pgrp = GW'(ptr / K);
  assign pbit = KW'(ptr % K);

  // Per-group fixed-priority arbiters.
  logic [G-1:0][K-1:0] greq, gfix;
  for (genvar g = 0; g < G; g++) begin : g_fix
    assign greq[g] = req_p[g*K +: K];
    fixed_prio_arbiter #(.N(K)) u_fix (.req(greq[g]), .grant(gfix[g]));
  end

  // Round-robin part of the priority group: truncated exhaustive PE.
  // Encoder j looks at bits j..K-1 only (no wrap-around).
  logic [K-1:0] preq;             // requests of the priority group
  assign preq = greq[pgrp];
  logic [K-1:0][K-1:0] trunc_grant;
  for (genvar j = 0; j < K; j++) begin : g_trunc
    logic [K-j-1:0] tg;
    fixed_prio_arbiter #(.N(K-j)) u_pe (.req(preq[K-1:j]), .grant(tg));
    assign trunc_grant[j] = K'(tg) << j;
  end
  logic [K-1:0] rr_grant;
  assign rr_grant = trunc_grant[pbit];

  // Group-level selection controller. Group order: pgrp (upper part),
  // pgrp+1 .. G-1, 0 .. pgrp-1, then pgrp (lower part, fixed arbiter).
  logic [G-1:0] gany;
  always_comb begin
    for (int g = 0; g < G; g++) gany[g] = |greq[g];
  end

  logic [G-1:0] sel_grp;          // one-hot winning group among the others
  logic         use_rr, use_low;
  always_comb begin
    logic found;
    sel_grp = '0;
    found   = 1'b0;
    use_rr  = |rr_grant;
    use_low = 1'b0;
    if (!use_rr) begin
      // Groups above the priority group first, then those below it.
      for (int g = 0; g < G; g++) begin
        if (!found && g > int'(pgrp) && gany[g]) begin
          sel_grp[g] = 1'b1;
          found = 1'b1;
        end
      end
      for (int g = 0; g < G; g++) begin
        if (!found && g < int'(pgrp) && gany[g]) begin
          sel_grp[g] = 1'b1;
          found = 1'b1;
        end
      end
      // Only the priority group's bits below the pointer are left.
      use_low = !found && gany[pgrp];
    end
  end

  // Per-group multiplexer: round-robin or fixed result, gated by the
  // controller's blocking decision.
  logic [NP-1:0] grant_p;
  always_comb begin
    for (int g = 0; g < G; g++) begin
      if (g == int'(pgrp))
        grant_p[g*K +: K] = use_rr ? rr_grant : (use_low ? gfix[g] : '0);
      else
        grant_p[g*K +: K] = sel_grp[g] ? gfix[g] : '0;
    end
  end

  assign grant     = grant_p[N-1:0];
  assign any_grant = |grant_p;

  always_comb begin
    grant_idx = '0;
    for (int i = 0; i < N; i++)
      if (grant_p[i]) grant_idx = ($clog2(N+1))'(i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      ptr <= '0;
    else if (ack && any_grant)
      ptr <= (grant_idx == ($clog2(N+1))'(N-1)) ? '0 : PW'(grant_idx + 1'b1);
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  a_subset: assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req) == '0);
endmodule
