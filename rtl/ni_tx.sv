// Network interface, PE-to-network part: packetiser.
//
// Words from the processing element (each with its destination node) go
// into a BUF_DEPTH-word buffer. The controller turns the words at the front
// of the buffer into a packet: a head flit followed by up to PKT_LEN-1
// payload flits, the last one marked tail. It does not wait for a full
// packet: it starts a packet as soon as PKT_LEN-1 words for the same
// destination are waiting, or the next word is for another destination, or
// the PE has paused (pe_valid low) with words in the buffer. So packets are
// as long as possible while the PE streams and short when it stops.
//
// The head flit's data carries destination, source and payload length
// (dsm_pkg::head_t) and its look-ahead field the port it must take in the
// local X internal router. Each packet is sent on one VC, picked
// round-robin among the VCs whose ready bit is set when the head flit goes.
//
// Interface: pe_valid/pe_ready/pe_data/pe_dst_x/pe_dst_y (a word moves when
// both valid and ready); net_valid/net_vc/net_flit with per-VC net_ready.
// A flit is offered only while the ready bit of its VC is set, as every
// sender in the network does.
// Timing: a word written in cycle t can be in a head flit's packet from
// t+1; one flit per cycle while the router accepts them.
//
// Buffer plus controller, maximum packet length and early packet close
// follow the thesis. Destination per word, the start rule, the header
// layout and the VC choice are this design's own. PE and network word
// widths are equal here (the thesis allows them to differ).
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
// Lint note: the VC arbiter's one-hot grant and the top bit of its index
// are not needed; only the index of the chosen VC is used.
module ni_tx #(
  parameter int unsigned X_POS     = 0,
  parameter int unsigned Y_POS     = 0,
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 32,
  parameter int unsigned PKT_LEN   = 8,
  parameter int unsigned ARB_K     = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               pe_valid,
  output logic                               pe_ready,
  input  logic [dsm_pkg::FLIT_W-1:0]         pe_data,
  input  logic [dsm_pkg::COORD_W-1:0]        pe_dst_x,
  input  logic [dsm_pkg::COORD_W-1:0]        pe_dst_y,
  output logic                               net_valid,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]  net_vc,
  output dsm_pkg::flit_t                     net_flit,
  input  logic [NUM_VC-1:0]                  net_ready
);
  import dsm_pkg::*;
  localparam int unsigned MAXP = PKT_LEN - 1;      // payload flits per packet
  localparam int unsigned AW   = idx_w(BUF_DEPTH);
  localparam int unsigned CW   = $clog2(BUF_DEPTH + 1);
  localparam int unsigned VCW  = idx_w(NUM_VC);

  typedef struct packed {
    logic [COORD_W-1:0] dx;
    logic [COORD_W-1:0] dy;
    logic [FLIT_W-1:0]  data;
  } word_t;

  word_t         buf_q [BUF_DEPTH];
  logic [AW-1:0] wp, rp;
  logic [CW-1:0] cnt;

  // Run of words at the front going to the same node (at most MAXP).
  logic [LEN_W-1:0] run;
  logic             run_ends;     // a word for another node follows the run
  always_comb begin
    logic stop;
    run      = '0;
    run_ends = 1'b0;
    stop     = 1'b0;
    for (int i = 0; i < MAXP; i++) begin
      logic [AW-1:0] a;
      a = AW'((int'(rp) + i) % BUF_DEPTH);
      if (!stop) begin
        if (CW'(i) >= cnt) stop = 1'b1;
        else if (buf_q[a].dx != buf_q[rp].dx || buf_q[a].dy != buf_q[rp].dy) begin
          stop = 1'b1;
          run_ends = 1'b1;
        end else run = run + 1'b1;
      end
    end
  end

  typedef enum logic { S_IDLE, S_BODY } state_e;
  state_e            state;
  logic [LEN_W-1:0]  remaining;
  logic [VCW-1:0]    cur_vc;

  // VC for the next packet.
  logic [NUM_VC-1:0]           vc_gnt;
  logic [$clog2(NUM_VC+1)-1:0] vc_idx;
  logic                        vc_any;
  logic                        start, head_go, body_go;

  assign start = (state == S_IDLE) && cnt != '0 &&
                 (run == LEN_W'(MAXP) || run_ends || !pe_valid);

  ps_arbiter #(.N(NUM_VC), .K(ARB_K)) u_vc_arb (
    .clk, .rst_n, .req(net_ready), .ack(head_go),
    .grant(vc_gnt), .grant_idx(vc_idx), .any_grant(vc_any)
  );

  head_t hdr;
  always_comb begin
    hdr       = '0;
    hdr.dst_x = buf_q[rp].dx;
    hdr.dst_y = buf_q[rp].dy;
    hdr.src_x = COORD_W'(X_POS);
    hdr.src_y = COORD_W'(Y_POS);
    hdr.len   = run;
  end

  always_comb begin
    net_valid = 1'b0;
    net_vc    = cur_vc;
    net_flit  = '0;
    if (start && vc_any) begin
      net_valid        = 1'b1;
      net_vc           = VCW'(vc_idx);
      net_flit.head    = 1'b1;
      net_flit.la_port = route_dim(COORD_W'(X_POS), buf_q[rp].dx);
      net_flit.data    = FLIT_W'(hdr);
    end else if (state == S_BODY) begin
      net_valid     = net_ready[cur_vc];
      net_flit.tail = (remaining == LEN_W'(1));
      net_flit.data = buf_q[rp].data;
    end
  end

  assign head_go  = start && vc_any;          // vc_any implies ready on vc_idx
  assign body_go  = (state == S_BODY) && net_ready[cur_vc];
  assign pe_ready = (cnt != CW'(BUF_DEPTH));

  logic push;
  assign push = pe_valid && pe_ready;

  always_ff @(posedge clk) begin
    if (push) buf_q[wp] <= '{dx: pe_dst_x, dy: pe_dst_y, data: pe_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      cnt       <= '0;
      state     <= S_IDLE;
      remaining <= '0;
      cur_vc    <= '0;
    end else begin
      if (push) wp <= (wp == AW'(BUF_DEPTH-1)) ? '0 : wp + 1'b1;
      if (body_go) rp <= (rp == AW'(BUF_DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + CW'(push) - CW'(body_go);
      if (head_go) begin
        state     <= S_BODY;
        remaining <= run;
        cur_vc    <= VCW'(vc_idx);
      end else if (body_go) begin
        remaining <= remaining - 1'b1;
        if (remaining == LEN_W'(1)) state <= S_IDLE;
      end
    end
  end

  initial assert (PKT_LEN >= 2 && PKT_LEN - 1 < 2**LEN_W)
    else $error("ni_tx: PKT_LEN out of range");
  a_flit_ok: assert property (@(posedge clk) disable iff (!rst_n)
                              net_valid |-> net_ready[net_vc]);
endmodule
