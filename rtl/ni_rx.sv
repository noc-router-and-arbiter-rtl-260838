// Network interface, network-to-PE part: depacketiser.
//
// Takes the flits the router ejects at this node. On a head flit the
// controller checks that the packet is for this node (a mismatch raises
// hdr_err for one cycle and is counted in err_count), then loads a per-VC
// counter with the packet's payload length and remembers the source. Each
// following flit on that VC goes to the PE at once, tagged with its source
// and with pe_last on the packet's final flit; nothing waits for the whole
// packet. If the PE is not ready the flit goes into a BUF_DEPTH-word buffer,
// which the PE drains first, so words leave in arrival order. Counters are
// kept per VC because packets on different VCs arrive interleaved; each word
// is tagged with its VC (pe_vc) so the PE can tell two interleaved packets
// from the same source apart. Packets on one VC arrive whole and in order.
//
// Interface: in_valid/in_vc/in_flit with per-VC in_ready (all VCs share the
// buffer, so the bits are equal); pe_valid/pe_ready/pe_data/pe_src_x/
// pe_src_y/pe_last/pe_vc. A payload flit arriving in cycle t reaches pe_data in
// the same cycle when the buffer is empty (bypass).
//
// Buffer, header check, length counter and immediate forwarding follow the
// thesis. The error outputs, the per-VC counters and the length/tail
// consistency check are this design's own.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
// Lint note: the look-ahead bits of incoming flits and the unused upper
// data bits of the head are not read here.
module ni_rx #(
  parameter int unsigned X_POS     = 0,
  parameter int unsigned Y_POS     = 0,
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 32
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  logic [dsm_pkg::idx_w(NUM_VC)-1:0]  in_vc,
  input  dsm_pkg::flit_t                     in_flit,
  output logic [NUM_VC-1:0]                  in_ready,
  output logic                               pe_valid,
  input  logic                               pe_ready,
  output logic [dsm_pkg::FLIT_W-1:0]         pe_data,
  output logic [dsm_pkg::COORD_W-1:0]        pe_src_x,
  output logic [dsm_pkg::COORD_W-1:0]        pe_src_y,
  output logic                               pe_last,
  output logic [dsm_pkg::idx_w(NUM_VC)-1:0]  pe_vc,
  output logic                               hdr_err,
  output logic [15:0]                        err_count
);
  import dsm_pkg::*;
  localparam int unsigned VCW = idx_w(NUM_VC);
  localparam int unsigned W   = VCW + 2*COORD_W + 1 + FLIT_W;

  typedef struct packed {
    logic [VCW-1:0]     vc;
    logic [COORD_W-1:0] sx;
    logic [COORD_W-1:0] sy;
    logic               last;
    logic [FLIT_W-1:0]  data;
  } word_t;

  logic [NUM_VC-1:0][LEN_W-1:0]   rem;
  logic [NUM_VC-1:0][COORD_W-1:0] sx_q, sy_q;

  head_t hdr;
  assign hdr = head_t'(in_flit.data);

  logic take, is_payload;
  logic fifo_full, fifo_empty;
  word_t in_word, fifo_word;
  assign take       = in_valid && !fifo_full;
  assign is_payload = take && !in_flit.head;
  assign in_word    = '{vc: in_vc, sx: sx_q[in_vc], sy: sy_q[in_vc],
                        last: (rem[in_vc] == LEN_W'(1)), data: in_flit.data};

  // Header/length checks.
  always_comb begin
    hdr_err = 1'b0;
    if (take) begin
      if (in_flit.head)
        hdr_err = hdr.dst_x != COORD_W'(X_POS) || hdr.dst_y != COORD_W'(Y_POS) ||
                  hdr.len == '0 || rem[in_vc] != '0;
      else
        hdr_err = rem[in_vc] == '0 || (in_flit.tail != (rem[in_vc] == LEN_W'(1)));
    end
  end

  // Buffer with bypass towards the PE.
  logic bypass, push, pop;
  assign bypass = fifo_empty && pe_ready;
  assign push   = is_payload && !bypass;
  assign pop    = !fifo_empty && pe_ready;

  logic [W-1:0] fifo_rd;
  flit_fifo #(.W(W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n,
    .wr_en(push), .wr_data(W'(in_word)), .full(fifo_full),
    .rd_en(pop), .rd_data(fifo_rd), .empty(fifo_empty)
  );
  assign fifo_word = word_t'(fifo_rd);

  word_t out_word;
  assign out_word = fifo_empty ? in_word : fifo_word;
  assign pe_valid = !fifo_empty || is_payload;
  assign pe_data  = out_word.data;
  assign pe_src_x = out_word.sx;
  assign pe_src_y = out_word.sy;
  assign pe_last  = out_word.last;
  assign pe_vc    = out_word.vc;
  assign in_ready = {NUM_VC{!fifo_full}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem       <= '0;
      sx_q      <= '0;
      sy_q      <= '0;
      err_count <= '0;
    end else begin
      if (take && in_flit.head) begin
        rem[in_vc]  <= hdr.len;
        sx_q[in_vc] <= hdr.src_x;
        sy_q[in_vc] <= hdr.src_y;
      end else if (is_payload && rem[in_vc] != '0) begin
        rem[in_vc] <= rem[in_vc] - 1'b1;
      end
      if (hdr_err && err_count != '1) err_count <= err_count + 1'b1;
    end
  end
endmodule
