// DVOQR dynamic virtual-channel buffer.
//
// NUM_VC virtual channels share DEPTH flit slots. Three parts:
//  * UDB, the unified dynamic buffer: DEPTH registers with one write port
//    and one read port per VC (each VC's head flit is always visible);
//  * UDBA, the allocator: a state vector with one busy bit per slot and a
//    fixed-priority arbiter that hands out the lowest free slot;
//  * one VOAQ per VC, holding that VC's slot addresses in order.
// A write stores the flit in the slot the allocator picks and pushes the
// slot address to the VC's VOAQ. A read pops the VC's VOAQ and clears the
// slot's busy bit. One write and one read (of any VC) per cycle. A VC can
// use anything from zero to all DEPTH slots; a write is accepted while any
// slot is free (slots freed in the same cycle are reused from the next).
//
// The three-part structure, the register-based UDB and the lowest-slot-first
// allocation follow the thesis. No slots are reserved per VC (the thesis
// reserves none for DVOQR).
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
// Lint note: vq_full, the per-VC queue-full flags, is left unread; a VOAQ
// cannot fill before the shared buffer does, and `full` covers that.
module dvoqr_buffer #(
  parameter int unsigned W      = 36,   // one flit_t
  parameter int unsigned NUM_VC = 2,
  parameter int unsigned DEPTH  = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr_en,
  input  logic [dsm_pkg::idx_w(NUM_VC)-1:0] wr_vc,
  input  logic [W-1:0]              wr_data,
  output logic                      full,      // no free slot
  input  logic                      rd_en,
  input  logic [dsm_pkg::idx_w(NUM_VC)-1:0] rd_vc,
  output logic [NUM_VC-1:0][W-1:0]  rd_data,   // head flit of each VC
  output logic [NUM_VC-1:0]         empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]     udb [DEPTH];
  logic [DEPTH-1:0] busy;          // UDBA state vector
  logic [DEPTH-1:0] free_oh;       // lowest free slot, one-hot
  logic [AW-1:0]    free_idx;

  fixed_prio_arbiter #(.N(DEPTH)) u_alloc (.req(~busy), .grant(free_oh));

  always_comb begin
    free_idx = '0;
    for (int i = 0; i < DEPTH; i++)
      if (free_oh[i]) free_idx = AW'(i);
  end

  assign full = &busy;

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty[rd_vc];

  logic [NUM_VC-1:0][AW-1:0] head_addr;
  logic [NUM_VC-1:0]         vq_full;
  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    voaq #(.DEPTH(DEPTH), .AW(AW)) u_voaq (
      .clk, .rst_n,
      .push      (do_wr && wr_vc == (dsm_pkg::idx_w(NUM_VC))'(v)),
      .push_addr (free_idx),
      .pop       (do_rd && rd_vc == (dsm_pkg::idx_w(NUM_VC))'(v)),
      .head_addr (head_addr[v]),
      .empty     (empty[v]),
      .full      (vq_full[v])
    );
    assign rd_data[v] = udb[head_addr[v]];
  end

  always_ff @(posedge clk) begin
    if (do_wr) udb[free_idx] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      busy <= '0;
    else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (do_wr && free_oh[i])
          busy[i] <= 1'b1;
        else if (do_rd && head_addr[rd_vc] == AW'(i))
          busy[i] <= 1'b0;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty[rd_vc]));
endmodule
