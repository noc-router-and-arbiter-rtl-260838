// Virtual Output Address Queue (VOAQ) of a DVOQR dynamic buffer.
//
// Holds, in arrival order, the addresses of the unified-buffer slots used by
// one virtual channel. It is a shift FIFO: the address to be read next is
// always in entry 0, so a read needs no pointer decode. Its fill state is a
// one-hot tail vector of DEPTH+1 bits: bit 0 set means empty, bit DEPTH set
// means full. A push writes the entry the tail points at and shifts the tail
// up; a pop shifts all entries down by one and the tail down; both in the
// same cycle write the new address one entry lower.
//
// Structure (shift FIFO, one-hot tail vector, DEPTH equal to the number of
// slots of the unified buffer) follows the thesis; reset state and the
// simultaneous push/pop rule are this design's choice.
// Lint note: rst_n is reported as used both synchronously and
// asynchronously because the assertions are disabled while it is low; every
// flip-flop resets asynchronously.
module voaq #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [AW-1:0] push_addr,
  input  logic          pop,
  output logic [AW-1:0] head_addr,
  output logic          empty,
  output logic          full
);
  logic [AW-1:0]  q    [DEPTH];
  logic [DEPTH:0] tail;           // one-hot: index of first free entry

  assign empty     = tail[0];
  assign full      = tail[DEPTH];
  assign head_addr = q[0];

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      if (do_pop) begin
        // shift down; the new address lands just below the old tail
        if (do_push && tail[i+1])
          q[i] <= push_addr;
        else if (i < DEPTH-1)
          q[i] <= q[(i < DEPTH-1) ? i+1 : i];
      end else if (do_push && tail[i]) begin
        q[i] <= push_addr;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      tail <= (DEPTH+1)'(1);
    else if (do_push && !do_pop)
      tail <= tail << 1;
    else if (do_pop && !do_push)
      tail <= tail >> 1;
  end

  a_tail_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(tail));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
