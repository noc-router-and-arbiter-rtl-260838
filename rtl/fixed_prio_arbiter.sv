// Fixed-priority arbiter (priority encoder with one-hot output).
//
// Bit 0 has the highest priority. grant has at most one bit set: the lowest
// set bit of req. Purely combinational. Used as the building block of the
// Priority-Select round-robin arbiter, where each group has one of these and
// the priority group's round-robin part is a set of truncated ones. The
// thesis names this block; the req & (-req) form is this design's choice.
module fixed_prio_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] req,
  output logic [N-1:0] grant
);
  // req & -req isolates the lowest set bit.
  assign grant = req & (~req + N'(1));
endmodule
