// Self-checking test of the SplitVC unit of the X internal router at node
// (1,1), 2 VCs. The testbench plays the input buffer (one packet queue per
// VC) and the output queues (random per-port, per-VC ready). Head flits name
// their output port; body flits carry a random look-ahead field that must be
// ignored. Checks: a flit is only moved into an output queue with room, to
// the port its packet was routed to, on its own VC, with its data intact;
// a head flit leaves with the look-ahead port for the next router; flits of
// one VC keep their order; and a VC that can move is never left idle (a
// blocked VC does not hold up the other one).
module tb_split_vc;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int V = 2;
  logic  [V-1:0]        in_valid;
  flit_t [V-1:0]        in_head;
  logic                 rd_en;
  logic  [0:0]          rd_vc, out_vc;
  logic  [2:0][V-1:0]   out_ready;
  logic  [2:0]          out_wr;
  flit_t                out_flit;

  split_vc #(.NUM_VC(V), .DIM(1'b0), .X_POS(1), .Y_POS(1)) dut (.*);

  flit_t q [V][$];
  port_e route [V];
  int n_moved = 0, n_blocked_other = 0;

  function automatic port_e ref_port(int cur, int dst);
    return (dst < cur) ? PORT_LEFT : (dst > cur) ? PORT_RIGHT : PORT_LOCAL;
  endfunction

  task automatic add_packet(int v);
    flit_t f;
    head_t h;
    int o, len;
    o = $urandom % 3;
    h = '0;
    h.dst_x = (o == 1) ? 2'd0 : (o == 2) ? 2'(2 + $urandom % 2) : 2'd1;
    h.dst_y = 2'($urandom);
    len = 1 + $urandom % 7;
    h.len = 4'(len);
    f = '0; f.head = 1'b1; f.la_port = port_e'(o); f.data = FLIT_W'(h);
    q[v].push_back(f);
    for (int i = 0; i < len; i++) begin
      f = '0; f.tail = (i == len - 1); f.la_port = port_e'($urandom % 3); f.data = $urandom;
      q[v].push_back(f);
    end
  endtask

  initial begin
    out_ready = '0;
    for (int v = 0; v < V; v++) route[v] = PORT_LOCAL;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      port_e tgt [V];
      bit can [V];
      for (int v = 0; v < V; v++) if (q[v].size() < 4 && ($urandom % 4 == 0)) add_packet(v);
      for (int v = 0; v < V; v++) begin
        in_valid[v] = q[v].size() > 0;
        in_head[v]  = in_valid[v] ? q[v][0] : flit_t'($urandom);
      end
      out_ready = 6'($urandom) | 6'($urandom);
      #1;
      for (int v = 0; v < V; v++) begin
        tgt[v] = (q[v].size() > 0 && q[v][0].head) ? q[v][0].la_port : route[v];
        can[v] = q[v].size() > 0 && out_ready[tgt[v]][v];
      end
      checks++;
      if (rd_en != (can[0] || can[1])) begin
        failures++; $display("FAIL: rd_en=%b while movable VCs %b%b", rd_en, can[1], can[0]);
      end
      if (rd_en) begin
        flit_t f;
        flit_t exp;
        head_t h;
        f = q[rd_vc][0];
        exp = f;
        h = head_t'(f.data);
        if (f.head) begin
          if (f.la_port == PORT_LEFT)       exp.la_port = ref_port(0, h.dst_x);
          else if (f.la_port == PORT_RIGHT) exp.la_port = ref_port(2, h.dst_x);
          else                              exp.la_port = ref_port(1, h.dst_y);
        end
        checks++;
        if (!can[rd_vc] || out_wr != (3'b001 << tgt[rd_vc]) || out_vc != rd_vc ||
            out_flit.data != exp.data || out_flit.head != exp.head || out_flit.tail != exp.tail ||
            (f.head && out_flit.la_port != exp.la_port)) begin
          failures++;
          $display("FAIL: vc%0d wr=%b exp port %0d, flit %h exp %h", rd_vc, out_wr, tgt[rd_vc], out_flit, exp);
        end
        if (can[0] && can[1]) ; else if (!can[rd_vc ^ 1'b1] && q[rd_vc ^ 1'b1].size() > 0) n_blocked_other++;
        n_moved++;
      end else begin
        checks++;
        if (out_wr != 0) begin failures++; $display("FAIL: write without read"); end
      end
      begin
        bit took;
        int tv;
        took = rd_en;
        tv = rd_vc;
        @(posedge clk); #1;
        if (took) begin
          if (q[tv][0].head) route[tv] = q[tv][0].la_port;
          void'(q[tv].pop_front());
        end
      end
    end
    checks++;
    if (n_moved < 1000 || n_blocked_other == 0) begin
      failures++; $display("FAIL: moved %0d, passed a blocked VC %0d times", n_moved, n_blocked_other);
    end
    $display("split: %0d flits moved, %0d times past a blocked VC", n_moved, n_blocked_other);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
