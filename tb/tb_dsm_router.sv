// Self-checking test of a complete DSM router: node (1,2) of a 4x4 mesh,
// 2 VCs, default buffers. Port numbering in this bench: 0 = processing
// element, 1 + dir for the links (W, E, S, N).
// Phase 1 measures zero-load latency: a packet through the X router alone
// (PE in -> east link) takes 2 cycles, one through both internal routers
// (PE in -> PE out, west link in -> north link out) takes 4.
// Phase 2 drives all five inputs with random packets whose destinations are
// consistent with XY routing from where they enter (a packet from the west
// link is heading east or is at its last column, a packet from a north or
// south link is already in its column), on random VCs, with random per-VC
// backpressure on all five outputs. A scoreboard per (input, VC, output)
// checks the output port chosen by XY routing, the VC, flit order and the
// look-ahead field written for the next router. A drain checks nothing is
// lost.
module tb_dsm_router;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int V = 2, MX = 1, MY = 2, NP = 5;
  logic  [NP-1:0]        in_valid, out_valid;
  logic  [NP-1:0][0:0]   in_vc, out_vc;
  flit_t [NP-1:0]        in_flit, out_flit;
  logic  [NP-1:0][V-1:0] in_ready, out_ready;

  dsm_router #(.X_POS(MX), .Y_POS(MY), .NUM_VC(V)) dut (
    .clk, .rst_n,
    .pe_in_valid(in_valid[0]), .pe_in_vc(in_vc[0]), .pe_in_flit(in_flit[0]), .pe_in_ready(in_ready[0]),
    .pe_out_valid(out_valid[0]), .pe_out_vc(out_vc[0]), .pe_out_flit(out_flit[0]), .pe_out_ready(out_ready[0]),
    .link_in_valid(in_valid[4:1]), .link_in_vc(in_vc[4:1]), .link_in_flit(in_flit[4:1]),
    .link_in_ready(in_ready[4:1]),
    .link_out_valid(out_valid[4:1]), .link_out_vc(out_vc[4:1]), .link_out_flit(out_flit[4:1]),
    .link_out_ready(out_ready[4:1])
  );

  flit_t src [NP][V][$];
  flit_t exp [NP][V][NP][$];
  int    cur_src [NP][V];
  int    seq = 0, n_rx = 0, n_bp = 0;
  longint edge_no = 0;
  int    ready_pct = 60;

  function automatic port_e rdim(int cur, int dst);
    return (dst < cur) ? PORT_LEFT : (dst > cur) ? PORT_RIGHT : PORT_LOCAL;
  endfunction

  function automatic int xy_out(int dx, int dy);
    if (dx < MX) return 1;
    if (dx > MX) return 2;
    if (dy < MY) return 3;
    if (dy > MY) return 4;
    return 0;
  endfunction

  task automatic add_packet(int p, int v, int dx, int dy, int len);
    flit_t f;
    flit_t e;
    head_t h;
    int o;
    h = '0; h.dst_x = 2'(dx); h.dst_y = 2'(dy); h.len = 4'(len);
    f = '0; f.head = 1'b1;
    f.la_port = (p >= 3) ? rdim(MY, dy) : rdim(MX, dx);
    f.data = {4'(p), 12'(seq++), 4'h0, 12'(h)};
    src[p][v].push_back(f);
    o = xy_out(dx, dy);
    e = f;
    case (o)
      1: e.la_port = rdim(MX - 1, dx);
      2: e.la_port = rdim(MX + 1, dx);
      3: e.la_port = rdim(MY - 1, dy);
      4: e.la_port = rdim(MY + 1, dy);
      default: ;
    endcase
    exp[p][v][o].push_back(e);
    for (int k = 0; k < len; k++) begin
      f = '0; f.tail = (k == len - 1); f.la_port = port_e'($urandom % 3);
      f.data = {4'(p), 12'(seq++), 16'($urandom)};
      src[p][v].push_back(f);
      exp[p][v][o].push_back(f);
    end
  endtask

  // a random destination that XY routing can bring in through port p
  task automatic add_random(int p);
    int dx, dy;
    dx = $urandom % 4; dy = $urandom % 4;
    case (p)
      1: dx = 1 + $urandom % 3;            // from the west: x >= 1
      2: dx = $urandom % 2;                // from the east: x <= 1
      3: begin dx = MX; dy = MY + $urandom % 2; end   // from the south
      4: begin dx = MX; dy = $urandom % 3; end        // from the north
      default: ;
    endcase
    add_packet(p, $urandom % V, dx, dy, 1 + $urandom % 7);
  endtask

  always @(posedge clk) begin
    edge_no++;
    for (int p = 0; p < NP; p++)
      if (in_valid[p] && in_ready[p][in_vc[p]]) void'(src[p][in_vc[p]].pop_front());
    for (int o = 0; o < NP; o++)
      if (out_valid[o]) begin
        flit_t f;
        int v, p;
        v = out_vc[o];
        f = out_flit[o];
        p = f.head ? int'(f.data[31:28]) : cur_src[o][v];
        checks++;
        if (!out_ready[o][v]) begin
          failures++; $display("FAIL: out %0d vc%0d sent without ready", o, v);
        end else if (p >= NP || exp[p][v][o].size() == 0) begin
          failures++; $display("FAIL: out %0d vc%0d unexpected flit %h", o, v, f);
        end else begin
          flit_t e;
          e = exp[p][v][o].pop_front();
          if (f.data != e.data || f.head != e.head || f.tail != e.tail ||
              (f.head && o != 0 && f.la_port != e.la_port)) begin
            failures++; $display("FAIL: out %0d vc%0d got %h expected %h", o, v, f, e);
          end
          if (f.head) cur_src[o][v] = p;
          n_rx++;
        end
      end
    #1;
    for (int p = 0; p < NP; p++) begin
      int c0;
      c0 = $urandom % V;
      in_valid[p] = 1'b0; in_vc[p] = '0; in_flit[p] = '0;
      for (int k = 0; k < V; k++) begin
        int v;
        v = (c0 + k) % V;
        if (!in_valid[p] && src[p][v].size() > 0) begin
          if (in_ready[p][v]) begin
            in_valid[p] = 1'b1; in_vc[p] = 1'(v); in_flit[p] = src[p][v][0];
          end else n_bp++;
        end
      end
    end
    for (int o = 0; o < NP; o++)
      for (int v = 0; v < V; v++) out_ready[o][v] = ($urandom % 100) < ready_pct;
  end

  task automatic measure(int p, int dx, int dy, int o, int expect_cycles);
    longint t_in, t_out;
    add_packet(p, 1, dx, dy, 1);
    fork
      begin @(posedge clk iff (in_valid[p] && in_ready[p][in_vc[p]])); t_in = edge_no; end
      begin @(posedge clk iff (out_valid[o])); t_out = edge_no; end
    join
    checks++;
    if (t_out - t_in != expect_cycles) begin
      failures++;
      $display("FAIL: port %0d -> %0d took %0d cycles, expected %0d", p, o, t_out - t_in, expect_cycles);
    end else $display("zero-load latency port %0d -> %0d: %0d cycles", p, o, t_out - t_in);
    repeat (6) @(posedge clk);
  endtask

  initial begin
    in_valid = '0; in_vc = '0; in_flit = '0; out_ready = '0;
    for (int o = 0; o < NP; o++) for (int v = 0; v < V; v++) cur_src[o][v] = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    ready_pct = 100;
    measure(0, 3, 0, 2, 2);    // PE -> east link: X router only
    measure(0, MX, MY, 0, 4);  // PE -> PE: X router then Y router
    measure(1, MX, 3, 4, 4);   // west link -> north link: turn X -> Y
    measure(3, MX, 3, 4, 2);   // south link -> north link: Y router only
    ready_pct = 60;
    for (int c = 0; c < 20000; c++) begin
      @(posedge clk);
      for (int p = 0; p < NP; p++)
        if (src[p][0].size() + src[p][1].size() < 24 && $urandom % 8 == 0) add_random(p);
    end
    ready_pct = 100;
    repeat (2000) @(posedge clk);
    for (int p = 0; p < NP; p++)
      for (int v = 0; v < V; v++) begin
        checks++;
        if (src[p][v].size() != 0) begin failures++; $display("FAIL: input %0d vc%0d stuck", p, v); end
        for (int o = 0; o < NP; o++) begin
          checks++;
          if (exp[p][v][o].size() != 0) begin
            failures++;
            $display("FAIL: %0d flits from in %0d vc%0d to out %0d lost", exp[p][v][o].size(), p, v, o);
          end
        end
      end
    checks++;
    if (n_rx < 10000 || n_bp == 0) begin
      failures++; $display("FAIL: only %0d flits delivered, %0d backpressure cycles", n_rx, n_bp);
    end
    $display("router: %0d flits delivered, %0d sender cycles held by backpressure", n_rx, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
