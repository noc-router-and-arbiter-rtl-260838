// Self-checking test of one internal router: the X router of node (1,1) with
// 2 VCs, 32-flit static input buffers and 2-stage pipeline.
// Phase 1 sends a lone packet through an idle router and checks the
// two-cycle latency: a flit accepted at clock edge t leaves at edge t+2.
// Phase 2 drives all three inputs with random packets on random VCs toward
// every legal output (no U-turns) while the three outputs apply random
// per-VC backpressure. A scoreboard per (input, VC, output) checks that each
// flit leaves on the routed port, on its own VC, in order, with the head's
// look-ahead field rewritten for the next router. A final drain checks that
// nothing is lost.
module tb_internal_router;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int V = 2, MX = 1;
  logic  [2:0]        in_valid, out_valid;
  logic  [2:0][0:0]   in_vc, out_vc;
  flit_t [2:0]        in_flit, out_flit;
  logic  [2:0][V-1:0] in_ready, out_ready;

  internal_router #(.DIM(1'b0), .X_POS(MX), .Y_POS(1), .NUM_VC(V)) dut (.*);

  flit_t src [3][V][$];             // flits still to send per input and VC
  flit_t exp [3][V][3][$];          // flits expected per input, VC and output
  int    cur_src [3][V];            // input that owns each output VC
  int    seq = 0, n_rx = 0, n_tx = 0, n_bp = 0;
  longint edge_no = 0;
  int    ready_pct = 60;

  function automatic port_e rdim(int cur, int dst);
    return (dst < cur) ? PORT_LEFT : (dst > cur) ? PORT_RIGHT : PORT_LOCAL;
  endfunction

  // packet from input p to output o, with len body flits
  task automatic add_packet(int p, int v, int o, int len);
    flit_t f;
    flit_t e;
    head_t h;
    h = '0;
    h.dst_x = (o == 1) ? 2'd0 : (o == 2) ? 2'(2 + $urandom % 2) : 2'(MX);
    h.dst_y = 2'($urandom);
    h.len   = 4'(len);
    f = '0; f.head = 1'b1; f.la_port = port_e'(o);
    f.data = {4'(p), 12'(seq++), 4'h0, 12'(h)};
    src[p][v].push_back(f);
    e = f;
    e.la_port = (o == 1) ? rdim(MX - 1, h.dst_x) : (o == 2) ? rdim(MX + 1, h.dst_x) : rdim(1, h.dst_y);
    exp[p][v][o].push_back(e);
    for (int k = 0; k < len; k++) begin
      f = '0; f.tail = (k == len - 1); f.la_port = port_e'($urandom % 3);
      f.data = {4'(p), 12'(seq++), 16'($urandom)};
      src[p][v].push_back(f);
      exp[p][v][o].push_back(f);
    end
  endtask

  // one random legal packet on input p
  task automatic add_random(int p);
    int o;
    do o = $urandom % 3; while (o == p && p != 0);
    add_packet(p, $urandom % V, o, 1 + $urandom % 7);
  endtask

  // senders: valid only on a VC whose ready bit is set
  always @(posedge clk) begin
    edge_no++;
    for (int p = 0; p < 3; p++)
      if (in_valid[p] && in_ready[p][in_vc[p]]) begin
        void'(src[p][in_vc[p]].pop_front());
        n_tx++;
      end
    for (int o = 0; o < 3; o++)
      if (out_valid[o]) begin
        flit_t f;
        int v, p;
        v = out_vc[o];
        f = out_flit[o];
        p = f.head ? int'(f.data[31:28]) : cur_src[o][v];
        checks++;
        if (!out_ready[o][v]) begin
          failures++; $display("FAIL: out %0d vc%0d sent without ready", o, v);
        end else if (p > 2 || exp[p][v][o].size() == 0) begin
          failures++; $display("FAIL: out %0d vc%0d unexpected flit %h", o, v, f);
        end else begin
          flit_t e;
          e = exp[p][v][o].pop_front();
          if (f.data != e.data || f.head != e.head || f.tail != e.tail ||
              (f.head && f.la_port != e.la_port)) begin
            failures++; $display("FAIL: out %0d vc%0d got %h expected %h", o, v, f, e);
          end
          if (f.head) cur_src[o][v] = p;
          n_rx++;
        end
      end
    #1;
    for (int p = 0; p < 3; p++) begin
      int c0;
      c0 = $urandom % V;
      in_valid[p] = 1'b0;
      in_vc[p]    = '0;
      in_flit[p]  = '0;
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
    for (int o = 0; o < 3; o++)
      for (int v = 0; v < V; v++) out_ready[o][v] = ($urandom % 100) < ready_pct;
  end

  initial begin
    in_valid = '0; in_vc = '0; in_flit = '0; out_ready = '0;
    for (int o = 0; o < 3; o++) for (int v = 0; v < V; v++) cur_src[o][v] = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    // phase 1: idle router, always-ready outputs, one packet per legal turn
    ready_pct = 100;
    for (int p = 0; p < 3; p++)
      for (int o = 0; o < 3; o++)
        if (o != p || p == 0) begin
          add_packet(p, (p + o) % V, o, 1);
          repeat (8) @(posedge clk);
          checks++;
          if (exp[p][(p + o) % V][o].size() != 0) begin
            failures++; $display("FAIL: idle packet %0d -> %0d not delivered in 8 cycles", p, o);
          end
        end
    // hop latency, input 0 -> output 2: accepted at edge t, sent at edge t+2
    begin
      longint t_in, t_out;
      add_packet(0, 0, 2, 1);
      t_in = -1; t_out = -1;
      fork
        begin @(posedge clk iff (in_valid[0] && in_ready[0][in_vc[0]])); t_in = edge_no; end
        begin @(posedge clk iff (out_valid[2])); t_out = edge_no; end
      join
      checks++;
      if (t_out - t_in != 2) begin
        failures++; $display("FAIL: hop latency %0d cycles, expected 2", t_out - t_in);
      end else $display("hop latency: %0d cycles", t_out - t_in);
      repeat (5) @(posedge clk);
    end
    // phase 2: random load with backpressure
    ready_pct = 60;
    for (int c = 0; c < 20000; c++) begin
      @(posedge clk);
      for (int p = 0; p < 3; p++)
        if (src[p][0].size() + src[p][1].size() < 24 && $urandom % 6 == 0) add_random(p);
    end
    ready_pct = 100;
    repeat (2000) @(posedge clk);
    for (int p = 0; p < 3; p++)
      for (int v = 0; v < V; v++) begin
        checks++;
        if (src[p][v].size() != 0) begin failures++; $display("FAIL: input %0d vc%0d stuck", p, v); end
        for (int o = 0; o < 3; o++) begin
          checks++;
          if (exp[p][v][o].size() != 0) begin
            failures++; $display("FAIL: %0d flits from in %0d vc%0d to out %0d lost", exp[p][v][o].size(), p, v, o);
          end
        end
      end
    checks++;
    if (n_rx < 10000 || n_bp == 0) begin
      failures++; $display("FAIL: only %0d flits delivered, %0d backpressure cycles", n_rx, n_bp);
    end
    $display("internal router: %0d flits delivered, %0d sender cycles held by backpressure", n_rx, n_bp);
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
