// Self-checking test of the transmit half of the network interface at node
// (2,1), 2 VCs, 32-word buffer, 8-flit packets (head + up to 7 data flits).
// Phase 1 streams 700 words to one destination with the network always
// ready: every packet must be full (7 data flits) and, with one head flit per
// 7 words, the 800 flits must leave within 800 cycles plus a few cycles of
// start-up. Phase 2 sends words to random destinations with random PE
// pauses and random per-VC network backpressure. A decoder on the network
// side checks each packet: head fields (destination, source, length,
// look-ahead port for the X router), one VC for the whole packet, a VC only
// used while its ready bit is set, tail on the last data flit, data in PE
// order, and that a packet never mixes destinations.
module tb_ni_tx;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int V = 2, MX = 2, MY = 1;
  logic              pe_valid, pe_ready;
  logic [FLIT_W-1:0] pe_data;
  logic [1:0]        pe_dst_x, pe_dst_y;
  logic              net_valid;
  logic [0:0]        net_vc;
  flit_t             net_flit;
  logic [V-1:0]      net_ready;

  ni_tx #(.X_POS(MX), .Y_POS(MY), .NUM_VC(V)) dut (.*);

  typedef struct { int dx; int dy; logic [31:0] d; } word_s;
  word_s sent [$];
  int    remaining = 0, cur_vc = 0, cur_dx = 0, cur_dy = 0;
  int    n_pkts = 0, n_full = 0, n_words = 0, n_vc [V];
  int    pe_pct = 100, ready_pct = 100;
  int    same_dst = -1;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && pe_valid && pe_ready) begin
      word_s w;
      w.dx = pe_dst_x; w.dy = pe_dst_y; w.d = pe_data;
      sent.push_back(w);
    end
    if (rst_n && net_valid) begin
      checks++;
      if (!net_ready[net_vc]) begin failures++; $display("FAIL: flit on vc%0d without ready", net_vc); end
      if (net_flit.head) begin
        head_t h;
        h = head_t'(net_flit.data);
        checks++;
        if (remaining != 0 || h.len == 0 || h.len > 7 || sent.size() == 0 ||
            h.src_x != MX || h.src_y != MY || h.dst_x != sent[0].dx || h.dst_y != sent[0].dy ||
            net_flit.la_port != route_dim(2'(MX), h.dst_x) || net_flit.tail) begin
          failures++; $display("FAIL: bad head %h (remaining %0d)", net_flit, remaining);
        end
        remaining = h.len; cur_vc = net_vc; cur_dx = h.dst_x; cur_dy = h.dst_y;
        n_pkts++; n_vc[net_vc]++;
        if (h.len == 7) n_full++;
      end else begin
        word_s w;
        checks++;
        if (remaining == 0 || sent.size() == 0) begin
          failures++; $display("FAIL: data flit outside a packet");
        end else begin
          w = sent.pop_front();
          if (net_vc != cur_vc || net_flit.data != w.d || w.dx != cur_dx || w.dy != cur_dy ||
              net_flit.tail != (remaining == 1)) begin
            failures++;
            $display("FAIL: data flit %h vc%0d, expected %h on vc%0d tail=%0d", net_flit, net_vc, w.d, cur_vc,
                     remaining == 1);
          end
          remaining--;
          n_words++;
        end
      end
    end
    #1;
    for (int v = 0; v < V; v++) net_ready[v] = ($urandom % 100) < ready_pct;
  end

  // PE driver: holds a word until it is taken
  initial begin
    pe_valid = 0; pe_data = '0; pe_dst_x = '0; pe_dst_y = '0;
  end
  task automatic pe_send(int n);
    for (int i = 0; i < n; i++) begin
      pe_data  = $urandom;
      pe_dst_x = (same_dst >= 0) ? 2'(same_dst) : 2'($urandom);
      pe_dst_y = (same_dst >= 0) ? 2'(same_dst) : 2'($urandom % 2 + ($urandom % 2) * 2);
      while (($urandom % 100) >= pe_pct) begin pe_valid = 0; @(posedge clk); #1; end
      pe_valid = 1;
      do @(posedge clk); while (!pe_ready);
      #1;
    end
    pe_valid = 0;
  endtask

  initial begin
    longint t0;
    int n_before;
    for (int v = 0; v < V; v++) n_vc[v] = 0;
    net_ready = '1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // phase 1: one destination, no backpressure
    same_dst = 3;
    t0 = cyc;
    pe_send(700);
    wait (sent.size() == 0 && remaining == 0);
    @(posedge clk); #1;
    checks++;
    if (n_full != 100 || n_pkts != 100) begin
      failures++; $display("FAIL: 700 words gave %0d packets, %0d full", n_pkts, n_full);
    end
    checks++;
    if (cyc - t0 > 810) begin
      failures++; $display("FAIL: 800 flits took %0d cycles", cyc - t0);
    end
    $display("stream: 700 words in %0d packets, %0d cycles", n_pkts, cyc - t0);
    // phase 2: random destinations, PE pauses, network backpressure
    same_dst = -1;
    pe_pct = 70;
    ready_pct = 60;
    n_before = n_words;
    pe_send(20000);
    ready_pct = 100;
    repeat (200) @(posedge clk);
    checks++;
    if (sent.size() != 0 || remaining != 0 || n_words - n_before != 20000) begin
      failures++; $display("FAIL: %0d words left, %0d delivered", sent.size(), n_words - n_before);
    end
    checks++;
    if (n_vc[0] == 0 || n_vc[1] == 0) begin failures++; $display("FAIL: a VC was never used"); end
    $display("total: %0d packets (%0d full), vc0=%0d vc1=%0d", n_pkts, n_full, n_vc[0], n_vc[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
