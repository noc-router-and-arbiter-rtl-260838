// End-to-end test of the 4x4 DSM mesh at its default parameters.
//
// Phase 1, zero load: single words 0->15, 5->5 and 3->12. Latency from the
// tx handshake to the rx handshake must be 2*R + 2 cycles, with R the number
// of internal routers crossed (|dx|+1 X routers and |dy|+1 Y routers).
// Phase 2, streaming: node 0 streams words to node 1 without pause; all must
// arrive within words*PKT_LEN/(PKT_LEN-1) cycles plus a small margin (one
// flit per cycle on the link, one head per 7 payload flits).
// Phase 3, uniform random traffic from all 16 nodes, with PEs that randomly
// refuse words; for 600 cycles node 5 stops reading while a third of all
// words are sent to it, so its traffic backs up into the mesh. Then a drain. Every word carries (source, destination,
// sequence number); the scoreboard checks the source tag, the order of
// each pair's words on each VC, that every word arrives exactly once, and that no header error was counted.
// Phase 4, saturation: all nodes inject without pause in 7-word runs to
// uniformly random other nodes, all PEs read at once; the delivered rate in
// flits/cycle/node is printed and must be at least 0.5.
// Mechanisms counted (each must happen): injection stall, link backpressure,
// PE-side backpressure, both VCs used, X-to-Y turns, maximum-length packets,
// packets cut short.
module tb_dsm_mesh;
  import dsm_pkg::*;
  localparam int NN = 16;
  localparam int PKT_LEN = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NN-1:0]              tx_valid, tx_ready, rx_valid, rx_ready, rx_last;
  logic [NN-1:0][0:0]         rx_vc;
  logic [NN-1:0][FLIT_W-1:0]  tx_data, rx_data;
  logic [NN-1:0][COORD_W-1:0] tx_dst_x, tx_dst_y, rx_src_x, rx_src_y;
  logic [NN-1:0][15:0]        rx_err_count;

  dsm_mesh dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // ---------------- scoreboard ----------------
  int unsigned tx_seq   [NN][NN];
  int          rx_last_seq [NN][NN][2];   // last sequence number per pair and VC
  bit          seen [NN][NN][int];
  longint      sent = 0, received = 0;
  longint      tx_time [NN];     // cycle of the last tx handshake per node
  int          pkt_words [NN][2];
  int          n_full_pkt = 0, n_short_pkt = 0, n_turn = 0;

  function automatic logic [31:0] mkword(int s, int d, int unsigned q);
    return {4'(s), 4'(d), 24'(q)};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_tx_stall = 0, n_link_bp = 0, n_pe_bp = 0, n_vc1 = 0, n_vc0 = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (tx_valid[n] && !tx_ready[n]) n_tx_stall++;
      if (rx_valid[n] && !rx_ready[n]) n_pe_bp++;
      for (int d = 0; d < 4; d++) begin
        if (dut.lo_valid[n][d]) begin
          if (dut.lo_vc[n][d] == 1'b1) n_vc1++; else n_vc0++;
        end
      end
    end
    // a link whose receiving buffer is full on some VC
    for (int n = 0; n < NN; n++)
      for (int d = 0; d < 4; d++) begin
        int x, y;
        bit has;
        x = n % 4;
        y = n / 4;
        has = (d == 0) ? x > 0 : (d == 1) ? x < 3 : (d == 2) ? y > 0 : y < 3;
        if (has && dut.lo_ready[n][d] != 2'b11) n_link_bp++;
      end
  end

  // ---------------- receive side checking ----------------
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < NN; n++) begin
      if (rx_valid[n] && rx_ready[n]) begin
        int s, d;
        int unsigned q;
        s = rx_data[n][31:28];
        d = rx_data[n][27:24];
        q = rx_data[n][23:0];
        checks++;
        if (d != n) fail($sformatf("node %0d got word for %0d", n, d));
        checks++;
        if ({rx_src_y[n], rx_src_x[n]} != 4'(s))
          fail($sformatf("node %0d: src tag %0d,%0d but word from %0d", n, rx_src_x[n], rx_src_y[n], s));
        // order holds per VC; every word arrives exactly once
        checks++;
        if (int'(q) <= rx_last_seq[s][d][rx_vc[n]] || q >= tx_seq[s][d] || seen[s][d].exists(q))
          fail($sformatf("pair %0d->%0d vc %0d: seq %0d after %0d (sent %0d)", s, d, rx_vc[n], q,
                         rx_last_seq[s][d][rx_vc[n]], tx_seq[s][d]));
        rx_last_seq[s][d][rx_vc[n]] = q;
        seen[s][d][q] = 1'b1;
        received++;
        pkt_words[n][rx_vc[n]]++;
        if ((s % 4) != (n % 4) && (s / 4) != (n / 4) && rx_last[n]) n_turn++;
        if (rx_last[n]) begin
          checks++;
          if (pkt_words[n][rx_vc[n]] > PKT_LEN - 1)
            fail($sformatf("packet of %0d words", pkt_words[n][rx_vc[n]]));
          if (pkt_words[n][rx_vc[n]] == PKT_LEN - 1) n_full_pkt++; else n_short_pkt++;
          pkt_words[n][rx_vc[n]] = 0;
        end
      end
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic idle_all();
    tx_valid = '0;
  endtask

  // Send one word from s to d now (blocking until accepted); returns the
  // cycle of the handshake.
  task automatic send_one(int s, int d, output longint t);
    tx_valid[s] = 1'b1;
    tx_data[s]  = mkword(s, d, tx_seq[s][d]);
    tx_dst_x[s] = 2'(d % 4);
    tx_dst_y[s] = 2'(d / 4);
    // tx_ready only changes at clock edges: test it before the edge
    while (!tx_ready[s]) begin @(posedge clk); #1; end
    @(posedge clk);
    #1;
    t = cycle - 1;
    tx_seq[s][d]++;
    sent++;
    tx_valid[s] = 1'b0;
  endtask

  task automatic zero_load(int s, int d);
    longint t0, t1;
    int r, expect_lat;
    longint n_before;
    n_before = received;
    send_one(s, d, t0);
    while (received == n_before) @(posedge clk);
    t1 = cycle - 1;   // handshake edge (counter already advanced)
    r = ((s % 4 > d % 4) ? s % 4 - d % 4 : d % 4 - s % 4) + 1 +
        ((s / 4 > d / 4) ? s / 4 - d / 4 : d / 4 - s / 4) + 1;
    expect_lat = 2 * r + 2;
    checks++;
    if (t1 - t0 != expect_lat)
      fail($sformatf("zero-load %0d->%0d latency %0d, expected %0d", s, d, t1 - t0, expect_lat));
    else
      $display("zero-load %0d->%0d: %0d cycles (R=%0d internal routers)", s, d, t1 - t0, r);
    repeat (5) @(posedge clk);
    #1;   // drive stimulus away from the clock edge
  endtask

  longint t_start, t_end, inj_words;
  int unsigned rnd;

  initial begin
    tx_valid = '0; tx_data = '0; tx_dst_x = '0; tx_dst_y = '0; rx_ready = '1;
    for (int n = 0; n < NN; n++) begin
      pkt_words[n][0] = 0;
      pkt_words[n][1] = 0;
      for (int d = 0; d < NN; d++) begin
        tx_seq[n][d] = 0;
        rx_last_seq[n][d][0] = -1;
        rx_last_seq[n][d][1] = -1;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;

    // Phase 1: zero-load latency
    zero_load(0, 15);
    zero_load(5, 5);
    zero_load(3, 12);

    // Phase 2: streaming 0 -> 1
    begin
      longint tt;
      int nwords = 700;
      t_start = cycle;
      for (int i = 0; i < nwords; i++) begin
        tx_valid[0] = 1'b1;
        tx_data[0]  = mkword(0, 1, tx_seq[0][1]);
        tx_dst_x[0] = 2'd1;
        tx_dst_y[0] = 2'd0;
        while (!tx_ready[0]) begin @(posedge clk); #1; end
        @(posedge clk);
        #1;
        tx_seq[0][1]++;
        sent++;
      end
      tx_valid[0] = 1'b0;
      while (received != sent) @(posedge clk);
      #1;
      tt = cycle - t_start;
      checks++;
      if (tt > nwords * PKT_LEN / (PKT_LEN - 1) + 20)
        fail($sformatf("stream of %0d words took %0d cycles", nwords, tt));
      $display("stream 0->1: %0d words in %0d cycles", nwords, tt);
    end

    // Phase 3: uniform random traffic with random PE backpressure
    inj_words = 0;
    t_start = cycle;
    for (int c = 0; c < 3000; c++) begin
      logic [NN-1:0] hs;
      for (int n = 0; n < NN; n++) begin
        if (!tx_valid[n] && ($urandom % 100) < 60) begin
          int d;
          d = $urandom % NN;
          // hot spot: while node 5 is not reading, a third of all words go to it
          if (c >= 1000 && c < 1600 && ($urandom % 3) == 0) d = 5;
          tx_valid[n] = 1'b1;
          tx_dst_x[n] = 2'(d % 4);
          tx_dst_y[n] = 2'(d / 4);
          tx_data[n]  = mkword(n, d, tx_seq[n][d]);
        end
        rx_ready[n] = ($urandom % 100) < 45;
        // node 5 stops reading for a while: its traffic backs up into the mesh
        if (n == 5 && c >= 1000 && c < 1600) rx_ready[n] = 1'b0;
      end
      hs = tx_valid & tx_ready;       // handshakes of the coming edge
      @(posedge clk);
      #1;
      for (int n = 0; n < NN; n++) begin
        if (hs[n]) begin
          tx_seq[n][int'({tx_dst_y[n], tx_dst_x[n]})]++;
          sent++;
          inj_words++;
          tx_valid[n] = 1'b0;
        end
      end
    end
    t_end = cycle;
    tx_valid = '0;
    rx_ready = '1;
    $display("uniform traffic: %0d words accepted in %0d cycles = %0.3f words/cycle/node",
             inj_words, t_end - t_start, real'(inj_words) / real'(t_end - t_start) / NN);
    // drain
    for (int c = 0; c < 20000 && received != sent; c++) @(posedge clk);
    #1;
    checks++;
    if (received != sent) fail($sformatf("sent %0d words, received %0d", sent, received));
    for (int n = 0; n < NN; n++) begin
      checks++;
      if (rx_err_count[n] != 0) fail($sformatf("node %0d counted %0d header errors", n, rx_err_count[n]));
    end

    // Phase 4: saturation. Every node injects without pause, in runs of
    // PKT_LEN-1 words to one uniformly chosen other node, and every PE reads
    // at once. Delivered flits (words plus one head per run) are counted over
    // cycles 1000..4000 of the phase.
    begin
      int  run_left [NN];
      int  run_dst  [NN];
      longint r0, r1;
      real flits_per_node;
      for (int n = 0; n < NN; n++) run_left[n] = 0;
      rx_ready = '1;
      for (int c = 0; c < 4000; c++) begin
        logic [NN-1:0] hs;
        if (c == 1000) r0 = received;
        for (int n = 0; n < NN; n++)
          if (!tx_valid[n]) begin
            if (run_left[n] == 0) begin
              do run_dst[n] = $urandom % NN; while (run_dst[n] == n);
              run_left[n] = PKT_LEN - 1;
            end
            tx_valid[n] = 1'b1;
            tx_dst_x[n] = 2'(run_dst[n] % 4);
            tx_dst_y[n] = 2'(run_dst[n] / 4);
            tx_data[n]  = mkword(n, run_dst[n], tx_seq[n][run_dst[n]]);
          end
        hs = tx_valid & tx_ready;
        @(posedge clk);
        #1;
        for (int n = 0; n < NN; n++)
          if (hs[n]) begin
            tx_seq[n][run_dst[n]]++;
            sent++;
            run_left[n]--;
            tx_valid[n] = 1'b0;
          end
      end
      r1 = received;
      tx_valid = '0;
      flits_per_node = real'(r1 - r0) * PKT_LEN / (PKT_LEN - 1) / 3000.0 / NN;
      $display("saturation: %0d words delivered in 3000 cycles = %0.3f flits/cycle/node",
               r1 - r0, flits_per_node);
      checks++;
      if (flits_per_node < 0.5) fail($sformatf("saturation throughput %0.3f flits/cycle/node", flits_per_node));
      for (int c = 0; c < 20000 && received != sent; c++) @(posedge clk);
      #1;
      checks++;
      if (received != sent) fail($sformatf("after saturation: sent %0d words, received %0d", sent, received));
    end

    $display("mechanisms: tx_stall=%0d link_backpressure=%0d pe_backpressure=%0d vc0_flits=%0d vc1_flits=%0d xy_turn_pkts=%0d full_pkts=%0d short_pkts=%0d",
             n_tx_stall, n_link_bp, n_pe_bp, n_vc0, n_vc1, n_turn, n_full_pkt, n_short_pkt);
    checks++; if (n_tx_stall  == 0) fail("no injection stall happened");
    checks++; if (n_link_bp   == 0) fail("no link backpressure happened");
    checks++; if (n_pe_bp     == 0) fail("no PE backpressure happened");
    checks++; if (n_vc0 == 0 || n_vc1 == 0) fail("a VC was never used");
    checks++; if (n_turn      == 0) fail("no packet turned from X to Y");
    checks++; if (n_full_pkt  == 0) fail("no maximum-length packet");
    checks++; if (n_short_pkt == 0) fail("no packet cut short");

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
