// Self-checking loopback test of the network interface at node (1,2),
// default parameters. The injection port is wired back to the ejection port
// through a link that randomly withholds its ready bits, so every word the
// PE sends to its own node is packetised, leaves on a VC, is checked and
// unpacked again. Checks: words come back once, in order per VC and in
// overall order (one packet at a time on a single link), with the node's own
// coordinates as source, the last-word flag on each packet's final word, no
// header errors; and a same-destination stream without stalls keeps the
// link busy with 8 flits per 7 words.
module tb_network_interface;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int MX = 1, MY = 2;
  logic              tx_valid, tx_ready, rx_valid, rx_ready, rx_last, rx_hdr_err;
  logic [FLIT_W-1:0] tx_data, rx_data;
  logic [1:0]        tx_dst_x, tx_dst_y, rx_src_x, rx_src_y;
  logic [0:0]        rx_vc, inj_vc, ej_vc;
  logic [15:0]       rx_err_count;
  logic              inj_valid, ej_valid;
  flit_t             inj_flit, ej_flit;
  logic [1:0]        inj_ready, ej_ready, gate;

  network_interface #(.X_POS(MX), .Y_POS(MY)) dut (.*);

  // loopback link with random per-VC stalls
  assign ej_valid  = inj_valid;
  assign ej_vc     = inj_vc;
  assign ej_flit   = inj_flit;
  assign inj_ready = ej_ready & gate;

  logic [31:0] sent [$];
  int  gate_pct = 100, rx_pct = 100, n_rx = 0, n_pkts = 0, n_last = 0;
  bit  expect_last;
  longint cyc = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_valid && tx_ready) sent.push_back(tx_data);
    if (rst_n && inj_valid && inj_flit.head) n_pkts++;
    if (rst_n && rx_valid && rx_ready) begin
      checks++;
      if (sent.size() == 0 || rx_data != sent[0] || rx_src_x != MX || rx_src_y != MY || rx_hdr_err) begin
        failures++;
        $display("FAIL: got %h from (%0d,%0d), expected %h", rx_data, rx_src_x, rx_src_y,
                 sent.size() ? sent[0] : 0);
      end
      if (sent.size() > 0) void'(sent.pop_front());
      if (rx_last) n_last++;
      n_rx++;
    end
    #1;
    for (int v = 0; v < 2; v++) gate[v] = ($urandom % 100) < gate_pct;
    rx_ready = ($urandom % 100) < rx_pct;
  end

  task automatic pe_send(int n, int pct);
    for (int i = 0; i < n; i++) begin
      tx_data = $urandom; tx_dst_x = MX; tx_dst_y = MY;
      while (($urandom % 100) >= pct) begin tx_valid = 0; @(posedge clk); #1; end
      tx_valid = 1;
      do @(posedge clk); while (!tx_ready);
      #1;
    end
    tx_valid = 0;
  endtask

  initial begin
    longint t0;
    tx_valid = 0; tx_data = '0; tx_dst_x = '0; tx_dst_y = '0; gate = '1; rx_ready = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // full-rate stream
    t0 = cyc;
    pe_send(700, 100);
    wait (sent.size() == 0);
    @(posedge clk); #1;
    checks++;
    if (n_pkts != 100 || n_last != 100 || cyc - t0 > 815) begin
      failures++; $display("FAIL: stream gave %0d packets, %0d last words, %0d cycles", n_pkts, n_last, cyc - t0);
    end
    $display("stream: 700 words, %0d packets, %0d cycles", n_pkts, cyc - t0);
    // stalls on every side
    gate_pct = 60; rx_pct = 50;
    pe_send(20000, 70);
    gate_pct = 100; rx_pct = 100;
    repeat (300) @(posedge clk);
    checks++;
    if (sent.size() != 0 || n_rx != 20700 || rx_err_count != 0) begin
      failures++; $display("FAIL: %0d words outstanding, %0d received, %0d errors", sent.size(), n_rx, rx_err_count);
    end
    $display("loopback: %0d words, %0d packets", n_rx, n_pkts);
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
