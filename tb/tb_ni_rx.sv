// Self-checking test of the receive half of the network interface at node
// (2,1), 2 VCs, 32-word ejection buffer.
// Phase 1: with the PE ready and the buffer empty, a data flit reaches the
// PE in the same cycle it arrives (bypass, zero added latency).
// Phase 2: packets from random sources, flits of the two VCs interleaved as
// the router may deliver them, random PE stalls. Checks per VC: words in
// order, correct source coordinates, the last-word flag on the tail, the
// sender only pushed while ready, no header error on legal traffic.
// Phase 3: malformed traffic (wrong destination, zero length, a head in the
// middle of a packet, a tail flag on the wrong flit) must raise hdr_err once
// per bad flit and advance err_count by exactly that many.
module tb_ni_rx;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int V = 2, MX = 2, MY = 1;
  logic              in_valid;
  logic [0:0]        in_vc, pe_vc;
  flit_t             in_flit;
  logic [V-1:0]      in_ready;
  logic              pe_valid, pe_ready, pe_last, hdr_err;
  logic [FLIT_W-1:0] pe_data;
  logic [1:0]        pe_src_x, pe_src_y;
  logic [15:0]       err_count;

  ni_rx #(.X_POS(MX), .Y_POS(MY), .NUM_VC(V)) dut (.*);

  typedef struct { logic [31:0] d; int sx; int sy; bit last; } word_s;
  flit_t src [V][$];
  word_s exp [V][$];
  int    n_words = 0, n_err = 0, n_stall = 0, ready_pct = 100;
  bit    expect_err = 0;

  task automatic add_packet(int v, int len);
    flit_t f;
    head_t h;
    word_s w;
    h = '0; h.dst_x = MX; h.dst_y = MY; h.src_x = 2'($urandom); h.src_y = 2'($urandom); h.len = 4'(len);
    f = '0; f.head = 1'b1; f.data = FLIT_W'(h);
    src[v].push_back(f);
    for (int k = 0; k < len; k++) begin
      f = '0; f.tail = (k == len - 1); f.data = $urandom;
      src[v].push_back(f);
      w.d = f.data; w.sx = h.src_x; w.sy = h.src_y; w.last = f.tail;
      exp[v].push_back(w);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && pe_valid && pe_ready) begin
      word_s w;
      checks++;
      if (exp[pe_vc].size() == 0) begin
        failures++; $display("FAIL: unexpected word %h on vc%0d", pe_data, pe_vc);
      end else begin
        w = exp[pe_vc].pop_front();
        if (pe_data != w.d || pe_src_x != w.sx || pe_src_y != w.sy || pe_last != w.last) begin
          failures++;
          $display("FAIL: vc%0d word %h src (%0d,%0d) last %b, expected %h (%0d,%0d) %b",
                   pe_vc, pe_data, pe_src_x, pe_src_y, pe_last, w.d, w.sx, w.sy, w.last);
        end
        n_words++;
      end
    end
    if (rst_n && hdr_err) n_err++;
    if (rst_n && in_valid) begin
      checks++;
      if (!in_ready[in_vc]) begin failures++; $display("FAIL: sender pushed while not ready"); end
      void'(src[in_vc].pop_front());
    end
    #1;
    in_valid = 0; in_vc = '0; in_flit = '0;
    begin
      int v0;
      v0 = $urandom % V;
      for (int k = 0; k < V; k++) begin
        int v;
        v = (v0 + k) % V;
        if (!in_valid && src[v].size() > 0 && $urandom % 4 != 0) begin
          if (in_ready[v]) begin in_valid = 1; in_vc = 1'(v); in_flit = src[v][0]; end
          else n_stall++;
        end
      end
    end
    pe_ready = ($urandom % 100) < ready_pct;
  end

  initial begin
    int e0;
    in_valid = 0; in_vc = '0; in_flit = '0; pe_ready = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;
    // phase 1: bypass, checked combinationally on the arrival cycle
    add_packet(0, 1);
    @(posedge clk iff (in_valid && in_flit.head)); #1;
    wait (in_valid);
    #1;
    checks++;
    if (!(pe_valid && pe_data == in_flit.data && pe_last)) begin
      failures++; $display("FAIL: data flit not passed straight to the PE");
    end
    repeat (5) @(posedge clk);
    // phase 2: interleaved VCs with PE stalls
    ready_pct = 50;
    for (int c = 0; c < 20000; c++) begin
      @(posedge clk);
      for (int v = 0; v < V; v++)
        if (src[v].size() < 16 && $urandom % 5 == 0) add_packet(v, 1 + $urandom % 7);
    end
    ready_pct = 100;
    repeat (500) @(posedge clk);
    for (int v = 0; v < V; v++) begin
      checks++;
      if (exp[v].size() != 0 || src[v].size() != 0) begin
        failures++; $display("FAIL: vc%0d has %0d words undelivered", v, exp[v].size());
      end
    end
    checks++;
    if (n_err != 0 || err_count != 0) begin failures++; $display("FAIL: %0d header errors on legal traffic", n_err); end
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: buffer never filled"); end
    // phase 3: malformed packets on VC 1
    e0 = err_count;
    begin
      flit_t f;
      head_t h;
      h = '0; h.dst_x = MX + 1; h.dst_y = MY; h.len = 1;          // wrong destination
      f = '0; f.head = 1; f.data = FLIT_W'(h); src[1].push_back(f);
      f = '0; f.tail = 1; f.data = 32'h1; src[1].push_back(f);
      exp[1].push_back('{32'h1, 0, 0, 1});
      h.dst_x = MX; h.len = 0;                                    // zero length
      f = '0; f.head = 1; f.data = FLIT_W'(h); src[1].push_back(f);
      h.len = 3;                                                  // head, then a head mid-packet
      f = '0; f.head = 1; f.data = FLIT_W'(h); src[1].push_back(f);
      f = '0; f.data = 32'h2; src[1].push_back(f);
      exp[1].push_back('{32'h2, 0, 0, 0});
      h.len = 1;
      f = '0; f.head = 1; f.data = FLIT_W'(h); src[1].push_back(f);
      f = '0; f.tail = 0; f.data = 32'h3; src[1].push_back(f);    // tail flag missing
      exp[1].push_back('{32'h3, 0, 0, 1});
    end
    repeat (50) @(posedge clk);
    checks++;
    if (int'(err_count) - e0 != 4 || n_err != 4) begin
      failures++; $display("FAIL: 4 bad flits gave err_count +%0d, %0d pulses", int'(err_count) - e0, n_err);
    end
    $display("rx: %0d words delivered, %0d sender stalls, %0d header errors flagged", n_words, n_stall, n_err);
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
