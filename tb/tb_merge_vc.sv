// Self-checking test of the MergeVC unit with three input ports and 2 VCs.
// The testbench plays the three output queues that feed this port (one
// packet queue per input port and VC) and the downstream link (random
// per-VC ready). Checks: a flit is only sent on a VC whose ready bit is set;
// the flit sent is the front of the queue that is popped; a new packet only
// starts on an output VC that is free, and while a VC carries a packet only
// the input port owning it may send on it, so every VC carries whole
// packets back to back; the unit never idles while some flit may legally go
// (a blocked VC or a locked output VC does not stop others).
module tb_merge_vc;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NIN = 3, V = 2;
  logic  [NIN-1:0][V-1:0] q_valid;
  flit_t [NIN-1:0][V-1:0] q_head;
  logic  [NIN-1:0]        q_rd;
  logic  [0:0]            q_rd_vc, out_vc;
  logic                   out_valid;
  flit_t                  out_flit;
  logic  [V-1:0]          out_ready;

  merge_vc #(.NIN(NIN), .NUM_VC(V)) dut (.*);

  flit_t q [NIN][V][$];
  bit    locked [V];
  int    owner  [V];
  int    n_sent = 0, n_pkts = 0, n_interleave_ports = 0, last_port = -1;
  int    seq [NIN][V];

  task automatic add_packet(int i, int v);
    flit_t f;
    int len;
    len = 1 + $urandom % 7;
    f = '0; f.head = 1'b1; f.data = {8'(i), 8'(v), 16'(seq[i][v]++)};
    q[i][v].push_back(f);
    for (int k = 0; k < len; k++) begin
      f = '0; f.tail = (k == len - 1); f.data = {8'(i), 8'(v), 16'(seq[i][v]++)};
      q[i][v].push_back(f);
    end
  endtask

  initial begin
    for (int v = 0; v < V; v++) begin locked[v] = 0; owner[v] = 0; end
    for (int i = 0; i < NIN; i++) for (int v = 0; v < V; v++) seq[i][v] = 0;
    q_valid = '0; q_head = '0; out_ready = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      bit can;
      bit took;
      int ti, tv;
      for (int i = 0; i < NIN; i++)
        for (int v = 0; v < V; v++)
          if (q[i][v].size() < 3 && $urandom % 5 == 0) add_packet(i, v);
      for (int i = 0; i < NIN; i++)
        for (int v = 0; v < V; v++) begin
          q_valid[i][v] = q[i][v].size() > 0;
          q_head[i][v]  = q_valid[i][v] ? q[i][v][0] : flit_t'($urandom);
        end
      out_ready = 2'($urandom) | 2'($urandom);
      #1;
      can = 0;
      for (int i = 0; i < NIN; i++)
        for (int v = 0; v < V; v++)
          if (q[i][v].size() > 0 && out_ready[v] &&
              (locked[v] ? owner[v] == i : q[i][v][0].head)) can = 1;
      checks++;
      if (out_valid != can) begin
        failures++; $display("FAIL: out_valid=%b while a legal move exists=%b", out_valid, can);
      end
      took = 0;
      if (out_valid) begin
        ti = -1;
        for (int i = 0; i < NIN; i++) if (q_rd[i]) ti = i;
        tv = out_vc;
        checks++;
        if (!$onehot(q_rd) || q_rd_vc != out_vc || !out_ready[tv] || q[ti][tv].size() == 0) begin
          failures++; $display("FAIL: bad pop q_rd=%b vc=%0d ready=%b", q_rd, tv, out_ready);
        end else begin
          checks++;
          if (out_flit != q[ti][tv][0]) begin
            failures++; $display("FAIL: flit %h, queue front %h", out_flit, q[ti][tv][0]);
          end
          checks++;
          if (locked[tv] ? (owner[tv] != ti) : !out_flit.head) begin
            failures++;
            $display("FAIL: port %0d sent on vc%0d (locked=%0d owner=%0d head=%b)",
                     ti, tv, locked[tv], owner[tv], out_flit.head);
          end
          took = 1;
        end
      end else begin
        checks++;
        if (q_rd != 0) begin failures++; $display("FAIL: pop without send"); end
      end
      @(posedge clk); #1;
      if (took) begin
        flit_t f;
        f = q[ti][tv].pop_front();
        if (f.head) begin locked[tv] = 1; owner[tv] = ti; n_pkts++; end
        if (f.tail) locked[tv] = 0;
        if (last_port >= 0 && last_port != ti) n_interleave_ports++;
        last_port = ti;
        n_sent++;
      end
    end
    checks++;
    if (n_sent < 5000 || n_interleave_ports < 1000) begin
      failures++; $display("FAIL: only %0d flits / %0d port switches", n_sent, n_interleave_ports);
    end
    $display("merge: %0d flits, %0d packets, %0d switches between input ports",
             n_sent, n_pkts, n_interleave_ports);
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
