// Self-checking test of the port buffer in both forms: static VCs (two
// FIFOs of 16) and dynamic VCs (DVOQR over 32 shared slots), 2 VCs, 32-flit
// port depth. Both get the same random writes and reads and are compared
// with per-VC queue models: head flit, valid bits and per-VC ready. Static:
// a VC is ready while it holds fewer than 16 flits. Dynamic: every VC is
// ready while fewer than 32 flits are stored in total, so one VC can hold
// more than 16 (checked).
module tb_vc_buffer;
  import dsm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int V = 2, PD = 32;
  logic wr_en, rd_en;
  logic [0:0] wr_vc, rd_vc;
  flit_t wr_data;
  logic  [1:0][V-1:0] ready, valid;
  flit_t [1:0][V-1:0] head;

  vc_buffer #(.NUM_VC(V), .PORT_DEPTH(PD), .DYNAMIC(1'b0)) u_svc (
    .clk, .rst_n, .wr_en(wr_en && ready[0][wr_vc]), .wr_vc, .wr_data, .ready(ready[0]),
    .rd_en(rd_en && valid[0][rd_vc]), .rd_vc, .head(head[0]), .valid(valid[0]));
  vc_buffer #(.NUM_VC(V), .PORT_DEPTH(PD), .DYNAMIC(1'b1)) u_dvc (
    .clk, .rst_n, .wr_en(wr_en && ready[1][wr_vc]), .wr_vc, .wr_data, .ready(ready[1]),
    .rd_en(rd_en && valid[1][rd_vc]), .rd_vc, .head(head[1]), .valid(valid[1]));

  flit_t model [2][V][$];
  int big_vc = 0;

  task automatic step(int wr_pct, int rd_pct, int vc_bias);
    bit acc [2];
    wr_en   = ($urandom % 100) < wr_pct;
    wr_vc   = (vc_bias >= 0) ? 1'(vc_bias) : 1'($urandom);
    wr_data = flit_t'({$urandom, $urandom});
    rd_en   = ($urandom % 100) < rd_pct;
    rd_vc   = 1'($urandom);
    #1;
    for (int k = 0; k < 2; k++) begin
      int tot;
      tot = model[k][0].size() + model[k][1].size();
      for (int v = 0; v < V; v++) begin
        bit exp_ready;
        exp_ready = (k == 0) ? model[k][v].size() < PD / V : tot < PD;
        checks++;
        if (ready[k][v] != exp_ready || valid[k][v] != (model[k][v].size() > 0)) begin
          failures++;
          $display("FAIL %s vc%0d: ready=%b valid=%b size=%0d total=%0d", k ? "dvc" : "svc", v,
                   ready[k][v], valid[k][v], model[k][v].size(), tot);
        end
        if (model[k][v].size() > 0) begin
          checks++;
          if (head[k][v] != model[k][v][0]) begin
            failures++; $display("FAIL %s vc%0d head mismatch", k ? "dvc" : "svc", v);
          end
        end
      end
    end
    // writes are judged on the state before this cycle's read
    for (int k = 0; k < 2; k++) begin
      int tot;
      tot = model[k][0].size() + model[k][1].size();
      acc[k] = wr_en && ((k == 0) ? model[k][wr_vc].size() < PD / V : tot < PD);
    end
    @(posedge clk); #1;
    for (int k = 0; k < 2; k++) begin
      if (rd_en && model[k][rd_vc].size() > 0) void'(model[k][rd_vc].pop_front());
      if (acc[k]) model[k][wr_vc].push_back(wr_data);
    end
    if (model[1][0].size() > PD / V) big_vc++;
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_vc = 0; rd_vc = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) step(60, 40, -1);
    for (int i = 0; i < 100; i++) step(100, 0, 0);
    for (int i = 0; i < 3000; i++) step(50, 55, -1);
    for (int i = 0; i < 200; i++) step(0, 100, -1);
    checks++;
    if (big_vc == 0) begin failures++; $display("FAIL: dynamic VC never exceeded a static share"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
