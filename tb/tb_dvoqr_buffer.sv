// Self-checking test of the DVOQR dynamic VC buffer: 4 VCs sharing 16 slots.
// Random writes to random VCs and reads from random non-empty VCs, against
// one queue model per VC. Checks every VC's head flit and empty flag, and
// that full is set exactly when all 16 slots are taken, whichever VCs hold
// them. It also drives a single VC to occupy the whole buffer (a dynamic VC
// can grow to the full depth), and checks that the allocator takes the
// lowest free slot.
module tb_dvoqr_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int V = 4, D = 16;
  logic              wr_en, rd_en, full;
  logic [1:0]        wr_vc, rd_vc;
  logic [37:0]       wr_data;
  logic [V-1:0][37:0] rd_data;
  logic [V-1:0]      empty;
  dvoqr_buffer #(.W(38), .NUM_VC(V), .DEPTH(D)) dut (.*);

  logic [37:0] model [V][$];
  int total = 0, n_full = 0, max_one_vc = 0;

  task automatic step(int wr_pct, int rd_pct, int only_vc);
    int cand [$];
    wr_en   = ($urandom % 100) < wr_pct && total < D;
    wr_vc   = (only_vc >= 0) ? 2'(only_vc) : 2'($urandom);
    wr_data = {6'($urandom), 32'($urandom)};
    cand.delete();
    for (int v = 0; v < V; v++) if (model[v].size() > 0) cand.push_back(v);
    rd_en = ($urandom % 100) < rd_pct && cand.size() > 0;
    rd_vc = (cand.size() > 0) ? 2'(cand[$urandom % cand.size()]) : 2'd0;
    #1;
    checks++;
    if (full != (total == D)) begin failures++; $display("FAIL: full=%b total=%0d", full, total); end
    for (int v = 0; v < V; v++) begin
      checks++;
      if (empty[v] != (model[v].size() == 0)) begin failures++; $display("FAIL: vc%0d empty=%b", v, empty[v]); end
      if (model[v].size() > 0) begin
        checks++;
        if (rd_data[v] != model[v][0]) begin
          failures++; $display("FAIL: vc%0d head %h expected %h", v, rd_data[v], model[v][0]);
        end
      end
      if (model[v].size() > max_one_vc) max_one_vc = model[v].size();
    end
    if (full) n_full++;
    @(posedge clk); #1;
    if (rd_en) begin void'(model[rd_vc].pop_front()); total--; end
    if (wr_en) begin model[wr_vc].push_back(wr_data); total++; end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_vc = 0; rd_vc = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // lowest-free-slot allocation: first write goes to slot 0
    wr_en = 1; wr_vc = 2; wr_data = 38'h12345;
    #1 checks++;
    if (dut.free_idx != 0) begin failures++; $display("FAIL: first slot %0d", dut.free_idx); end
    @(posedge clk); #1;
    model[2].push_back(38'h12345); total = 1;
    wr_en = 0;
    for (int i = 0; i < 40; i++) step(100, 0, 1);    // VC1 takes every free slot
    for (int i = 0; i < 40; i++) step(0, 100, -1);
    for (int i = 0; i < 5000; i++) step(60, 55, -1);
    for (int i = 0; i < 60; i++) step(0, 100, -1);
    checks++;
    if (n_full == 0 || max_one_vc < D - 1) begin
      failures++; $display("FAIL: full %0d times, largest single VC %0d", n_full, max_one_vc);
    end
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
