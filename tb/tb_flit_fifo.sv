// Self-checking test of the static VC queue (flit_fifo), depth 16.
// Random writes and reads against a queue model; checks the head word,
// full and empty every cycle, fills it completely and drains it.
module tb_flit_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 16;
  logic        wr_en, rd_en, full, empty;
  logic [37:0] wr_data, rd_data;
  flit_fifo #(.W(38), .DEPTH(D)) dut (.*);

  logic [37:0] model [$];
  int n_full = 0;

  task automatic step(int wr_pct, int rd_pct);
    wr_en   = ($urandom % 100) < wr_pct && model.size() < D;
    rd_en   = ($urandom % 100) < rd_pct && model.size() > 0;
    wr_data = {6'($urandom), 32'($urandom)};
    #1;
    checks++;
    if (full != (model.size() == D) || empty != (model.size() == 0)) begin
      failures++; $display("FAIL: full=%b empty=%b model size %0d", full, empty, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (rd_data != model[0]) begin failures++; $display("FAIL: head %h expected %h", rd_data, model[0]); end
    end
    if (full) n_full++;
    @(posedge clk); #1;
    if (rd_en) void'(model.pop_front());
    if (wr_en) model.push_back(wr_data);
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) step(60, 50);
    for (int i = 0; i < 100; i++) step(100, 0);    // fill
    for (int i = 0; i < 3000; i++) step(50, 60);
    for (int i = 0; i < 100; i++) step(0, 100);    // drain
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL: never full"); end
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
