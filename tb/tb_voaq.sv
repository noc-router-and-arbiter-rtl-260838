// Self-checking test of the VOAQ shift FIFO (8 entries of 3-bit slot
// addresses). Random push/pop, including both in one cycle, against a queue
// model; checks head address, empty and full (the ends of the one-hot tail
// vector) every cycle.
module tb_voaq;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8;
  logic       push, pop, empty, full;
  logic [2:0] push_addr, head_addr;
  voaq #(.DEPTH(D), .AW(3)) dut (.*);

  logic [2:0] model [$];
  int n_full = 0, n_both = 0;

  task automatic step(int pu, int po);
    pop       = ($urandom % 100) < po && model.size() > 0;
    push      = ($urandom % 100) < pu && (model.size() < D || pop);
    push_addr = 3'($urandom);
    #1;
    checks++;
    if (full != (model.size() == D) || empty != (model.size() == 0)) begin
      failures++; $display("FAIL: full=%b empty=%b size %0d", full, empty, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (head_addr != model[0]) begin failures++; $display("FAIL: head %0d expected %0d", head_addr, model[0]); end
    end
    if (full) n_full++;
    if (push && pop) n_both++;
    @(posedge clk); #1;
    if (pop) void'(model.pop_front());
    if (push) model.push_back(push_addr);
  endtask

  initial begin
    push = 0; pop = 0; push_addr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) step(60, 50);
    for (int i = 0; i < 20; i++) step(100, 0);
    for (int i = 0; i < 2000; i++) step(70, 70);
    for (int i = 0; i < 20; i++) step(0, 100);
    checks++;
    if (n_full == 0 || n_both == 0) begin failures++; $display("FAIL: full or push+pop never seen"); end
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
