// Self-checking test of the Priority-Select round-robin arbiter.
//
// Three instances: 8 requesters in groups of 2, 24 in groups of 8 (the
// worked example of the arbiter's description: pointer at bit 12, requests
// 9, 10 and 11, and the grant must be 9), and 3 in groups of 2 (padding).
// Each is compared every cycle with a reference round-robin model: scan
// from the pointer upwards with wrap-around, first request wins, pointer
// moves past the winner on ack. Random requests and acks.
module tb_ps_arbiter;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0]  req8,  g8;   logic [3:0] i8;  logic a8,  ack8;
  logic [23:0] req24, g24;  logic [4:0] i24; logic a24, ack24;
  logic [2:0]  req3,  g3;   logic [1:0] i3;  logic a3,  ack3;

  ps_arbiter #(.N(8),  .K(2)) u8  (.clk, .rst_n, .req(req8),  .ack(ack8),  .grant(g8),  .grant_idx(i8),  .any_grant(a8));
  ps_arbiter #(.N(24), .K(8)) u24 (.clk, .rst_n, .req(req24), .ack(ack24), .grant(g24), .grant_idx(i24), .any_grant(a24));
  ps_arbiter #(.N(3),  .K(2)) u3  (.clk, .rst_n, .req(req3),  .ack(ack3),  .grant(g3),  .grant_idx(i3),  .any_grant(a3));

  int p8 = 0, p24 = 0, p3 = 0;     // model pointers

  function automatic int rr(int n, int ptr, logic [63:0] req);
    for (int i = 0; i < n; i++)
      if (req[(ptr + i) % n]) return (ptr + i) % n;
    return -1;
  endfunction

  task automatic check(string nm, int n, int exp, logic [63:0] g, int idx, logic any);
    checks++;
    if (exp < 0) begin
      if (g != 0 || any) begin failures++; $display("FAIL %s: grant %h with no request", nm, g); end
    end else if (g != (64'd1 << exp) || idx != exp || !any) begin
      failures++;
      $display("FAIL %s: grant %h idx %0d, expected bit %0d", nm, g, idx, exp);
    end
  endtask

  int e8, e24, e3;
  initial begin
    req8 = 0; req24 = 0; req3 = 0; ack8 = 0; ack24 = 0; ack3 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // Worked example: move the 24-bit pointer to 12 by granting bit 11.
    req24 = 24'h000800; ack24 = 1'b1;
    #1 check("n24 setup", 24, 11, 64'(g24), int'(i24), a24);
    @(posedge clk); #1;
    p24 = 12;
    ack24 = 1'b0;
    req24 = (24'd1 << 9) | (24'd1 << 10) | (24'd1 << 11);
    #1 check("n24 example", 24, 9, 64'(g24), int'(i24), a24);
    ack24 = 1'b1;
    @(posedge clk); #1;
    p24 = 10;

    for (int c = 0; c < 20000; c++) begin
      req8  = 8'($urandom);
      req24 = ($urandom % 4 == 0) ? 24'($urandom) & 24'($urandom) : 24'(1 << ($urandom % 24));
      req3  = 3'($urandom);
      if ($urandom % 8 == 0) req8 = 0;
      ack8 = $urandom % 4 != 0; ack24 = $urandom % 4 != 0; ack3 = $urandom % 4 != 0;
      #1;
      e8 = rr(8, p8, 64'(req8)); e24 = rr(24, p24, 64'(req24)); e3 = rr(3, p3, 64'(req3));
      check("n8", 8, e8, 64'(g8), int'(i8), a8);
      check("n24", 24, e24, 64'(g24), int'(i24), a24);
      check("n3", 3, e3, 64'(g3), int'(i3), a3);
      @(posedge clk); #1;
      if (ack8 && e8 >= 0)   p8  = (e8 + 1) % 8;
      if (ack24 && e24 >= 0) p24 = (e24 + 1) % 24;
      if (ack3 && e3 >= 0)   p3  = (e3 + 1) % 3;
    end
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
