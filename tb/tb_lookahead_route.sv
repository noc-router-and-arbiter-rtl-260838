// Exhaustive test of look-ahead route computation on a 4x4 mesh. For the X
// and the Y internal router of every node, every exit port and every
// destination, the expected next-router port is worked out from the node
// the flit moves to and XY dimension order.
module tb_lookahead_route;
  import dsm_pkg::*;
  int checks = 0, failures = 0;

  port_e          outp [2][16];
  logic [1:0]     dx, dy;
  port_e          nxt [2][16];

  for (genvar n = 0; n < 16; n++) begin : g_n
    for (genvar d = 0; d < 2; d++) begin : g_d
      lookahead_route #(.DIM(d[0]), .X_POS(n % 4), .Y_POS(n / 4)) u (
        .out_port(outp[d][n]), .dst_x(dx), .dst_y(dy), .next_port(nxt[d][n]));
    end
  end

  function automatic port_e ref_port(int cur, int dst);
    return (dst < cur) ? PORT_LEFT : (dst > cur) ? PORT_RIGHT : PORT_LOCAL;
  endfunction

  initial begin
    for (int o = 0; o < 3; o++) begin
      for (int t = 0; t < 16; t++) begin
        for (int n = 0; n < 16; n++) begin outp[0][n] = port_e'(o); outp[1][n] = port_e'(o); end
        dx = 2'(t % 4); dy = 2'(t / 4);
        #1;
        for (int n = 0; n < 16; n++) begin
          int x, y;
          port_e ex, ey;
          x = n % 4; y = n / 4;
          // X router
          if (o == PORT_LEFT)       ex = ref_port(x - 1, t % 4);
          else if (o == PORT_RIGHT) ex = ref_port(x + 1, t % 4);
          else                      ex = ref_port(y, t / 4);
          // Y router
          if (o == PORT_LEFT)       ey = ref_port(y - 1, t / 4);
          else if (o == PORT_RIGHT) ey = ref_port(y + 1, t / 4);
          else                      ey = PORT_LOCAL;
          // only exits that XY routing can take toward t are meaningful
          if ((o == PORT_LEFT && t % 4 < x) || (o == PORT_RIGHT && t % 4 > x) ||
              (o == PORT_LOCAL && t % 4 == x)) begin
            checks++;
            if (nxt[0][n] != ex) begin
              failures++; $display("FAIL X node %0d out %0d dst %0d: %0d expected %0d", n, o, t, nxt[0][n], ex);
            end
          end
          if (t % 4 == x && ((o == PORT_LEFT && t / 4 < y) || (o == PORT_RIGHT && t / 4 > y) ||
                             (o == PORT_LOCAL && t / 4 == y))) begin
            checks++;
            if (nxt[1][n] != ey) begin
              failures++; $display("FAIL Y node %0d out %0d dst %0d: %0d expected %0d", n, o, t, nxt[1][n], ey);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
