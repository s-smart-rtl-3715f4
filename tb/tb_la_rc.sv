// Self-checking test of lookahead route computation for the router at
// (1, 2) with HPC_MAX = 3. For random destinations and room flags it checks
// the X-then-Y output port and the multi-hop length: the distance left in
// the dimension, at most HPC_MAX, cut before the first router without room.
module tb_la_rc;
  import ssmart_pkg::*;
  localparam int H = 3, X = 1, Y = 2;
  coord_t dst_x, dst_y;
  logic   room_ahead [NMESH][1:H];
  port_t  port;
  len_t   len;
  int checks = 0, failures = 0;

  la_rc #(.HPC_MAX(H), .X(X), .Y(Y)) dut (.*);

  initial begin
    int ep, el, dd;
    for (int t = 0; t < 4000; t++) begin
      dst_x = coord_t'($urandom_range(7));
      dst_y = coord_t'($urandom_range(7));
      for (int p = 0; p < NMESH; p++)
        for (int k = 1; k <= H; k++) room_ahead[p][k] = ($urandom_range(4) != 0);
      #1;
      if (dst_x != X) begin
        ep = (dst_x > X) ? P_E : P_W;
        dd = (dst_x > X) ? dst_x - X : X - dst_x;
      end else if (dst_y != Y) begin
        ep = (dst_y > Y) ? P_N : P_S;
        dd = (dst_y > Y) ? dst_y - Y : Y - dst_y;
      end else begin
        ep = P_L; dd = 0;
      end
      el = 0;
      if (ep != P_L)
        while (el < dd && el < H && room_ahead[ep][el + 1]) el++;
      checks++;
      if (int'(port) != ep || int'(len) != el) begin
        failures++;
        if (failures < 10)
          $display("FAIL: dst (%0d,%0d): port %0d len %0d, expected %0d %0d",
                   dst_x, dst_y, port, len, ep, el);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
