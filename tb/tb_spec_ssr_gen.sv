// Self-checking test of spec-SSR generation and SSR_Mux for the router at
// (2, 1) with HPC_MAX = 3. Random final-router records, room flags and
// local standard SSRs are applied; a reference model computes each
// recorded packet's next hop, keeps the longest spec-SSR per output, lets a
// local standard SSR replace it, and counts generated and dropped spec-SSRs.
module tb_spec_ssr_gen;
  import ssmart_pkg::*;
  localparam int H = 3, X = 2, Y = 1;
  logic   fin_valid [NMESH];
  coord_t fin_dst_x [NMESH];
  coord_t fin_dst_y [NMESH];
  logic   room_ahead[NMESH][1:H];
  ssr_t   local_ssr [NMESH];
  ssr_t   ssr_out   [NMESH];
  ssr_t   spec_ssr  [NMESH];
  port_t  spec_src  [NMESH];
  logic [2:0] n_gen, n_drop;
  int checks = 0, failures = 0;

  spec_ssr_gen #(.HPC_MAX(H), .X(X), .Y(Y)) dut (.*);

  function automatic void hop(input int dx, input int dy, input int p,
                              output int o, output int l);
    int dd;
    if (dx != X)      begin o = dx > X ? P_E : P_W; dd = dx > X ? dx - X : X - dx; end
    else if (dy != Y) begin o = dy > Y ? P_N : P_S; dd = dy > Y ? dy - Y : Y - dy; end
    else              begin o = P_L; dd = 0; end
    l = 0;
    if (o != P_L) while (l < dd && l < H && room_ahead[o][l + 1]) l++;
  endfunction

  initial begin
    int o_p [NMESH];
    int l_p [NMESH];
    int best [NMESH];
    int g, d;
    ssr_t e_out, e_spec;
    for (int t = 0; t < 4000; t++) begin
      for (int p = 0; p < NMESH; p++) begin
        fin_valid[p] = $urandom_range(1);
        fin_dst_x[p] = coord_t'($urandom_range(4));
        fin_dst_y[p] = coord_t'($urandom_range(4));
        for (int k = 1; k <= H; k++) room_ahead[p][k] = ($urandom_range(5) != 0);
        local_ssr[p] = ssr_t'($urandom);
        local_ssr[p].valid = ($urandom_range(3) == 0);
      end
      #1;
      for (int p = 0; p < NMESH; p++) hop(fin_dst_x[p], fin_dst_y[p], p, o_p[p], l_p[p]);
      g = 0; d = 0;
      for (int o = 0; o < NMESH; o++) begin
        best[o] = -1;
        for (int p = NMESH - 1; p >= 0; p--)
          if (fin_valid[p] && o_p[p] == o && l_p[p] > 0 &&
              (best[o] < 0 || l_p[p] >= l_p[best[o]])) best[o] = p;
        e_spec = '0;
        if (best[o] >= 0) begin
          e_spec.valid = 1; e_spec.spec = 1; e_spec.len = len_t'(l_p[best[o]]);
          e_spec.dst_x = fin_dst_x[best[o]]; e_spec.dst_y = fin_dst_y[best[o]];
        end
        if (local_ssr[o].valid) begin
          e_out = local_ssr[o];
          if (e_spec.valid) d++;
          e_spec = '0;
        end else begin
          e_out = e_spec;
          if (e_spec.valid) g++;
        end
        checks++;
        if (ssr_out[o] != e_out || spec_ssr[o] != e_spec ||
            (e_spec.valid && int'(spec_src[o]) != best[o])) begin
          failures++;
          if (failures < 10) $display("FAIL: output %0d: %h/%h spec %h/%h", o, ssr_out[o], e_out, spec_ssr[o], e_spec);
        end
      end
      checks++;
      if (int'(n_gen) != g || int'(n_drop) != d) begin
        failures++;
        if (failures < 10) $display("FAIL: counts %0d %0d expected %0d %0d", n_gen, n_drop, g, d);
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
