// Self-checking test of SA-G with HPC_MAX = 3.
// Part 1 replays the situations the design description walks through:
// a lone SSR sets up the bypass, a local flit wins over a bypass (premature
// stop), the nearest standard SSR wins, a standard SSR beats a spec-SSR on
// the same input, an SSR whose length equals its distance marks this router
// as final, and the own spec-SSR takes an output when nothing else wants it.
// Part 2 applies random SSR sets and compares with a reference model.
module tb_sa_g;
  import ssmart_pkg::*;
  localparam int H = 3;
  ssr_t     ssr_in    [NMESH][1:H];
  ssr_t     spec_ssr  [NMESH];
  port_t    spec_src  [NMESH];
  logic     local_busy[NMESH];
  out_sel_e sel       [NMESH];
  port_t    sel_src   [NMESH];
  logic     byp_take  [NMESH];
  logic     spec_take [NMESH];
  logic     stop_exp  [NMESH];
  logic     fin_valid [NMESH];
  coord_t   fin_dst_x [NMESH];
  coord_t   fin_dst_y [NMESH];
  int checks = 0, failures = 0;

  sa_g #(.HPC_MAX(H)) dut (.*);

  // reference results
  out_sel_e e_sel  [NMESH];
  int       e_src  [NMESH];
  bit       e_byp  [NMESH], e_spt [NMESH], e_stop [NMESH], e_fin [NMESH];
  ssr_t     e_fins [NMESH];

  function automatic ssr_t mk(bit spec, int l);
    ssr_t s;
    s = '0; s.valid = 1; s.spec = spec; s.len = len_t'(l);
    s.dst_x = coord_t'($urandom); s.dst_y = coord_t'($urandom);
    return s;
  endfunction

  task automatic clear();
    for (int p = 0; p < NMESH; p++) begin
      for (int d = 1; d <= H; d++) ssr_in[p][d] = '0;
      spec_ssr[p] = '0; spec_src[p] = '0; local_busy[p] = 0;
    end
  endtask

  task automatic model();
    // per input winner: -1 none, else distance (0 = own spec)
    int  wd [NMESH];
    bit  wstd [NMESH];
    ssr_t ws [NMESH];
    int  own_o [NMESH];
    for (int p = 0; p < NMESH; p++) begin
      int sd, pd;
      sd = -1; pd = -1; own_o[p] = -1;
      for (int d = H; d >= 1; d--)
        if (ssr_in[p][d].valid && ssr_in[p][d].len >= d) begin
          if (!ssr_in[p][d].spec) sd = d; else pd = d;
        end
      for (int o = NMESH - 1; o >= 0; o--)
        if (spec_ssr[o].valid && spec_src[o] == port_t'(p)) begin pd = 0; own_o[p] = o; end
      if (sd >= 0)      begin wd[p] = sd; wstd[p] = 1; ws[p] = ssr_in[p][sd]; end
      else if (pd > 0)  begin wd[p] = pd; wstd[p] = 0; ws[p] = ssr_in[p][pd]; end
      else if (pd == 0) begin wd[p] = 0;  wstd[p] = 0; ws[p] = spec_ssr[own_o[p]]; end
      else              begin wd[p] = -1; wstd[p] = 0; ws[p] = '0; end
      e_fin[p] = (wd[p] > 0 && ws[p].len == wd[p]);
      e_fins[p] = ws[p];
      e_byp[p] = 0; e_spt[p] = 0; e_stop[p] = 0;
    end
    for (int o = 0; o < NMESH; o++) begin
      int si, own;
      bit breq;
      si = (o + 2) % 4;
      breq = (wd[si] > 0 && ws[si].len > wd[si]);
      own = -1;
      for (int p = 0; p < NMESH; p++) if (wd[p] == 0 && own_o[p] == o && own < 0) own = p;
      e_src[o] = 0;
      if (local_busy[o])             e_sel[o] = SEL_XBAR;
      else if (breq && wstd[si])     begin e_sel[o] = SEL_BYP; e_src[o] = si; end
      else if (own >= 0)             begin e_sel[o] = SEL_SPEC; e_src[o] = own; e_spt[own] = 1; end
      else if (breq)                 begin e_sel[o] = SEL_BYP; e_src[o] = si; end
      else                           e_sel[o] = SEL_NONE;
      if (e_sel[o] == SEL_BYP) e_byp[si] = 1;
      if (breq && e_sel[o] != SEL_BYP) e_stop[si] = 1;
    end
  endtask

  task automatic compare(string what);
    bit bad;
    model();
    bad = 0;
    for (int p = 0; p < NMESH; p++) begin
      if (sel[p] != e_sel[p] || (e_sel[p] inside {SEL_BYP, SEL_SPEC} && int'(sel_src[p]) != e_src[p]))
        bad = 1;
      if (byp_take[p] != e_byp[p] || spec_take[p] != e_spt[p] || stop_exp[p] != e_stop[p]) bad = 1;
      if (fin_valid[p] != e_fin[p]) bad = 1;
      if (e_fin[p] && (fin_dst_x[p] != e_fins[p].dst_x || fin_dst_y[p] != e_fins[p].dst_y)) bad = 1;
    end
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  task automatic expect_sel(int o, out_sel_e s, string what);
    checks++;
    if (sel[o] != s) begin
      failures++;
      $display("FAIL: %s: sel[%0d] = %s", what, o, sel[o].name());
    end
  endtask

  initial begin
    // lone SSR from 1 hop west, length 2: bypass W -> E
    clear(); ssr_in[P_W][1] = mk(0, 2); #1;
    expect_sel(P_E, SEL_BYP, "bypass setup"); compare("bypass setup");
    // local flit on E: premature stop of the SSR
    local_busy[P_E] = 1; #1;
    expect_sel(P_E, SEL_XBAR, "local priority");
    checks++; if (!stop_exp[P_W]) begin failures++; $display("FAIL: no stop flagged"); end
    compare("local priority");
    // two standard SSRs: the nearest wins, it ends here -> final router
    clear(); ssr_in[P_W][1] = mk(0, 1); ssr_in[P_W][2] = mk(0, 3); #1;
    expect_sel(P_E, SEL_NONE, "nearest ends here");
    checks++; if (!fin_valid[P_W] || fin_dst_x[P_W] != ssr_in[P_W][1].dst_x) begin
      failures++; $display("FAIL: final router not recorded"); end
    compare("final router");
    // standard SSR from farther away beats a nearer spec-SSR
    clear(); ssr_in[P_S][1] = mk(1, 3); ssr_in[P_S][3] = mk(0, 3); #1;
    checks++; if (!fin_valid[P_S] || fin_dst_x[P_S] != ssr_in[P_S][3].dst_x) begin
      failures++; $display("FAIL: standard SSR did not win over spec-SSR"); end
    compare("standard over spec");
    // own spec-SSR from the W Pipe_In turning north
    clear(); spec_ssr[P_N] = mk(1, 2); spec_src[P_N] = P_W; #1;
    expect_sel(P_N, SEL_SPEC, "own spec-SSR");
    checks++; if (!spec_take[P_W]) begin failures++; $display("FAIL: spec_take"); end
    compare("own spec");
    // ... but a standard bypass from the south takes the north output
    ssr_in[P_S][2] = mk(0, 3); #1;
    expect_sel(P_N, SEL_BYP, "standard bypass over own spec");
    compare("standard over own spec");

    for (int t = 0; t < 5000; t++) begin
      clear();
      for (int p = 0; p < NMESH; p++) begin
        for (int d = 1; d <= H; d++)
          if ($urandom_range(3) == 0) ssr_in[p][d] = mk($urandom_range(1), $urandom_range(1, H));
        local_busy[p] = ($urandom_range(3) == 0);
      end
      for (int o = 0; o < NMESH; o++)
        if ($urandom_range(2) == 0) begin
          spec_ssr[o] = mk(1, $urandom_range(1, H));
          spec_src[o] = port_t'($urandom_range(3));
        end
      #1;
      compare("random");
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
