// End-to-end test of the S-SMART++ mesh at its default size (4x4,
// HPC_MAX = 3, one 8-packet buffer per input).
//
// Phase 1 sends single packets through an idle network and checks the
// zero-load latency, counted in clock edges from the edge that takes the
// flit into the source router to the edge that presents it at the
// destination's ejection port:
//   one straight multi-hop                      : 5  (SA-L, SSR, ST+LT, then
//                                                     SA-L, stage A, stage B
//                                                     of the ejection port)
//   X multi-hop, then Y multi-hop set up by a
//   spec-SSR (no buffering at the turn router)  : 6  (plain SMART would need 8)
// Phase 2 runs uniform random traffic at a high offered load, then a phase
// where all nodes send to one hotspot, and drains the network. A scoreboard
// checks that every flit arrives once, unchanged, at its destination.
// Every mechanism (bypass, non-empty buffer bypass, premature stop, spec-SSR
// generation, spec-SSR dropped by SSR_Mux, speculative bypass used and left
// idle, SA-L conflict, injection back-pressure) must occur at least once.
module tb_ssmart_mesh;
  import ssmart_pkg::*;

  localparam int K  = 4;
  localparam int NR = K * K;

  logic       clk = 1'b0;
  logic       rst_n;
  flit_t      inj       [NR];
  logic       inj_ready [NR];
  flit_t      ej        [NR];
  router_ev_t ev        [NR];

  ssmart_mesh dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .inj      (inj),
    .inj_ready(inj_ready),
    .ej       (ej),
    .ev       (ev)
  );

  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  longint cycle = 0;

  // expected destination of every flit in flight, keyed by its payload
  int unsigned exp_dst [logic [31:0]];
  longint      inj_time[logic [31:0]];
  int unsigned seq = 0;
  longint      lat_last;
  logic        got_last;

  // event totals
  longint n_byp, n_nebb, n_stop, n_gen, n_drop, n_used, n_idle, n_conf, n_stall;
  longint n_inj, n_ej;
  logic   acc [NR];  // the flit on inj[r] was taken at the last clock edge

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      for (int r = 0; r < NR; r++) begin
        n_byp   += ev[r].bypass;
        n_nebb  += ev[r].nebb;
        n_stop  += ev[r].prem_stop;
        n_gen   += ev[r].spec_gen;
        n_drop  += ev[r].spec_drop;
        n_used  += ev[r].spec_used;
        n_idle  += ev[r].spec_idle;
        n_conf  += ev[r].sal_conflict;
        n_stall += ev[r].inj_stall;
        acc[r] <= inj[r].valid && inj_ready[r];
        if (inj[r].valid && inj_ready[r]) n_inj++;
        if (ej[r].valid) begin
          n_ej++;
          checks++;
          if (!exp_dst.exists(ej[r].data)) begin
            failures++;
            $display("FAIL: unexpected flit %h at router %0d", ej[r].data, r);
          end else begin
            if (exp_dst[ej[r].data] != r ||
                int'(ej[r].dst_x) != r % K || int'(ej[r].dst_y) != r / K) begin
              failures++;
              $display("FAIL: flit %h for %0d ejected at %0d",
                       ej[r].data, exp_dst[ej[r].data], r);
            end
            lat_last = cycle - inj_time[ej[r].data] - 1;
            got_last = 1'b1;
            exp_dst.delete(ej[r].data);
            inj_time.delete(ej[r].data);
          end
        end
      end
    end
  end

  function automatic flit_t mk(int src, int dst);
    flit_t f;
    f       = '0;
    f.valid = 1'b1;
    f.head  = 1'b1;
    f.tail  = 1'b1;
    f.dst_x = coord_t'(dst % K);
    f.dst_y = coord_t'(dst / K);
    f.data  = {8'(src), 24'(seq)};
    return f;
  endfunction

  // drive injections at the falling edge, for one cycle; returns accepted
  task automatic send_one(int src, int dst, int exp_lat, string what);
    flit_t f;
    int    t;
    f = mk(src, dst);
    seq++;
    @(negedge clk);
    inj[src] = f;
    exp_dst[f.data]  = dst;
    inj_time[f.data] = cycle;
    got_last = 1'b0;
    @(negedge clk);
    inj[src] = '0;
    t = 0;
    while (!got_last && t < 50) begin
      @(negedge clk);
      t++;
    end
    checks++;
    if (!got_last || lat_last != exp_lat) begin
      failures++;
      $display("FAIL: %s latency %0d, expected %0d", what, lat_last, exp_lat);
    end else
      $display("zero-load %s: %0d cycles", what, lat_last);
    repeat (5) @(negedge clk);
  endtask

  task automatic traffic(int cycles, int rate_pct, int hotspot);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        // keep a refused flit on the port until it is taken
        if (inj[r].valid && !acc[r]) continue;
        inj[r] = '0;
        if (int'($urandom_range(99)) < rate_pct) begin
          int d;
          d = (hotspot >= 0) ? hotspot : int'($urandom_range(NR - 1));
          if (d != r) begin
            inj[r] = mk(r, d);
            seq++;
            exp_dst[inj[r].data]  = d;
            inj_time[inj[r].data] = cycle;
          end
        end
      end
    end
    // let refused flits go in, then stop injecting
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++)
        if (!(inj[r].valid && !acc[r])) inj[r] = '0;
    end
  endtask

  task automatic check_event(string name, longint n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", name);
    end else
      $display("  %-28s %0d", name, n);
  endtask

  initial begin
    n_byp = 0; n_nebb = 0; n_stop = 0; n_gen = 0; n_drop = 0;
    n_used = 0; n_idle = 0; n_conf = 0; n_stall = 0; n_inj = 0; n_ej = 0;
    got_last = 1'b0; lat_last = 0;
    for (int r = 0; r < NR; r++) begin
      inj[r] = '0;
      acc[r] = 1'b0;
    end
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // ---------------------------------------------------- zero-load latency
    send_one(0, 3,  5, "(0,0)->(3,0) one multi-hop");
    send_one(0, 1,  5, "(0,0)->(1,0) one hop");
    send_one(0, 15, 6, "(0,0)->(3,3) X then Y, spec-SSR");
    send_one(15, 0, 6, "(3,3)->(0,0) X then Y, spec-SSR");
    send_one(5, 14, 6, "(1,1)->(2,3) X then Y, spec-SSR");
    send_one(12, 0, 5, "(0,3)->(0,0) one Y multi-hop");

    // ------------------------------------------------------ loaded network
    traffic(3000, 35, -1);
    traffic(400, 60, 10);
    traffic(1500, 20, -1);

    // drain
    for (int c = 0; c < 2000 && exp_dst.num() != 0; c++) @(negedge clk);
    checks++;
    if (exp_dst.num() != 0) begin
      failures++;
      $display("FAIL: %0d flits never delivered", exp_dst.num());
    end
    $display("injected %0d, ejected %0d", n_inj, n_ej);
    check_event("router bypass", n_byp);
    check_event("non-empty buffer bypass", n_nebb);
    check_event("premature stop", n_stop);
    check_event("spec-SSR generated", n_gen);
    check_event("spec-SSR dropped (SSR_Mux)", n_drop);
    check_event("speculative bypass used", n_used);
    check_event("speculative bypass unused", n_idle);
    check_event("SA-L conflict", n_conf);
    check_event("injection back-pressure", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
