// Self-checking test of one S-SMART++ router at (1, 1), HPC_MAX = 3, with
// the neighbours' links, SSR wires and room flags driven by the test.
// Directed cases, each with its cycle timing checked:
//   1. a local flit for (3,1): standard SSR (length 2) on the East wires one
//      cycle after SA-L, flit on the East link one cycle later;
//   2. an SSR from one hop west with length 3 sets up the bypass: the next
//      cycle's West link flit leaves on East in the same cycle;
//   3. the same while a local flit owns East: local priority, the arriving
//      flit stops here (premature stop) and is sent on later;
//   4. an SSR ending here for a packet that turns north: a spec-SSR goes out
//      on North in the next cycle, and the flit leaves Pipe_In on North one
//      cycle after it arrived, without being buffered;
//   5. a flit for this router is ejected three cycles after it arrives.
module tb_ssmart_router;
  import ssmart_pkg::*;
  localparam int H = 3;
  logic       clk = 1'b0, rst_n;
  flit_t      link_in   [NMESH];
  flit_t      link_out  [NMESH];
  ssr_t       ssr_in    [NMESH][1:H];
  ssr_t       ssr_out   [NMESH];
  logic       room_out  [NMESH];
  logic       room_ahead[NMESH][1:H];
  flit_t      inj, ej;
  logic       inj_ready;
  router_ev_t ev;
  int checks = 0, failures = 0;
  int n_byp = 0, n_stop = 0, n_spec = 0;

  ssmart_router #(.HPC_MAX(H), .X(1), .Y(1)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_byp  += ev.bypass;
    n_stop += ev.prem_stop;
    n_spec += ev.spec_used;
  end

  function automatic flit_t mk(int x, int y, logic [31:0] d);
    flit_t f;
    f = '0; f.valid = 1; f.head = 1; f.tail = 1;
    f.dst_x = coord_t'(x); f.dst_y = coord_t'(y); f.data = d;
    return f;
  endfunction
  function automatic ssr_t mks(bit spec, int l, int x, int y);
    ssr_t s;
    s = '0; s.valid = 1; s.spec = spec; s.len = len_t'(l);
    s.dst_x = coord_t'(x); s.dst_y = coord_t'(y);
    return s;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic idle();
    for (int p = 0; p < NMESH; p++) begin
      link_in[p] = '0;
      for (int d = 1; d <= H; d++) ssr_in[p][d] = '0;
    end
    inj = '0;
  endtask

  initial begin
    flit_t f, g;
    int t;
    rst_n = 0;
    idle();
    for (int p = 0; p < NMESH; p++) for (int k = 1; k <= H; k++) room_ahead[p][k] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. local flit to (3,1)
    f = mk(3, 1, 32'h1111_0001);
    inj = f;
    chk(inj_ready, "inj_ready after reset");
    @(negedge clk); idle();                       // e0 took it into Pipe_In
    @(negedge clk);                               // e1: SA-L won
    chk(ssr_out[P_E].valid && !ssr_out[P_E].spec && ssr_out[P_E].len == 2 &&
        ssr_out[P_E].dst_x == 3, "1: standard SSR on East");
    @(negedge clk);                               // e2: stage B
    chk(link_out[P_E] == f, "1: flit on East link");
    @(negedge clk);
    chk(!link_out[P_E].valid, "1: East link idle again");

    // 2. bypass W -> E
    ssr_in[P_W][1] = mks(0, 3, 3, 1);
    @(negedge clk); idle();
    f = mk(3, 1, 32'h2222_0002);
    link_in[P_W] = f;
    #1 chk(link_out[P_E] == f, "2: flit bypasses the router in the same cycle");
    @(negedge clk); idle();
    repeat (4) begin
      #1 chk(!link_out[P_E].valid && !ej.valid, "2: nothing buffered");
      @(negedge clk);
    end

    // 3. premature stop: local flit owns East
    g = mk(2, 1, 32'h3333_0003);
    inj = g;
    @(negedge clk); idle();                       // Pipe_In
    @(negedge clk);                               // stage A: SSR out
    ssr_in[P_W][1] = mks(0, 3, 3, 1);
    @(negedge clk); idle();                       // B drives East now
    f = mk(3, 1, 32'h3333_0004);
    link_in[P_W] = f;
    #1 chk(link_out[P_E] == g, "3: local flit keeps the East link");
    @(negedge clk); idle();
    t = 0;
    while (link_out[P_E] != f && t < 10) begin @(negedge clk); t++; end
    chk(link_out[P_E] == f, "3: stopped flit sent on later");
    chk(t == 2, $sformatf("3: stopped flit left %0d cycles after SA-L start, expected 2", t));
    @(negedge clk);

    // 4. SSR ends here, packet turns north: spec-SSR
    ssr_in[P_W][1] = mks(0, 1, 1, 3);
    @(negedge clk); idle();
    f = mk(1, 3, 32'h4444_0005);
    link_in[P_W] = f;                             // flit arrives this cycle
    chk(ssr_out[P_N].valid && ssr_out[P_N].spec && ssr_out[P_N].len == 2 &&
        ssr_out[P_N].dst_y == 3, "4: spec-SSR on North");
    @(negedge clk); idle();
    chk(link_out[P_N] == f, "4: flit leaves Pipe_In on North");
    @(negedge clk);
    chk(!link_out[P_N].valid, "4: North idle again");

    // 5. ejection
    ssr_in[P_W][1] = mks(0, 1, 1, 1);
    @(negedge clk); idle();
    f = mk(1, 1, 32'h5555_0006);
    link_in[P_W] = f;
    @(negedge clk); idle();                       // Pipe_In
    chk(!ej.valid, "5: not yet ejected");
    @(negedge clk);                               // SA-L -> A
    @(negedge clk);                               // B
    chk(ej == f, "5: ejected");

    chk(n_byp == 1, $sformatf("bypass events %0d", n_byp));
    chk(n_stop == 1, $sformatf("premature stop events %0d", n_stop));
    chk(n_spec == 1, $sformatf("spec bypass events %0d", n_spec));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
