// S-SMART++ router: a 5-port mesh router with single-cycle multi-hop bypass
// (SMART_1D, router bypass) and speculative setup of consecutive multi-hops.
//
// Pipeline of a flit that starts a multi-hop here (one stage per cycle):
//   1. SA-L + LA-RC: the head of an input buffer (or the flit in Pipe_In when
//      the buffer is empty) wins its output and moves into stage A.
//   2. SSR: stage A broadcasts a standard SSR (length, destination) on the
//      output's SSR wires, up to HPC_MAX routers downstream (one more than
//      the routers it skips, so the final router sees it too), and every
//      router runs SA-G. The flit moves to stage B.
//   3. ST+LT: stage B crosses the crossbar and the link, then the bypass
//      paths that SA-G set up in the routers it skips, and lands in the
//      Pipe_In register of its final (or premature-stop) router.
// In the final router the extended SSR recorded the destination in cycle 2,
// so in cycle 3 that router broadcasts a spec-SSR for the next multi-hop and
// runs SA-G for it; if it wins, in cycle 4 the flit leaves Pipe_In through
// Spec_Dem/Spec_Mux without being buffered. Chained multi-hops so cost one
// cycle each instead of three. Without a spec-SSR win the flit is buffered
// and starts again at step 1.
//
// Each output link is driven, as SA-G decided in the previous cycle, by the
// crossbar (stage B), by the straight-through bypass from the opposite input
// link (Bypass_Dem/Bypass_Mux, combinational through the router), by an
// input's Pipe_In (Spec_Mux), or is idle.
//
// Interface: link_*/ssr_*/room_* connect to the mesh wiring; room_ahead[o][k]
// is the room flag of the router k hops through output o. inj is accepted
// when inj_ready is high; ej carries ejected flits, which are always taken.
// ev reports events of the current cycle.
//
// The pipeline, the SA-G priorities, the three input paths and single
// multi-packet buffers follow the design description; the room flags that
// replace credits, the direct Pipe_In to SA-L path and the event outputs are
// this design's own.
module ssmart_router
  import ssmart_pkg::*;
#(
  parameter int unsigned HPC_MAX  = 3,
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned ROOM_MIN = 4,
  parameter int unsigned X        = 0,
  parameter int unsigned Y        = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  flit_t      link_in   [NMESH],
  output flit_t      link_out  [NMESH],
  input  ssr_t       ssr_in    [NMESH][1:HPC_MAX],
  output ssr_t       ssr_out   [NMESH],
  output logic       room_out  [NMESH],
  input  logic       room_ahead[NMESH][1:HPC_MAX],
  input  flit_t      inj,
  output logic       inj_ready,
  output flit_t      ej,
  output router_ev_t ev
);

  // ---------------------------------------------------------------- inputs
  flit_t in_link  [NPORT];
  flit_t pipe     [NPORT];
  flit_t head     [NPORT];
  logic  pop      [NPORT];
  logic  room     [NPORT];
  logic  nonempty [NPORT];
  logic  byp_in   [NPORT];
  logic  spec_in  [NPORT];

  logic     byp_take_q  [NMESH];
  logic     spec_take_q [NMESH];
  logic     stop_exp_q  [NMESH];
  out_sel_e sel_q       [NMESH];
  port_t    sel_src_q   [NMESH];
  logic     fin_valid_q [NMESH];
  coord_t   fin_dst_x_q [NMESH];
  coord_t   fin_dst_y_q [NMESH];

  assign inj_ready = room[P_L];

  always_comb begin
    for (int unsigned p = 0; p < NMESH; p++) begin
      in_link[p] = link_in[p];
      byp_in[p]  = byp_take_q[p];
      spec_in[p] = spec_take_q[p];
    end
    in_link[P_L] = (inj.valid && inj_ready) ? inj : '0;
    byp_in[P_L]  = 1'b0;
    spec_in[P_L] = 1'b0;
  end

  for (genvar p = 0; p < NPORT; p++) begin : g_in
    input_unit #(.DEPTH(DEPTH), .ROOM_MIN(ROOM_MIN)) u_in (
      .clk      (clk),
      .rst_n    (rst_n),
      .link_in  (in_link[p]),
      .byp_take (byp_in[p]),
      .spec_take(spec_in[p]),
      .pipe_out (pipe[p]),
      .head     (head[p]),
      .pop      (pop[p]),
      .room     (room[p]),
      .nonempty (nonempty[p])
    );
  end

  for (genvar p = 0; p < NMESH; p++) begin : g_room
    assign room_out[p] = room[p];
  end

  // ----------------------------------------------------------- LA-RC, SA-L
  port_t route [NPORT];
  len_t  hlen  [NPORT];

  for (genvar p = 0; p < NPORT; p++) begin : g_rc
    la_rc #(.HPC_MAX(HPC_MAX), .X(X), .Y(Y)) u_rc (
      .dst_x     (head[p].dst_x),
      .dst_y     (head[p].dst_y),
      .room_ahead(room_ahead),
      .port      (route[p]),
      .len       (hlen[p])
    );
  end

  logic       win_valid [NPORT];
  port_t      win_idx   [NPORT];
  logic [2:0] sal_lost;

  sa_l u_sal (
    .clk      (clk),
    .rst_n    (rst_n),
    .head     (head),
    .route    (route),
    .len      (hlen),
    .pop      (pop),
    .win_valid(win_valid),
    .win_idx  (win_idx),
    .lost     (sal_lost)
  );

  // ------------------------------------------- stage A (SSR) and B (ST+LT)
  flit_t a_q   [NPORT];
  len_t  a_len [NPORT];
  flit_t b_q   [NPORT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned o = 0; o < NPORT; o++) begin
        a_q[o]   <= '0;
        a_len[o] <= '0;
        b_q[o]   <= '0;
      end
    end else begin
      for (int unsigned o = 0; o < NPORT; o++) begin
        // crossbar: SA-L winner of output o
        a_q[o]   <= win_valid[o] ? head[win_idx[o]] : '0;
        a_len[o] <= win_valid[o] ? hlen[win_idx[o]] : '0;
        b_q[o]   <= a_q[o];
      end
    end
  end

  assign ej = b_q[P_L];

  // -------------------------------------------------- SSRs and spec-SSRs
  ssr_t       local_ssr [NMESH];
  ssr_t       spec_ssr  [NMESH];
  port_t      spec_src  [NMESH];
  logic       local_busy[NMESH];
  logic [2:0] n_gen, n_drop;

  always_comb begin
    for (int unsigned o = 0; o < NMESH; o++) begin
      local_ssr[o].valid = a_q[o].valid;
      local_ssr[o].spec  = 1'b0;
      local_ssr[o].len   = a_len[o];
      local_ssr[o].dst_x = a_q[o].dst_x;
      local_ssr[o].dst_y = a_q[o].dst_y;
      local_busy[o]      = a_q[o].valid;
    end
  end

  spec_ssr_gen #(.HPC_MAX(HPC_MAX), .X(X), .Y(Y)) u_spec (
    .fin_valid (fin_valid_q),
    .fin_dst_x (fin_dst_x_q),
    .fin_dst_y (fin_dst_y_q),
    .room_ahead(room_ahead),
    .local_ssr (local_ssr),
    .ssr_out   (ssr_out),
    .spec_ssr  (spec_ssr),
    .spec_src  (spec_src),
    .n_gen     (n_gen),
    .n_drop    (n_drop)
  );

  // ------------------------------------------------------------------ SA-G
  out_sel_e sel_d      [NMESH];
  port_t    sel_src_d  [NMESH];
  logic     byp_take_d [NMESH];
  logic     spec_take_d[NMESH];
  logic     stop_exp_d [NMESH];
  logic     fin_valid_d[NMESH];
  coord_t   fin_dst_x_d[NMESH];
  coord_t   fin_dst_y_d[NMESH];

  sa_g #(.HPC_MAX(HPC_MAX)) u_sag (
    .ssr_in    (ssr_in),
    .spec_ssr  (spec_ssr),
    .spec_src  (spec_src),
    .local_busy(local_busy),
    .sel       (sel_d),
    .sel_src   (sel_src_d),
    .byp_take  (byp_take_d),
    .spec_take (spec_take_d),
    .stop_exp  (stop_exp_d),
    .fin_valid (fin_valid_d),
    .fin_dst_x (fin_dst_x_d),
    .fin_dst_y (fin_dst_y_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned p = 0; p < NMESH; p++) begin
        sel_q[p]       <= SEL_NONE;
        sel_src_q[p]   <= '0;
        byp_take_q[p]  <= 1'b0;
        spec_take_q[p] <= 1'b0;
        stop_exp_q[p]  <= 1'b0;
        fin_valid_q[p] <= 1'b0;
        fin_dst_x_q[p] <= '0;
        fin_dst_y_q[p] <= '0;
      end
    end else begin
      for (int unsigned p = 0; p < NMESH; p++) begin
        sel_q[p]       <= sel_d[p];
        sel_src_q[p]   <= sel_src_d[p];
        byp_take_q[p]  <= byp_take_d[p];
        spec_take_q[p] <= spec_take_d[p];
        stop_exp_q[p]  <= stop_exp_d[p];
        fin_valid_q[p] <= fin_valid_d[p];
        fin_dst_x_q[p] <= fin_dst_x_d[p];
        fin_dst_y_q[p] <= fin_dst_y_d[p];
      end
    end
  end

  // ------------------------------- output muxes: crossbar / bypass / spec
  always_comb begin
    for (int unsigned o = 0; o < NMESH; o++) begin
      case (sel_q[o])
        SEL_XBAR: link_out[o] = b_q[o];
        SEL_BYP:  link_out[o] = link_in[2'((o + 2) % NMESH)];
        SEL_SPEC: link_out[o] = pipe[sel_src_q[o]];
        default:  link_out[o] = '0;
      endcase
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    int unsigned nb, nn, ns, nu, ni;
    nb = 0; nn = 0; ns = 0; nu = 0; ni = 0;
    for (int unsigned o = 0; o < NMESH; o++) begin
      if (sel_q[o] == SEL_BYP && link_in[sel_src_q[o][1:0]].valid) begin
        nb++;
        if (nonempty[sel_src_q[o]]) nn++;
      end
      if (sel_q[o] == SEL_SPEC) begin
        if (pipe[sel_src_q[o]].valid) nu++;
        else ni++;
      end
      if (stop_exp_q[o] && link_in[o].valid) ns++;
    end
    ev.bypass       = 3'(nb);
    ev.nebb         = 3'(nn);
    ev.prem_stop    = 3'(ns);
    ev.spec_gen     = n_gen;
    ev.spec_drop    = n_drop;
    ev.spec_used    = 3'(nu);
    ev.spec_idle    = 3'(ni);
    ev.sal_conflict = sal_lost;
    ev.inj_stall    = inj.valid && !inj_ready;
  end

  // A flit in stage B always owns its output (local priority).
  for (genvar o = 0; o < NMESH; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     b_q[o].valid |-> sel_q[o] == SEL_XBAR)
      else $error("ssmart_router: stage B flit without its output");
  end

endmodule
