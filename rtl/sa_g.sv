// Switch Allocator Global (SA-G) with the S-SMART++ priority scheme.
//
// Inputs are the SSRs that reach this router on each mesh input, one wire
// per distance d = 1..HPC_MAX to the sender, this router's own spec-SSRs
// (distance 0, from spec_ssr_gen) and, per output, whether a local flit is
// in the SSR stage for it.
//
// SSR priority arbitration, one per input p: an SSR concerns this router if
// its length is at least d. Standard SSRs have absolute priority over
// spec-SSRs; within each class the nearest sender wins (the local-priority
// policy of SMART), so the own distance-0 spec-SSR beats spec-SSRs from
// upstream. If the winner's length equals d, this router is its final
// router: the destination is recorded (fin_*) so that a spec-SSR can be
// generated in the next cycle, and no bypass is requested. Otherwise the
// winner requests the router bypass to the straight-through output (or, for
// a distance-0 spec-SSR, the Pipe_In path to the output it was made for).
//
// Output arbitration, one per output o: a local flit always wins (priority to
// local flits), then a standard bypass, then the own spec-SSR, then a
// spec-SSR bypass from upstream. The result sets, for the next cycle, the
// output mux (sel/sel_src), which input flits bypass (byp_take) and which
// Pipe_In flits leave speculatively (spec_take). A bypass request that lost
// means the flit, if it comes, stops here early (stop_exp).
//
// Purely combinational; the router registers the outputs.
// The arbitration rules follow the design description; the encoding of the
// result is this design's own.
module sa_g
  import ssmart_pkg::*;
#(
  parameter int unsigned HPC_MAX = 3
) (
  input  ssr_t     ssr_in    [NMESH][1:HPC_MAX],
  input  ssr_t     spec_ssr  [NMESH],
  input  port_t    spec_src  [NMESH],
  input  logic     local_busy[NMESH],
  output out_sel_e sel       [NMESH],
  output port_t    sel_src   [NMESH],
  output logic     byp_take  [NMESH],
  output logic     spec_take [NMESH],
  output logic     stop_exp  [NMESH],
  output logic     fin_valid [NMESH],
  output coord_t   fin_dst_x [NMESH],
  output coord_t   fin_dst_y [NMESH]
);

  // Per-input winner
  logic   req_byp   [NMESH];  // bypass request to the straight output
  logic   req_std   [NMESH];  // that request is a standard SSR
  logic   req_spec0 [NMESH];  // own spec-SSR request from this input's Pipe_In
  port_t  req_out0  [NMESH];  // output of the own spec-SSR

  always_comb begin
    for (int unsigned p = 0; p < NMESH; p++) begin
      logic   std_f, spec_f;
      int unsigned std_d, spec_d;
      ssr_t   std_s, spec_s;
      std_f  = 1'b0; spec_f = 1'b0;
      std_d  = 0;    spec_d = 0;
      std_s  = '0;   spec_s = '0;
      req_spec0[p] = 1'b0;
      req_out0[p]  = '0;
      // distance 0: this router's own spec-SSR sourced from input p
      for (int unsigned o = 0; o < NMESH; o++) begin
        if (spec_ssr[o].valid && spec_src[o] == port_t'(p) && !spec_f) begin
          spec_f = 1'b1;
          spec_d = 0;
          spec_s = spec_ssr[o];
          req_out0[p] = port_t'(o);
        end
      end
      for (int unsigned d = 1; d <= HPC_MAX; d++) begin
        ssr_t s;
        s = ssr_in[p][d];
        if (s.valid && int'(s.len) >= int'(d)) begin
          if (!s.spec && !std_f) begin
            std_f = 1'b1; std_d = d; std_s = s;
          end else if (s.spec && !spec_f) begin
            spec_f = 1'b1; spec_d = d; spec_s = s;
          end
        end
      end
      req_byp[p]   = 1'b0;
      req_std[p]   = 1'b0;
      fin_valid[p] = 1'b0;
      fin_dst_x[p] = '0;
      fin_dst_y[p] = '0;
      if (std_f) begin
        if (int'(std_s.len) == int'(std_d)) begin
          fin_valid[p] = 1'b1;
          fin_dst_x[p] = std_s.dst_x;
          fin_dst_y[p] = std_s.dst_y;
        end else begin
          req_byp[p] = 1'b1;
          req_std[p] = 1'b1;
        end
      end else if (spec_f) begin
        if (spec_d == 0) begin
          req_spec0[p] = 1'b1;
        end else if (int'(spec_s.len) == int'(spec_d)) begin
          fin_valid[p] = 1'b1;
          fin_dst_x[p] = spec_s.dst_x;
          fin_dst_y[p] = spec_s.dst_y;
        end else begin
          req_byp[p] = 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int unsigned p = 0; p < NMESH; p++) begin
      byp_take[p]  = 1'b0;
      spec_take[p] = 1'b0;
      stop_exp[p]  = 1'b0;
    end
    for (int unsigned o = 0; o < NMESH; o++) begin
      port_t si;
      logic  s0_f;
      port_t s0_p;
      si   = opposite(port_t'(o));
      s0_f = 1'b0;
      s0_p = '0;
      for (int unsigned p = 0; p < NMESH; p++)
        if (req_spec0[p] && req_out0[p] == port_t'(o) && !s0_f) begin
          s0_f = 1'b1;
          s0_p = port_t'(p);
        end
      sel[o]     = SEL_NONE;
      sel_src[o] = '0;
      if (local_busy[o]) begin
        sel[o] = SEL_XBAR;
      end else if (req_byp[si[1:0]] && req_std[si[1:0]]) begin
        sel[o]     = SEL_BYP;
        sel_src[o] = si;
      end else if (s0_f) begin
        sel[o]     = SEL_SPEC;
        sel_src[o] = s0_p;
      end else if (req_byp[si[1:0]]) begin
        sel[o]     = SEL_BYP;
        sel_src[o] = si;
      end
      if (sel[o] == SEL_BYP)  byp_take[si[1:0]]  = 1'b1;
      if (sel[o] == SEL_SPEC) spec_take[s0_p[1:0]] = 1'b1;
      if (req_byp[si[1:0]] && sel[o] != SEL_BYP) stop_exp[si[1:0]] = 1'b1;
    end
  end

endmodule
