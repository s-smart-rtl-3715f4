// Speculative SSR generation and SSR_Mux.
//
// When a router was the final router of an SSR in the previous cycle (that
// SSR ended at one of its inputs, fin_valid), it knows the destination of a
// packet that is about to land in that input's Pipe_In. In this cycle it
// computes that packet's next multi-hop (la_rc) and broadcasts a speculative
// SSR for it, before knowing whether the packet will arrive. Several inputs
// may produce a spec-SSR for the same output: the one with the longest
// multi-hop is kept (lowest input number on a tie). At each output SSR_Mux
// then gives absolute priority to the standard SSR of a local flit, which
// discards the spec-SSR. The surviving spec-SSR is also handed to this
// router's own SA-G as a distance-0 request, with the input it came from.
//
// No spec-SSR is made for packets that have reached their destination or
// whose next hop has no room (length 0): they are buffered as usual.
// Purely combinational.
//
// Spec-SSR generation at the final router, the SSR_Mux priority and the
// longest-hop rule follow the design description.
module spec_ssr_gen
  import ssmart_pkg::*;
#(
  parameter int unsigned HPC_MAX = 3,
  parameter int unsigned X       = 0,
  parameter int unsigned Y       = 0
) (
  input  logic   fin_valid [NMESH],
  input  coord_t fin_dst_x [NMESH],
  input  coord_t fin_dst_y [NMESH],
  input  logic   room_ahead[NMESH][1:HPC_MAX],
  input  ssr_t   local_ssr [NMESH],
  output ssr_t   ssr_out   [NMESH],
  output ssr_t   spec_ssr  [NMESH],
  output port_t  spec_src  [NMESH],
  output logic [2:0] n_gen,
  output logic [2:0] n_drop
);

  port_t r_port [NMESH];
  len_t  r_len  [NMESH];

  for (genvar p = 0; p < NMESH; p++) begin : g_rc
    la_rc #(.HPC_MAX(HPC_MAX), .X(X), .Y(Y)) u_rc (
      .dst_x     (fin_dst_x[p]),
      .dst_y     (fin_dst_y[p]),
      .room_ahead(room_ahead),
      .port      (r_port[p]),
      .len       (r_len[p])
    );
  end

  always_comb begin
    int unsigned g, d;
    g = 0;
    d = 0;
    for (int unsigned o = 0; o < NMESH; o++) begin
      ssr_t cand;
      cand        = '0;
      spec_src[o] = '0;
      for (int unsigned p = 0; p < NMESH; p++) begin
        if (fin_valid[p] && r_port[p] == port_t'(o) && r_len[p] != '0 &&
            (!cand.valid || r_len[p] > cand.len)) begin
          cand.valid  = 1'b1;
          cand.spec   = 1'b1;
          cand.len    = r_len[p];
          cand.dst_x  = fin_dst_x[p];
          cand.dst_y  = fin_dst_y[p];
          spec_src[o] = port_t'(p);
        end
      end
      if (local_ssr[o].valid) begin
        ssr_out[o]  = local_ssr[o];
        spec_ssr[o] = '0;
        if (cand.valid) d++;
      end else begin
        ssr_out[o]  = cand;
        spec_ssr[o] = cand;
        if (cand.valid) g++;
      end
    end
    n_gen  = 3'(g);
    n_drop = 3'(d);
  end

endmodule
