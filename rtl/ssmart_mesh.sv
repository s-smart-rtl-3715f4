// K x K mesh of S-SMART++ routers (top level).
//
// Router (x, y) has number y*K + x; East is x+1 and North is y+1. The mesh
// wires three kinds of signals between routers of the same row or column:
//   - links: output o of a router feeds input opposite(o) of its neighbour.
//     Because bypass paths are combinational, a flit can cross up to
//     HPC_MAX links and the routers between them in one cycle.
//   - SSR broadcast wires (SMART_1D): output o of a router reaches input
//     opposite(o) of each of the next HPC_MAX routers in that direction,
//     one wire per distance. Plain SMART only needs HPC_MAX-1 of them (the
//     routers a maximal multi-hop skips); the last one reaches the final
//     router of such a hop, which S-SMART++ needs for its spec-SSRs.
//   - room flags: each input's "has ROOM_MIN free slots" flag goes back to
//     the HPC_MAX routers upstream of it, which use it to size multi-hops.
// Wires that would leave the mesh are tied off.
//
// Lint reports UNOPTFLAT (a flattened loop) on lnk_out: each router's link outputs depend
// combinationally on its link inputs (bypass), and those are other routers'
// lnk_out entries, so the whole array appears to feed itself. The bypass
// only connects a link to the next link in the same direction, so no
// signal depends on itself and the warning stands.
//
// Interface: per router an injection flit with ready, an ejection flit and
// the event vector; ports are arrays indexed by router number.
// Defaults (4x4, HPC_MAX = 3, one buffer of 8 packets per input, 32-bit
// flits) are the hardware configuration of the design description; the
// room flags in place of credits are this design's own choice.
module ssmart_mesh
  import ssmart_pkg::*;
#(
  parameter int unsigned K        = 4,
  parameter int unsigned HPC_MAX  = 3,
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned ROOM_MIN = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  flit_t      inj       [K*K],
  output logic       inj_ready [K*K],
  output flit_t      ej        [K*K],
  output router_ev_t ev        [K*K]
);

  flit_t lnk_out  [K*K][NMESH];
  ssr_t  ssr_o    [K*K][NMESH];
  logic  room_o   [K*K][NMESH];

  // x, y offsets of one step through port p
  function automatic int step_x(input int p);
    return (p == int'(P_E)) ? 1 : (p == int'(P_W)) ? -1 : 0;
  endfunction
  function automatic int step_y(input int p);
    return (p == int'(P_N)) ? 1 : (p == int'(P_S)) ? -1 : 0;
  endfunction

  for (genvar y = 0; y < K; y++) begin : g_y
    for (genvar x = 0; x < K; x++) begin : g_x
      localparam int R = y * K + x;

      flit_t l_in   [NMESH];
      ssr_t  s_in   [NMESH][1:HPC_MAX];
      logic  r_ahd  [NMESH][1:HPC_MAX];

      for (genvar p = 0; p < NMESH; p++) begin : g_p
        localparam int OPP = int'(opposite(port_t'(p)));
        // link from the neighbour on side p
        localparam int NX1 = x + step_x(p);
        localparam int NY1 = y + step_y(p);
        if (NX1 >= 0 && NX1 < K && NY1 >= 0 && NY1 < K) begin : g_l
          assign l_in[p] = lnk_out[NY1*K + NX1][OPP];
        end else begin : g_nl
          assign l_in[p] = '0;
        end
        // SSRs from the routers d hops away on side p
        for (genvar d = 1; d <= HPC_MAX; d++) begin : g_d
          localparam int SX = x + d * step_x(p);
          localparam int SY = y + d * step_y(p);
          if (SX >= 0 && SX < K && SY >= 0 && SY < K) begin : g_s
            assign s_in[p][d] = ssr_o[SY*K + SX][OPP];
          end else begin : g_ns
            assign s_in[p][d] = '0;
          end
        end
        // room of the routers k hops away through output p
        for (genvar k = 1; k <= HPC_MAX; k++) begin : g_k
          localparam int AX = x + k * step_x(p);
          localparam int AY = y + k * step_y(p);
          if (AX >= 0 && AX < K && AY >= 0 && AY < K) begin : g_a
            assign r_ahd[p][k] = room_o[AY*K + AX][OPP];
          end else begin : g_na
            assign r_ahd[p][k] = 1'b0;
          end
        end
      end

      ssmart_router #(
        .HPC_MAX (HPC_MAX),
        .DEPTH   (DEPTH),
        .ROOM_MIN(ROOM_MIN),
        .X       (x),
        .Y       (y)
      ) u_router (
        .clk       (clk),
        .rst_n     (rst_n),
        .link_in   (l_in),
        .link_out  (lnk_out[R]),
        .ssr_in    (s_in),
        .ssr_out   (ssr_o[R]),
        .room_out  (room_o[R]),
        .room_ahead(r_ahd),
        .inj       (inj[R]),
        .inj_ready (inj_ready[R]),
        .ej        (ej[R]),
        .ev        (ev[R])
      );
    end
  end

endmodule
