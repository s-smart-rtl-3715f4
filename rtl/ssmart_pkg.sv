// Shared types and constants of the S-SMART++ network-on-chip.
//
// The network is a 2D mesh of 5-port routers (North, East, South, West,
// Local). Packets are single flits, routed dimension-ordered (X then Y).
// A flit carries its destination coordinates next to a 32-bit payload.
// SMART-hop Setup Requests (SSRs) travel on dedicated broadcast wires along
// one row or column (SMART_1D) and carry the requested multi-hop length, the
// packet destination and a bit that marks speculative SSRs (spec-SSRs).
//
// Port numbering, flit and SSR field widths and the head/tail bits are this
// design's own choices; the 32-bit flit, 5-port routers, XY routing and the
// SSR contents (length, destination, speculative bit) follow the design
// description.
package ssmart_pkg;

  // Router ports. Input port P receives from the neighbour on side P;
  // output port P sends to the neighbour on side P.
  localparam int unsigned NPORT  = 5;
  localparam int unsigned NMESH  = 4;
  localparam int unsigned P_N    = 0;  // towards y+1
  localparam int unsigned P_E    = 1;  // towards x+1
  localparam int unsigned P_S    = 2;  // towards y-1
  localparam int unsigned P_W    = 3;  // towards x-1
  localparam int unsigned P_L    = 4;  // local injection / ejection

  localparam int unsigned COORD_W = 4;  // mesh side up to 16
  localparam int unsigned LEN_W   = 4;  // multi-hop length up to 15 (HPC_Max)
  localparam int unsigned DATA_W  = 32; // flit payload width
  localparam int unsigned PORT_W  = 3;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [LEN_W-1:0]   len_t;
  typedef logic [PORT_W-1:0]  port_t;

  // One flit on a link or in a buffer. head and tail are both set for the
  // single-flit packets this network carries.
  typedef struct packed {
    logic              valid;
    logic              head;
    logic              tail;
    coord_t            dst_x;
    coord_t            dst_y;
    logic [DATA_W-1:0] data;
  } flit_t;

  // SMART-hop Setup Request, as driven on one output port's broadcast wires.
  // len is the number of hops of the multi-hop; a router at distance d from
  // the sender uses it when len >= d (len == d: it is the final router).
  typedef struct packed {
    logic   valid;
    logic   spec;
    len_t   len;
    coord_t dst_x;
    coord_t dst_y;
  } ssr_t;

  // What drives an output link in the next cycle.
  typedef enum logic [1:0] {
    SEL_NONE = 2'd0,  // link idle
    SEL_XBAR = 2'd1,  // local flit through the crossbar (switch traversal)
    SEL_BYP  = 2'd2,  // Bypass_Dem -> Bypass_Mux: link flit of the opposite input
    SEL_SPEC = 2'd3   // Spec_Dem -> Spec_Mux: flit held in an input's Pipe_In
  } out_sel_e;

  // Per-router, per-cycle event pulses for performance monitoring.
  typedef struct packed {
    logic [2:0] bypass;       // flits taking a router bypass path here
    logic [2:0] nebb;         // of those, bypasses of a non-empty input buffer
    logic [2:0] prem_stop;    // flits stopped here before their multi-hop end
    logic [2:0] spec_gen;     // spec-SSRs broadcast
    logic [2:0] spec_drop;    // spec-SSRs discarded by SSR_Mux (local SSR wins)
    logic [2:0] spec_used;    // speculative bypass paths used by a flit
    logic [2:0] spec_idle;    // speculative bypass paths won but left unused
    logic [2:0] sal_conflict; // SA-L requests that lost arbitration
    logic       inj_stall;    // injection refused for lack of buffer room
  } router_ev_t;

  function automatic port_t opposite(input port_t p);
    case (p)
      port_t'(P_N): return port_t'(P_S);
      port_t'(P_E): return port_t'(P_W);
      port_t'(P_S): return port_t'(P_N);
      port_t'(P_W): return port_t'(P_E);
      default:      return port_t'(P_L);
    endcase
  endfunction

endpackage
