// Lookahead route computation (LA-RC) with multi-hop length selection.
//
// From the packet destination and this router's coordinates it picks the
// dimension-ordered (X first, then Y) output port and the length of the next
// SMART_1D multi-hop: the distance left in the current dimension, capped at
// HPC_MAX, and cut short before the first router ahead whose input buffer
// lacks room for one more packet (the buffer-size check of Non-Empty Buffer
// Bypass: a flit may be stopped at any router of its multi-hop, so every one
// of them must be able to hold it). A length of 0 on a mesh port means the
// flit must wait. For the local port (destination reached) len is 0.
//
// Purely combinational. room_ahead[o][k] is the room flag of the router k
// hops away through output o, on its input facing this router.
//
// XY routing, HPC_MAX and the one-dimension multi-hops follow the design
// description; truncating the hop at the first router without room is this
// design's way of applying the buffer check to every router of the hop.
module la_rc
  import ssmart_pkg::*;
#(
  parameter int unsigned HPC_MAX = 3,
  parameter int unsigned X       = 0,
  parameter int unsigned Y       = 0
) (
  input  coord_t dst_x,
  input  coord_t dst_y,
  input  logic   room_ahead [NMESH][1:HPC_MAX],
  output port_t  port,
  output len_t   len
);

  int unsigned hops;
  int unsigned lim;
  logic        stop;

  always_comb begin
    port = port_t'(P_L);
    hops = 0;
    if (int'(dst_x) > int'(X)) begin
      port = port_t'(P_E);
      hops = int'(dst_x) - int'(X);
    end else if (int'(dst_x) < int'(X)) begin
      port = port_t'(P_W);
      hops = int'(X) - int'(dst_x);
    end else if (int'(dst_y) > int'(Y)) begin
      port = port_t'(P_N);
      hops = int'(dst_y) - int'(Y);
    end else if (int'(dst_y) < int'(Y)) begin
      port = port_t'(P_S);
      hops = int'(Y) - int'(dst_y);
    end
    lim  = (hops > HPC_MAX) ? HPC_MAX : hops;
    len  = '0;
    stop = 1'b0;
    if (port != port_t'(P_L)) begin
      for (int unsigned k = 1; k <= HPC_MAX; k++) begin
        if (k <= lim && !stop) begin
          if (room_ahead[port[1:0]][k]) len = len_t'(k);
          else stop = 1'b1;
        end
      end
    end
  end

endmodule
