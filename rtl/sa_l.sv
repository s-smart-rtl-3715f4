// Switch Allocation Local (SA-L).
//
// Every input offers at most one flit (the head of its buffer) together with
// the output port and multi-hop length that lookahead routing computed for
// it. A flit requests its output when it may leave: always for the local
// (ejection) port, and for a mesh port when the multi-hop length is at least
// one, i.e. the next router has room. One grant-hold round-robin arbiter per
// output picks a winner; since each input requests one output only, each
// input wins at most once. The winner is popped from its input at the next
// clock edge and moves through the crossbar into the output's SSR stage.
//
// Combinational requests to grants; arbiter state updates on the clock.
// lost counts requests that did not win this cycle.
//
// Per-output round-robin arbitration with grant-hold follows the design
// description; with one buffer per input no input-side (SA-I) stage is needed.
module sa_l
  import ssmart_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t head     [NPORT],
  input  port_t route    [NPORT],
  input  len_t  len      [NPORT],
  output logic  pop      [NPORT],
  output logic  win_valid[NPORT],
  output port_t win_idx  [NPORT],
  output logic [2:0] lost
);

  logic [NPORT-1:0] req_m  [NPORT];
  logic [NPORT-1:0] head_v, tail_v;
  logic [NPORT-1:0] gnt_m  [NPORT];
  logic [NPORT-1:0] any_req;

  always_comb begin
    for (int unsigned i = 0; i < NPORT; i++) begin
      head_v[i]  = head[i].head;
      tail_v[i]  = head[i].tail;
      any_req[i] = head[i].valid &&
                   (route[i] == port_t'(P_L) || len[i] != '0);
    end
    for (int unsigned o = 0; o < NPORT; o++)
      for (int unsigned i = 0; i < NPORT; i++)
        req_m[o][i] = any_req[i] && (route[i] == port_t'(o));
  end

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    logic [$clog2(NPORT)-1:0] idx;
    logic                     locked_unused;
    grant_hold_arbiter #(.N(NPORT)) u_arb (
      .clk      (clk),
      .rst_n    (rst_n),
      .req      (req_m[o]),
      .head_in  (head_v),
      .tail_in  (tail_v),
      .abort    (1'b0),
      .gnt      (gnt_m[o]),
      .gnt_valid(win_valid[o]),
      .gnt_idx  (idx),
      .locked   (locked_unused)
    );
    assign win_idx[o] = port_t'(idx);
  end

  always_comb begin
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < NPORT; i++) begin
      pop[i] = 1'b0;
      for (int unsigned o = 0; o < NPORT; o++)
        if (gnt_m[o][i]) pop[i] = 1'b1;
      if (any_req[i] && !pop[i]) n++;
    end
    lost = 3'(n);
  end

endmodule
