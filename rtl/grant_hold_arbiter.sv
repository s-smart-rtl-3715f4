// Round-robin arbiter with grant-hold, for packet-by-packet arbitration.
//
// Each cycle one of the N requesters is granted. Priority rotates: the
// requester after the last winner is tried first. When the winner's flit is
// a packet head that is not also the tail, the arbiter locks onto that
// requester, so the following flits of the packet win without competition.
// The lock is released when the granted flit is a tail, or when abort is
// raised (used when an expected packet head does not arrive). Single-flit
// packets (head and tail set) never lock.
//
// Interface: req[i] requests this cycle, tail_in[i]/head_in[i] describe the
// flit requester i would send. gnt is one-hot and purely combinational from
// req and the registered state; the rotation pointer and lock update on the
// clock edge after a grant.
//
// The round-robin order and the grant-hold behaviour follow the design
// description; the abort input and the reset state are this design's choice.
module grant_hold_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] head_in,
  input  logic [N-1:0] tail_in,
  input  logic         abort,
  output logic [N-1:0] gnt,
  output logic         gnt_valid,
  output logic [$clog2(N)-1:0] gnt_idx,
  output logic         locked
);

  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0] last_q;
  logic          lock_q;

  always_comb begin
    int unsigned i;
    i         = 0;
    gnt       = '0;
    gnt_valid = 1'b0;
    gnt_idx   = '0;
    if (lock_q) begin
      if (req[last_q]) begin
        gnt[last_q] = 1'b1;
        gnt_valid   = 1'b1;
        gnt_idx     = last_q;
      end
    end else begin
      for (int unsigned k = 1; k <= N; k++) begin
        i = (int'(last_q) + k) % N;
        if (!gnt_valid && req[i[IW-1:0]]) begin
          gnt[i[IW-1:0]] = 1'b1;
          gnt_valid = 1'b1;
          gnt_idx   = i[IW-1:0];
        end
      end
    end
  end

  assign locked = lock_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_q <= IW'(N - 1);
      lock_q <= 1'b0;
    end else begin
      if (gnt_valid) begin
        last_q <= gnt_idx;
        if (tail_in[gnt_idx])
          lock_q <= 1'b0;
        else if (head_in[gnt_idx])
          lock_q <= 1'b1;
      end
      if (abort)
        lock_q <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("grant_hold_arbiter: grant not one-hot");

endmodule
