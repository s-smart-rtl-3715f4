// Router input unit: Pipe_In register, Spec_Dem and a multi-packet buffer.
//
// Every flit that arrives on the input link and is not forwarded straight
// through the router bypass (byp_take) is caught in the input pipeline
// register Pipe_In. In the next cycle the Pipe_In flit goes one of three
// ways: out through the speculative bypass path when this input won a
// spec-SSR in SA-G (spec_take, the Spec_Dem/Spec_Mux path), directly into
// switch allocation when the buffer is empty, or into the buffer.
// The buffer is a single FIFO of DEPTH single-flit packets (one buffer, no
// virtual channels), shared by all packets of the input (multi-packet buffer).
//
// head is what this input offers to SA-L: the oldest buffered flit, or the
// Pipe_In flit when the buffer is empty and the flit is not leaving
// speculatively. pop removes it at the clock edge.
//
// room tells upstream routers that this input can still take a flit that is
// committed now: it is set while at least ROOM_MIN slots are free. Up to
// three flits can be on their way here that the occupancy does not show yet
// (one in Pipe_In, two on the link pipeline), so ROOM_MIN = 4 keeps the
// buffer from ever overflowing; the assertion checks it.
//
// One buffer of 8 packets, Pipe_In and Spec_Dem follow the design
// description; the room flag stands in for credit counting and is this
// design's choice, as are ROOM_MIN and the direct Pipe_In to SA-L path.
module input_unit
  import ssmart_pkg::*;
#(
  parameter int unsigned DEPTH    = 8,
  parameter int unsigned ROOM_MIN = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t link_in,
  input  logic  byp_take,
  input  logic  spec_take,
  output flit_t pipe_out,
  output flit_t head,
  input  logic  pop,
  output logic  room,
  output logic  nonempty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  flit_t         pipe_q;
  flit_t         mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic [CW-1:0] cnt_q;

  logic empty, wr, rd, from_pipe;

  assign empty     = (cnt_q == '0);
  assign from_pipe = empty && pipe_q.valid && !spec_take;
  assign pipe_out  = pipe_q;

  always_comb begin
    if (!empty)         head = mem[rd_q];
    else if (from_pipe) head = pipe_q;
    else                head = '0;
  end

  assign rd = pop && !empty;
  assign wr = pipe_q.valid && !spec_take && !(from_pipe && pop);

  assign room     = (int'(DEPTH) - int'(cnt_q)) >= int'(ROOM_MIN);
  assign nonempty = !empty;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] a);
    return (int'(a) == DEPTH - 1) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe_q <= '0;
      rd_q   <= '0;
      wr_q   <= '0;
      cnt_q  <= '0;
    end else begin
      pipe_q <= (link_in.valid && !byp_take) ? link_in : '0;
      if (wr) wr_q <= inc(wr_q);
      if (rd) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + CW'(wr) - CW'(rd);
    end
  end

  always_ff @(posedge clk) begin
    if (wr) mem[wr_q] <= pipe_q;
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr |-> (int'(cnt_q) < DEPTH || rd))
    else $error("input_unit: buffer overflow");
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head.valid)
    else $error("input_unit: pop without a flit");

endmodule
