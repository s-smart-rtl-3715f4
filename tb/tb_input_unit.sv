// Self-checking test of the input unit (DEPTH = 8, ROOM_MIN = 4).
// Random link flits, bypass and speculative-exit requests and SA-L pops are
// applied while a reference model tracks Pipe_In and the FIFO contents. Each
// cycle it checks the flit offered to SA-L, the Pipe_In output and the room
// flag. The stimulus only sends a flit when the model says there was room,
// as upstream routers do; a directed part fills the buffer and checks that
// a flit that lands in Pipe_In of an empty buffer is offered to SA-L in the
// next cycle.
module tb_input_unit;
  import ssmart_pkg::*;
  localparam int D = 8, RM = 4;
  logic  clk = 1'b0, rst_n;
  flit_t link_in, pipe_out, head;
  logic  byp_take, spec_take, pop, room, nonempty;
  int checks = 0, failures = 0;

  input_unit #(.DEPTH(D), .ROOM_MIN(RM)) dut (.*);
  always #5 clk = ~clk;

  flit_t q[$];
  flit_t m_pipe;
  flit_t exp_head;
  int    inflight;  // flits sent in the last two cycles

  function automatic flit_t rnd_flit();
    flit_t f;
    f = '0;
    f.valid = 1'b1; f.head = 1'b1; f.tail = 1'b1;
    f.dst_x = coord_t'($urandom); f.dst_y = coord_t'($urandom);
    f.data  = $urandom;
    return f;
  endfunction

  task automatic check_outputs();
    if (q.size() != 0)                      exp_head = q[0];
    else if (m_pipe.valid && !spec_take)    exp_head = m_pipe;
    else                                    exp_head = '0;
    checks++;
    if (head != exp_head || pipe_out != m_pipe ||
        room != ((D - q.size()) >= RM) || nonempty != (q.size() != 0)) begin
      failures++;
      if (failures < 10)
        $display("FAIL: head %h/%h pipe %h/%h room %b size %0d",
                 head, exp_head, pipe_out, m_pipe, room, q.size());
    end
  endtask

  task automatic step();
    @(posedge clk);
    // model update
    if (pop && q.size() != 0) void'(q.pop_front());
    if (m_pipe.valid && !spec_take && !(pop && q.size() == 0 && exp_head == m_pipe))
      q.push_back(m_pipe);
    m_pipe = (link_in.valid && !byp_take) ? link_in : '0;
  endtask

  initial begin
    logic was_room;
    rst_n = 0; link_in = '0; byp_take = 0; spec_take = 0; pop = 0;
    m_pipe = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: one flit flows from Pipe_In straight to SA-L
    @(negedge clk);
    link_in = rnd_flit();
    step();
    @(negedge clk);
    link_in = '0;
    #1;
    check_outputs();
    checks++;
    if (!head.valid || head != m_pipe) begin
      failures++; $display("FAIL: Pipe_In flit not offered to SA-L");
    end
    pop = 1;
    step();
    @(negedge clk);
    pop = 0;
    // random
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      was_room  = room;
      link_in   = (was_room && $urandom_range(9) < 6) ? rnd_flit() : '0;
      byp_take  = link_in.valid && ($urandom_range(4) == 0);
      spec_take = m_pipe.valid && ($urandom_range(4) == 0);
      pop       = ($urandom_range(9) < ((c / 500) % 2 ? 7 : 3));
      #1;
      pop = pop && head.valid;
      #1;
      check_outputs();
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
