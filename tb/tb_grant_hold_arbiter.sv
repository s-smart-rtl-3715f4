// Self-checking test of the grant-hold round-robin arbiter (N = 5).
// Random requests and packet framings are compared cycle by cycle with a
// reference model: rotating priority after the last winner, a lock on a
// head-not-tail grant that admits only the locked requester, release on a
// tail grant or on abort. The test also checks that a 3-flit packet wins
// three consecutive cycles against competing requests.
module tb_grant_hold_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst_n;
  logic [N-1:0] req, head_in, tail_in, gnt;
  logic abort, gnt_valid, locked;
  logic [2:0] gnt_idx;
  int checks = 0, failures = 0;

  grant_hold_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  // reference state
  int  m_last;
  bit  m_lock;
  int  exp_i;

  function automatic int ref_grant();
    if (m_lock) return req[m_last] ? m_last : -1;
    for (int k = 1; k <= N; k++)
      if (req[(m_last + k) % N]) return (m_last + k) % N;
    return -1;
  endfunction

  initial begin
    rst_n = 0; req = 0; head_in = 0; tail_in = 0; abort = 0;
    m_last = N - 1; m_lock = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: a 3-flit packet from requester 2 holds the output
    for (int c = 0; c < 3; c++) begin
      @(negedge clk);
      req = 5'b11111;
      head_in = (c == 0) ? 5'b11111 : 5'b00000;
      tail_in = (c == 2) ? 5'b11111 : 5'b00000;
      if (c == 0) req = 5'b00100;
      #1;
      checks++;
      if (!(gnt_valid && gnt_idx == 2)) begin
        failures++;
        $display("FAIL: packet flit %0d not granted to 2 (gnt=%b)", c, gnt);
      end
      @(posedge clk);
      m_last = 2; m_lock = (c < 2);
    end
    // random
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      req     = N'($urandom);
      head_in = N'($urandom);
      tail_in = N'($urandom) | N'($urandom);
      abort   = ($urandom_range(19) == 0);
      #1;
      exp_i = ref_grant();
      checks++;
      if ((exp_i < 0 && gnt_valid) || (exp_i >= 0 && (!gnt_valid || gnt_idx != 3'(exp_i) ||
          gnt != N'(1 << exp_i))) || locked != m_lock) begin
        failures++;
        if (failures < 10)
          $display("FAIL: cycle %0d req=%b exp=%0d got=%b lock=%b/%b",
                   c, req, exp_i, gnt, locked, m_lock);
      end
      @(posedge clk);
      if (exp_i >= 0) begin
        m_last = exp_i;
        if (tail_in[exp_i]) m_lock = 0;
        else if (head_in[exp_i]) m_lock = 1;
      end
      if (abort) m_lock = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
