// Self-checking test of SA-L. Random head flits, routes and lengths are
// applied to the five inputs. A reference model with one round-robin
// pointer per output checks every cycle which input wins each output, the
// pop of each input and the count of losing requests. Flits on a mesh
// output with length 0 (no room ahead) must not request.
module tb_sa_l;
  import ssmart_pkg::*;
  logic  clk = 1'b0, rst_n;
  flit_t head     [NPORT];
  port_t route    [NPORT];
  len_t  len      [NPORT];
  logic  pop      [NPORT];
  logic  win_valid[NPORT];
  port_t win_idx  [NPORT];
  logic [2:0] lost;
  int checks = 0, failures = 0;

  sa_l dut (.*);
  always #5 clk = ~clk;

  int m_last [NPORT];

  initial begin
    bit req [NPORT];
    int w   [NPORT];
    int nl;
    bit exp_pop [NPORT];
    rst_n = 0;
    for (int i = 0; i < NPORT; i++) begin
      head[i] = '0; route[i] = '0; len[i] = '0; m_last[i] = NPORT - 1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NPORT; i++) begin
        head[i] = '0;
        head[i].valid = ($urandom_range(3) != 0);
        head[i].head = 1'b1; head[i].tail = 1'b1;
        head[i].data = $urandom;
        route[i] = port_t'($urandom_range(4));
        len[i]   = len_t'($urandom_range(3));
        req[i]   = head[i].valid && (route[i] == P_L || len[i] != 0);
        exp_pop[i] = 0;
      end
      #1;
      nl = 0;
      for (int o = 0; o < NPORT; o++) begin
        w[o] = -1;
        for (int k = 1; k <= NPORT && w[o] < 0; k++) begin
          int i;
          i = (m_last[o] + k) % NPORT;
          if (req[i] && route[i] == port_t'(o)) w[o] = i;
        end
        checks++;
        if ((w[o] < 0) ? win_valid[o] : (!win_valid[o] || win_idx[o] != port_t'(w[o]))) begin
          failures++;
          if (failures < 10) $display("FAIL: output %0d winner %0d expected %0d", o, win_idx[o], w[o]);
        end
        if (w[o] >= 0) exp_pop[w[o]] = 1;
      end
      for (int i = 0; i < NPORT; i++) begin
        checks++;
        if (pop[i] != exp_pop[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: pop[%0d]", i);
        end
        if (req[i] && !exp_pop[i]) nl++;
      end
      checks++;
      if (int'(lost) != nl) begin
        failures++;
        if (failures < 10) $display("FAIL: lost %0d expected %0d", lost, nl);
      end
      @(posedge clk);
      for (int o = 0; o < NPORT; o++) if (w[o] >= 0) m_last[o] = w[o];
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
