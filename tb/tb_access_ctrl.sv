// tb_access_ctrl: self-checking test of access_ctrl with the mutex grant
// driven by the testbench.
// Checks: a header raises m_req; nothing passes without the grant; with the
// grant the header, intermediate and end flits pass with the output
// acknowledge returned; m_req stays high through the packet and is low for
// exactly one clock after the end flit; a stray intermediate flit outside a
// packet is not passed.
module tb_access_ctrl;
  import noc_pkg::*;

  logic  clk = 0, rst_n = 0;
  flit_t in_flit, out_flit;
  logic  in_ack, out_ack, m_req, m_grant;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  access_ctrl dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int t, logic [31:0] d);
    flit_t f;
    f = '0; f.rh = (t == 0); f.ri = (t == 1); f.re = (t == 2); f.data = d;
    return f;
  endfunction

  initial begin
    in_flit = '0; out_ack = 0; m_grant = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!m_req, "no request when idle");
    in_flit = mk(1, 32'h1111);
    m_grant = 1; out_ack = 1; #1;
    check(!m_req && !flit_valid(out_flit) && !in_ack, "stray intermediate flit blocked");
    m_grant = 0;
    for (int pkt = 0; pkt < 200; pkt++) begin
      int wait_cycles, n_int;
      logic [31:0] d;
      @(negedge clk);
      d = $urandom;
      in_flit = mk(0, d);
      wait_cycles = $urandom_range(0, 3);
      for (int w = 0; w < wait_cycles; w++) begin
        out_ack = 1; #1;
        check(m_req, "header raises m_req");
        check(!flit_valid(out_flit) && !in_ack, "header waits for grant");
        @(negedge clk);
      end
      m_grant = 1;
      n_int = $urandom_range(0, 3);
      for (int f = 0; f <= n_int + 1; f++) begin
        flit_t exp;
        bit sent;
        if (f > 0) begin
          d = $urandom;
          in_flit = mk((f == n_int + 1) ? 2 : 1, d);
        end
        exp = in_flit;
        sent = 0;
        while (!sent) begin
          out_ack = $urandom_range(0, 1); #1;
          check(m_req, "m_req held during packet");
          check(out_flit == exp, "flit passes unchanged");
          check(in_ack == out_ack, "ack returned");
          sent = out_ack;
          @(negedge clk);
        end
      end
      in_flit = (pkt % 2 == 0) ? mk(0, 32'hABCD) : '0;   // next header may wait already
      #1;
      check(!m_req, "m_req low for one clock after end flit");
      check(!flit_valid(out_flit), "nothing passes in release clock");
      m_grant = 0;
      in_flit = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
