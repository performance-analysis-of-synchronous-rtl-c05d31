// tb_slave_na: self-checking test of slave_na.
// Random write and read request packets are fed in. The testbench plays the
// slave core: it accepts each command after a random delay (0..4 clocks) and
// answers reads after a further random delay. The OCP command must carry the
// packet's MCmd, MByteEn, MAddr and MData, be held until accepted, and be
// issued once. A read must produce a response packet header / SResp / SData,
// whose header is the return route the request carried. The response side
// is acknowledged at random. Delayed acceptance and delayed responses are
// counted and must occur.
module tb_slave_na;
  import noc_pkg::*;

  logic        clk = 0, rst_n = 0;
  flit_t       req_flit, rsp_flit;
  logic        req_ack, rsp_ack;
  logic [2:0]  m_cmd;
  logic [31:0] m_addr, m_data, s_data;
  logic [3:0]  m_byteen;
  logic        s_cmd_accept;
  logic [1:0]  s_resp;
  int          checks = 0, failures = 0;
  int          n_delay_acc = 0, n_delay_rsp = 0;

  always #5 clk = ~clk;

  slave_na dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(int t, logic [31:0] d);
    req_flit = '0;
    req_flit.rh = (t == 0); req_flit.ri = (t == 1); req_flit.re = (t == 2);
    req_flit.data = d;
    #1;
    while (!req_ack) begin @(negedge clk); #1; end
    @(negedge clk);
    req_flit = '0;
  endtask

  initial begin
    req_flit = '0; s_cmd_accept = 0; s_resp = 0; s_data = 0; rsp_ack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      bit rd;
      logic [31:0] a, d, ret;
      logic [3:0]  be;
      int dly;
      rd = $urandom_range(0, 1);
      a = $urandom; d = $urandom; be = 4'($urandom); ret = $urandom;
      #1;
      check(m_cmd == 3'd0, "no command while collecting");
      put(0, $urandom);
      put(1, {25'b0, (rd ? 3'd2 : 3'd1), be});
      put(1, a);
      put(2, rd ? ret : d);
      // slave core: delayed accept
      dly = $urandom_range(0, 4);
      if (dly > 0) n_delay_acc++;
      for (int k = 0; k < dly; k++) begin
        #1; check(m_cmd == (rd ? 3'd2 : 3'd1), "command held until accepted");
        @(negedge clk);
      end
      #1;
      check(m_cmd == (rd ? 3'd2 : 3'd1) && m_addr == a && m_byteen == be, "OCP command fields");
      if (!rd) check(m_data == d, "OCP write data");
      s_cmd_accept = 1;
      @(negedge clk);
      s_cmd_accept = 0;
      #1;
      check(m_cmd == 3'd0, "command issued once");
      if (rd) begin
        logic [31:0] rdata;
        logic [1:0]  rc;
        flit_t got[3];
        int k;
        dly = $urandom_range(0, 4);
        if (dly > 0) n_delay_rsp++;
        repeat (dly) @(negedge clk);
        rdata = $urandom;
        rc = ($urandom_range(0, 3) == 0) ? 2'b11 : 2'b01;
        s_resp = rc; s_data = rdata;
        @(negedge clk);
        s_resp = 0; s_data = 0;
        k = 0;
        while (k < 3) begin
          rsp_ack = $urandom_range(0, 1);
          @(posedge clk);
          if (flit_valid(rsp_flit) && rsp_ack) begin got[k] = rsp_flit; k++; end
          @(negedge clk);
        end
        rsp_ack = 0;
        check(got[0].rh && got[1].ri && got[2].re, "response flit types H,I,E");
        check(got[0].data == ret, "response header is the carried return route");
        check(got[1].data == {30'b0, rc}, "response control flit = SResp");
        check(got[2].data == rdata, "response data = SData");
      end
    end
    check(n_delay_acc > 0 && n_delay_rsp > 0, "delayed accept and delayed response occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
