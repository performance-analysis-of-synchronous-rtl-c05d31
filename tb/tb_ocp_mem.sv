// tb_ocp_mem: self-checking test of ocp_mem with a 64-word memory. Every
// word is first written whole; then a random mix of idle cycles, writes with
// random byte enables and reads runs against a reference array. Each cycle
// checks that the command is accepted, that SResp is DVA exactly in the
// clock after a read and NULL otherwise, and that read data equals the
// reference word. Address bits outside the word index are randomised and
// must be ignored.
module tb_ocp_mem;
  import noc_pkg::*;

  localparam int WORDS = 64;

  logic        clk = 0, rst_n = 0;
  logic [2:0]  m_cmd;
  logic [31:0] m_addr, m_data;
  logic [3:0]  m_byteen;
  logic        s_cmd_accept;
  logic [1:0]  s_resp;
  logic [31:0] s_data;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  ocp_mem #(.WORDS(WORDS)) dut (.*);

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

  logic [31:0] ref_mem [WORDS];
  bit          exp_rd;
  logic [31:0] exp_data;

  // one command per clock, driven after the falling edge; the response to
  // the previous command is checked in the same clock
  task automatic cycle(logic [2:0] cmd, int w, logic [31:0] d, logic [3:0] be);
    m_cmd    = cmd;
    m_addr   = $urandom;
    m_addr[7:2] = 6'(w);
    m_data   = d;
    m_byteen = be;
    #1;
    if (cmd != OCP_IDLE) check(s_cmd_accept, "command accepted at once");
    if (exp_rd) begin
      check(s_resp == OCP_DVA, "DVA in the clock after a read");
      check(s_data == exp_data, $sformatf("read data %h, expected %h", s_data, exp_data));
    end else
      check(s_resp == OCP_NULL, "no response without a read");
    @(posedge clk);
    exp_rd = (cmd == OCP_RD);
    if (cmd == OCP_RD) exp_data = ref_mem[w];
    if (cmd == OCP_WR)
      for (int b = 0; b < 4; b++)
        if (be[b]) ref_mem[w][8*b +: 8] = d[8*b +: 8];
    @(negedge clk);
  endtask

  initial begin
    m_cmd = OCP_IDLE; m_addr = '0; m_data = '0; m_byteen = '0;
    exp_rd = 0; exp_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) cycle(OCP_WR, w, $urandom, 4'hF);
    for (int w = 0; w < WORDS; w++) cycle(OCP_RD, w, '0, 4'hF);
    for (int i = 0; i < 3000; i++) begin
      int k;
      k = $urandom_range(0, 3);
      if (k == 0)      cycle(OCP_IDLE, $urandom_range(0, WORDS - 1), $urandom, 4'($urandom));
      else if (k == 1) cycle(OCP_WR, $urandom_range(0, WORDS - 1), $urandom, 4'($urandom));
      else             cycle(OCP_RD, $urandom_range(0, WORDS - 1), $urandom, 4'($urandom));
    end
    cycle(OCP_IDLE, 0, '0, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
