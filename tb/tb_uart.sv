// tb_uart: self-checking test of the uart with 16 clocks per bit.
// Transmit: a write of a random byte must produce start bit, 8 data bits LSB
// first and a stop bit, each 16 clocks long (sampled mid-bit here); a second
// write while busy must be held off (SCmdAccept low) until the line is idle.
// Receive: the testbench drives random bytes onto rx; a read of RXDATA must
// return {valid, byte} one clock after the command and clear valid; a frame
// with a bad stop bit must be discarded. STATUS shows tx busy.
module tb_uart;
  import noc_pkg::*;

  localparam int CPB = 16;

  logic        clk = 0, rst_n = 0;
  logic [2:0]  m_cmd;
  logic [31:0] m_addr, m_data, s_data;
  logic        s_cmd_accept;
  logic [1:0]  s_resp;
  logic        rx, tx;
  int          checks = 0, failures = 0;
  int          n_held = 0;

  always #5 clk = ~clk;

  uart #(.CLKS_PER_BIT(CPB)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ocp_read(int reg_no, output logic [31:0] d);
    m_cmd = 3'd2; m_addr = 32'(reg_no << 2);
    #1; check(s_cmd_accept, "read accepted at once");
    @(negedge clk);
    m_cmd = 0;
    #1; check(s_resp == 2'b01, "read answered with DVA one clock later");
    d = s_data;
    @(negedge clk);
  endtask

  task automatic drive_rx(logic [7:0] b, bit good_stop);
    logic [9:0] frame;
    frame = {good_stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rx = frame[i];
      repeat (CPB) @(negedge clk);
    end
    rx = 1;
    repeat (CPB) @(negedge clk);
  endtask

  initial begin
    logic [31:0] d;
    m_cmd = 0; m_addr = 0; m_data = 0; rx = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(tx == 1'b1, "line idles high");

    for (int t = 0; t < 20; t++) begin
      logic [7:0] b;
      int start_t;
      b = 8'($urandom);
      m_cmd = 3'd1; m_addr = 32'h0; m_data = {24'($urandom), b};
      #1; check(s_cmd_accept, "write to idle transmitter accepted");
      @(negedge clk);
      // offer the next write at once: it must be held off
      m_data = 32'hFF;
      #1; check(!s_cmd_accept, "write while busy held off");
      m_cmd = 0;
      // wait for start bit
      start_t = 0;
      while (tx == 1'b1 && start_t < 5) begin @(negedge clk); start_t++; end
      check(start_t <= 1, "start bit begins within a clock of acceptance");
      repeat (CPB / 2) @(negedge clk);
      check(tx == 1'b0, "start bit");
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        check(tx == b[i], $sformatf("data bit %0d", i));
      end
      repeat (CPB) @(negedge clk);
      check(tx == 1'b1, "stop bit");
      // status: still busy during stop bit
      m_cmd = 3'd1; m_addr = 32'h0; m_data = 32'h0;
      #1;
      if (!s_cmd_accept) n_held++;
      m_cmd = 0;
      repeat (CPB) @(negedge clk);
      ocp_read(2, d);
      check(d[0] == 1'b0, "transmitter idle after the stop bit");
    end

    for (int t = 0; t < 20; t++) begin
      logic [7:0] b;
      bit good;
      b = 8'($urandom);
      good = (t % 5 != 4);
      drive_rx(b, good);
      ocp_read(1, d);
      if (good) check(d == {23'b0, 1'b1, b}, "received byte with valid");
      else      check(d[8] == 1'b0, "frame with bad stop bit discarded");
      ocp_read(1, d);
      check(d[8] == 1'b0, "reading cleared valid");
    end
    check(n_held > 0, "write held off during stop bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
