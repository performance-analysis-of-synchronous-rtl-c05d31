// tb_input_port: self-checking test of input_port.
// Random packets (header, 0..3 intermediate flits, end) are offered with
// random acknowledges on the four channels. Each flit must appear on exactly
// the channel named by the header's top two bits, with the header rotated
// left by two and other flits unchanged, and in_ack must be that channel's
// acknowledge.
module tb_input_port;
  import noc_pkg::*;

  logic        clk = 0, rst_n = 0;
  flit_t       in_flit;
  logic        in_ack;
  flit_t [3:0] out_flit;
  logic  [3:0] out_ack;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  input_port dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Offer one flit until acknowledged, checking the outputs every clock.
  task automatic send(flit_t f, int ch, logic [31:0] expect_data);
    bit done;
    done = 0;
    while (!done) begin
      in_flit = f;
      out_ack = 4'($urandom);
      #1;
      for (int c = 0; c < 4; c++) begin
        check(out_flit[c].rh == (f.rh && c == ch), $sformatf("rh on channel %0d", c));
        check(out_flit[c].ri == (f.ri && c == ch), $sformatf("ri on channel %0d", c));
        check(out_flit[c].re == (f.re && c == ch), $sformatf("re on channel %0d", c));
      end
      check(out_flit[ch].data == expect_data, "data on selected channel");
      check(in_ack == out_ack[ch], "in_ack is the selected channel's ack");
      @(posedge clk);
      done = in_ack;
      @(negedge clk);
    end
    in_flit = '0;
  endtask

  initial begin
    in_flit = '0; out_ack = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 0; p < 300; p++) begin
      flit_t f;
      logic [31:0] hdr;
      int ch, n_int;
      hdr = $urandom;
      ch  = int'(hdr[31:30]);
      f = '0; f.rh = 1; f.data = hdr;
      send(f, ch, {hdr[29:0], hdr[31:30]});
      n_int = $urandom_range(0, 3);
      for (int i = 0; i < n_int; i++) begin
        f = '0; f.ri = 1; f.data = $urandom;
        send(f, ch, f.data);
      end
      f = '0; f.re = 1; f.data = $urandom;
      send(f, ch, f.data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
