// tb_merge4: self-checking test of merge4.
// One random channel at a time (or none) presents a random flit: the output
// must carry that flit's request wire and data, and only that channel may
// see the output acknowledge.
module tb_merge4;
  import noc_pkg::*;

  logic        clk = 0, rst_n = 0;
  flit_t [3:0] in_flit;
  logic  [3:0] in_ack;
  flit_t       out_flit;
  logic        out_ack;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  merge4 dut (.*);

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

  initial begin
    in_flit = '0; out_ack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      int ch, t;
      logic [31:0] d;
      @(negedge clk);
      ch = $urandom_range(0, 4);          // 4 = no channel active
      t  = $urandom_range(0, 2);
      d  = $urandom;
      for (int c = 0; c < 4; c++) begin
        in_flit[c] = '0;
        in_flit[c].data = $urandom;       // idle channels carry junk data
      end
      if (ch < 4) begin
        in_flit[ch].rh = (t == 0); in_flit[ch].ri = (t == 1); in_flit[ch].re = (t == 2);
        in_flit[ch].data = d;
      end
      out_ack = $urandom_range(0, 1);
      #1;
      if (ch < 4) begin
        check(out_flit.rh == (t == 0) && out_flit.ri == (t == 1) && out_flit.re == (t == 2),
              "output request wire");
        check(out_flit.data == d, "output data from active channel");
        check(in_ack == (out_ack ? 4'(1 << ch) : 4'b0), "ack only to active channel");
      end else begin
        check(!out_flit.rh && !out_flit.ri && !out_flit.re, "no request when idle");
        check(in_ack == '0, "no ack when idle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
