// tb_traffic_source: self-checking test of traffic_source at its default
// size (100 packets of 4 flits). Nothing may be sent before start. Every flit
// must have the expected type and data (header = ROUTE, then {packet, flit}),
// the address may only advance on an acknowledge, done must rise after the
// last flit, and with the port always ready the 400 flits must take exactly
// 400 clocks once random stalls are subtracted.
module tb_traffic_source;
  import noc_pkg::*;

  localparam int NP = 100, FP = 4;
  localparam logic [31:0] RT = 32'h5A00_0000;

  logic  clk = 0, rst_n = 0;
  logic  start, out_ack, done;
  flit_t out_flit;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  traffic_source dut (.*);

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
    int k, cyc, stalls;
    start = 0; out_ack = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) begin @(negedge clk); check(!flit_valid(out_flit) && !done, "silent before start"); end
    start = 1;
    @(negedge clk);
    start = 0;
    k = 0; cyc = 0; stalls = 0;
    while (!done && cyc < 2000) begin
      int p, f;
      p = k / FP; f = k % FP;
      out_ack = ($urandom_range(0, 4) != 0);
      #1;
      check(out_flit.rh == (f == 0) && out_flit.ri == (f != 0 && f != FP - 1) &&
            out_flit.re == (f == FP - 1), "flit type");
      check(out_flit.data == ((f == 0) ? RT : {16'(p), 16'(f)}), "flit data");
      @(posedge clk);
      if (out_ack) k++; else stalls++;
      cyc++;
      @(negedge clk);
    end
    check(k == NP * FP, $sformatf("%0d flits sent, expected %0d", k, NP * FP));
    check(cyc - stalls == NP * FP, "one flit per acknowledged clock");
    check(done && !flit_valid(out_flit), "done and silent after the last flit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
