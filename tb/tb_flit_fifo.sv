// tb_flit_fifo: self-checking test of flit_fifo.
// Random pushes and pops against a queue model check order, data and flit
// type; a full buffer must refuse input; a flit pushed into an empty buffer
// must be visible one clock later; a stream with the output always ready must
// pass one flit per clock.
module tb_flit_fifo;
  import noc_pkg::*;

  localparam int unsigned DEPTH = 2;

  logic  clk = 0, rst_n = 0;
  flit_t in_flit, out_flit;
  logic  in_ack, out_ack;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  flit_fifo #(.DEPTH(DEPTH)) dut (.*);

  flit_t q[$];

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic flit_t rand_flit();
    flit_t f;
    int t;
    f = '0;
    t = $urandom_range(0, 2);
    f.rh = (t == 0); f.ri = (t == 1); f.re = (t == 2);
    f.data = $urandom;
    return f;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, got;
    in_flit = '0; out_ack = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!flit_valid(out_flit), "empty after reset");
    check(in_ack, "ready after reset");

    // latency: push one flit into an empty buffer
    in_flit = rand_flit();
    q.push_back(in_flit);
    @(negedge clk);
    in_flit = '0;
    check(flit_valid(out_flit) && out_flit == q[0], "flit visible one clock after push");

    // fill to DEPTH and check that it refuses more
    for (int i = 1; i < DEPTH; i++) begin
      in_flit = rand_flit();
      q.push_back(in_flit);
      @(negedge clk);
    end
    in_flit = '0;
    check(!in_ack, "full buffer drops in_ack");
    // drain
    out_ack = 1;
    while (q.size() > 0) begin
      check(out_flit == q.pop_front(), "drain order");
      @(negedge clk);
    end
    out_ack = 0;
    check(!flit_valid(out_flit), "empty after drain");

    // streaming throughput: 50 flits with the output always ready
    out_ack = 1;
    cyc = 0; got = 0;
    for (int i = 0; i < 50; i++) q.push_back(rand_flit());
    begin
      int sent;
      sent = 0;
      while (got < 50) begin
        in_flit = (sent < 50) ? q[sent] : '0;
        @(posedge clk);
        if (flit_valid(out_flit)) begin
          check(out_flit == q[got], "stream data");
          got++;
        end
        if (flit_valid(in_flit) && in_ack) sent++;
        cyc++;
        @(negedge clk);
      end
    end
    in_flit = '0;
    check(cyc == 51, $sformatf("50 flits streamed in %0d clocks, expected 51", cyc));
    q.delete();

    // random traffic
    for (int i = 0; i < 3000; i++) begin
      in_flit = ($urandom_range(0, 1) == 1) ? rand_flit() : '0;
      out_ack = $urandom_range(0, 1);
      @(posedge clk);
      check(in_ack == (q.size() < DEPTH), "random: in_ack follows occupancy");
      if (flit_valid(out_flit) && out_ack) begin
        check(q.size() > 0 && out_flit == q[0], "random: order and content");
        if (q.size() > 0) void'(q.pop_front());
      end
      if (flit_valid(in_flit) && in_ack) q.push_back(in_flit);
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
