// tb_output_port: self-checking test of output_port.
// Four sources send random-length packets (header, 0..3 intermediate flits,
// end) at random times into the four input channels while the output is
// acknowledged at random. Every flit carries {source, packet number, flit
// number}. At the output, packets must never interleave, must arrive whole
// and in order per source, and every packet sent must arrive. A header
// offered to an idle output must pass in the same clock. The test counts how
// often several headers competed for the output and fails if that never
// happened.
module tb_output_port;
  import noc_pkg::*;

  localparam int PKTS = 150;

  logic        clk = 0, rst_n = 0;
  flit_t [3:0] in_flit;
  logic  [3:0] in_ack;
  flit_t       out_flit;
  logic        out_ack;
  int          checks = 0, failures = 0;
  int          contention = 0;

  always #5 clk = ~clk;

  output_port dut (.*);

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

  // source state
  int  s_pkt [4];
  int  s_idx [4];
  int  s_len [4];   // flits in current packet
  bit  s_on  [4];

  function automatic logic [31:0] tag(int s, int p, int f);
    return {2'(s), 14'(p), 16'(f)};
  endfunction

  // sink state
  int  cur_src, cur_pkt, cur_idx;
  bit  in_pkt;
  int  next_pkt [4];
  int  received;

  initial begin
    in_flit = '0; out_ack = 0;
    for (int s = 0; s < 4; s++) begin s_pkt[s] = 0; s_idx[s] = 0; s_on[s] = 0; next_pkt[s] = 0; end
    in_pkt = 0; received = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // idle output: header passes in the same clock
    in_flit[2] = '0; in_flit[2].rh = 1; in_flit[2].data = 32'h1234_5678;
    out_ack = 1; #1;
    check(out_flit.rh && out_flit.data == 32'h1234_5678 && in_ack == 4'b0100,
          "header passes an idle output in the same clock");
    @(negedge clk);
    in_flit[2] = '0; in_flit[2].re = 1; in_flit[2].data = 32'h0;
    #1;
    check(out_flit.re && in_ack == 4'b0100, "end flit follows its header");
    @(negedge clk);
    in_flit = '0;
    @(negedge clk);

    while (received < 4 * PKTS) begin
      int hdrs;
      // drive sources
      for (int s = 0; s < 4; s++) begin
        in_flit[s] = '0;
        if (!s_on[s] && s_pkt[s] < PKTS && $urandom_range(0, 2) == 0) begin
          s_on[s] = 1; s_idx[s] = 0; s_len[s] = $urandom_range(2, 5);
        end
        if (s_on[s]) begin
          in_flit[s].rh = (s_idx[s] == 0);
          in_flit[s].re = (s_idx[s] == s_len[s] - 1);
          in_flit[s].ri = !in_flit[s].rh && !in_flit[s].re;
          in_flit[s].data = tag(s, s_pkt[s], s_idx[s]);
        end
      end
      out_ack = ($urandom_range(0, 3) != 0);
      hdrs = 0;
      for (int s = 0; s < 4; s++) hdrs += int'(in_flit[s].rh);
      if (hdrs > 1) contention++;
      @(posedge clk);
      // sink
      if (flit_valid(out_flit) && out_ack) begin
        int s, p, f;
        s = int'(out_flit.data[31:30]); p = int'(out_flit.data[29:16]); f = int'(out_flit.data[15:0]);
        if (out_flit.rh) begin
          check(!in_pkt, "header only between packets");
          check(f == 0 && p == next_pkt[s], "header is the next packet of its source");
          in_pkt = 1; cur_src = s; cur_pkt = p; cur_idx = 0;
        end else begin
          check(in_pkt && s == cur_src && p == cur_pkt && f == cur_idx + 1,
                "flit belongs to the packet that owns the output");
          cur_idx = f;
          if (out_flit.re) begin
            in_pkt = 0; next_pkt[s]++; received++;
          end
        end
      end
      // source progress
      for (int s = 0; s < 4; s++)
        if (flit_valid(in_flit[s]) && in_ack[s]) begin
          s_idx[s]++;
          if (s_idx[s] == s_len[s]) begin s_on[s] = 0; s_pkt[s]++; end
        end
      @(negedge clk);
    end
    for (int s = 0; s < 4; s++) check(next_pkt[s] == PKTS, "all packets of every source delivered");
    check(contention > 0, "competing headers occurred");
    $display("output_port: %0d clocks with competing headers", contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
