// tb_router: self-checking test of the five-port router.
// Directed part: a two-flit packet through an idle router must appear at the
// chosen output two clocks after it was accepted, and a 40-flit packet must
// stream out at one flit per clock.
// Random part: all five inputs send packets of 2..6 flits with random route
// codes while outputs are acknowledged at random. The expected output of
// each packet is worked out from the routing rule (code = output side, or
// Local when the code names the input's own side; from Local, code = side).
// Each output must deliver, per input, the packets in order, whole and not
// interleaved, with the header rotated left by two bits. Back-pressure
// (an output holding a flit that is not acknowledged) and competition of two
// inputs for one output are counted and must both occur.
module tb_router;
  import noc_pkg::*;

  localparam int PKTS = 120;

  logic        clk = 0, rst_n = 0;
  flit_t [4:0] in_flit, out_flit;
  logic  [4:0] in_ack, out_ack;
  int          checks = 0, failures = 0;
  int          n_stall = 0, n_compete = 0;

  always #5 clk = ~clk;

  router dut (.*);

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

  function automatic int exp_out(int p, int code);
    if (p == 4) return code;
    return (code == p) ? 4 : code;
  endfunction

  // expected flits per (output, input), as queues of data words
  logic [31:0] expq [5][5][$];
  // source state
  int s_pkt[5], s_idx[5], s_len[5], s_code[5];
  bit s_on[5];
  logic [31:0] s_hdr[5];
  // sink state: which input owns each output's current packet
  int  own [5];
  bit  busy [5];
  int  delivered;
  int  route_busy [5];   // packets in flight per output from more than one input

  initial begin
    in_flit = '0; out_ack = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- latency: header from West (3) with code East (1) ----
    in_flit[3] = '0; in_flit[3].rh = 1; in_flit[3].data = 32'h4000_0001;
    #1;
    check(in_ack[3], "idle router accepts the header");
    @(posedge clk); #1;            // accepted at this edge (cycle 0)
    in_flit[3] = '0; in_flit[3].re = 1; in_flit[3].data = 32'hE0E0_E0E0;
    check(!flit_valid(out_flit[1]), "nothing out after 1 clock");
    @(posedge clk); #1;
    in_flit[3] = '0;
    check(out_flit[1].rh && out_flit[1].data == 32'h0000_0005,
          "header out after 2 clocks, rotated left by two");
    @(posedge clk); #1;
    check(out_flit[1].re && out_flit[1].data == 32'hE0E0_E0E0, "end flit one clock later");
    repeat (3) @(posedge clk);

    // ---- throughput: 40-flit packet South(2) input -> code West(3) ----
    @(negedge clk);
    begin
      int sent, got, first, last, cyc;
      sent = 0; got = 0; first = -1; last = -1; cyc = 0;
      while (got < 40) begin
        in_flit[2] = '0;
        if (sent < 40) begin
          in_flit[2].rh = (sent == 0); in_flit[2].re = (sent == 39);
          in_flit[2].ri = (sent != 0 && sent != 39);
          in_flit[2].data = (sent == 0) ? 32'hC000_0000 : 32'(sent);
        end
        @(posedge clk);
        if (flit_valid(in_flit[2]) && in_ack[2]) sent++;
        if (flit_valid(out_flit[3])) begin
          if (first < 0) first = cyc;
          last = cyc; got++;
        end
        cyc++;
        @(negedge clk);
      end
      in_flit[2] = '0;
      check(last - first == 39, $sformatf("40 flits leave in %0d clocks, expected 40", last - first + 1));
    end
    repeat (4) @(negedge clk);

    // ---- random traffic ----
    for (int p = 0; p < 5; p++) begin s_pkt[p] = 0; s_on[p] = 0; busy[p] = 0; end
    delivered = 0;
    while (delivered < 5 * PKTS) begin
      int want [5];
      for (int q = 0; q < 5; q++) want[q] = 0;
      for (int p = 0; p < 5; p++) begin
        in_flit[p] = '0;
        if (!s_on[p] && s_pkt[p] < PKTS && $urandom_range(0, 3) == 0) begin
          logic [31:0] r;
          s_on[p] = 1; s_idx[p] = 0; s_len[p] = $urandom_range(2, 6);
          s_code[p] = $urandom_range(0, 3);
          r = $urandom;
          s_hdr[p] = {2'(s_code[p]), 3'(p), 11'(s_pkt[p]), r[15:0]};
        end
        if (s_on[p]) begin
          in_flit[p].rh = (s_idx[p] == 0);
          in_flit[p].re = (s_idx[p] == s_len[p] - 1);
          in_flit[p].ri = !in_flit[p].rh && !in_flit[p].re;
          in_flit[p].data = (s_idx[p] == 0) ? s_hdr[p] : {3'(p), 13'(s_pkt[p]), 16'(s_idx[p])};
          want[exp_out(p, s_code[p])]++;
        end
      end
      for (int q = 0; q < 5; q++) if (want[q] > 1) n_compete++;
      for (int q = 0; q < 5; q++) out_ack[q] = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      for (int q = 0; q < 5; q++) begin
        if (flit_valid(out_flit[q]) && !out_ack[q]) n_stall++;
        if (flit_valid(out_flit[q]) && out_ack[q]) begin
          if (out_flit[q].rh) begin
            int src;
            src = int'(out_flit[q].data[31:29]);
            check(!busy[q], "header only between packets");
            check(src < 5 && expq[q][src].size() > 0, "header expected at this output");
            if (src < 5 && expq[q][src].size() > 0)
              check(out_flit[q].data == expq[q][src].pop_front(), "rotated header");
            busy[q] = 1; own[q] = src;
          end else begin
            check(busy[q] && expq[q][own[q]].size() > 0, "body flit inside a packet");
            if (busy[q] && expq[q][own[q]].size() > 0)
              check(out_flit[q].data == expq[q][own[q]].pop_front(), "body flit data and order");
            if (out_flit[q].re) begin busy[q] = 0; delivered++; end
          end
        end
      end
      for (int p = 0; p < 5; p++)
        if (flit_valid(in_flit[p]) && in_ack[p]) begin
          int q;
          q = exp_out(p, s_code[p]);
          if (s_idx[p] == 0) expq[q][p].push_back({s_hdr[p][29:0], s_hdr[p][31:30]});
          else               expq[q][p].push_back(in_flit[p].data);
          s_idx[p]++;
          if (s_idx[p] == s_len[p]) begin s_on[p] = 0; s_pkt[p]++; end
        end
      @(negedge clk);
    end
    for (int q = 0; q < 5; q++)
      for (int p = 0; p < 5; p++) check(expq[q][p].size() == 0, "nothing left undelivered");
    check(n_stall > 0, "back-pressure occurred");
    check(n_compete > 0, "competition for an output occurred");
    $display("router: %0d packets, %0d stalled output clocks, %0d clocks with competition",
             delivered, n_stall, n_compete);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
