// tb_noc_top: end-to-end test of the 3x3 platform at its default parameters
// (115200-baud UARTs at 868 clocks per bit, 100-packet traffic source).
//
//  1. All nine CPU ports at once write a byte to the UART of the next node;
//     the serial lines are decoded here and must carry those bytes. Node 0
//     writes a second byte to the same UART straight away, which the UART
//     must hold off until the first has gone (delayed command acceptance).
//  2. Every node reads the STATUS register of the next node while it is
//     still transmitting (read request, response network, SResp = DVA).
//  3. Bytes are sent into every UART's rx line; every node reads the RXDATA
//     register of the node three further on and must get {valid, byte}.
//  3b. Every node writes whole words and a two-byte (MByteEn = 0011) word
//     into the memory two nodes on, reads them back, and reads that node's
//     UART status in between: the address decode behind the slave adapter.
//  4. Reads of the own node and of a node outside the mesh return ERR.
//  5. Test mode: the traffic source at node 0 sends 100 packets to the sink
//     at node 8; every captured flit is checked (the header arrives rotated
//     by two bits per router passed). The stream must run at one flit per
//     clock within a packet with one idle clock between packets.
// Mechanisms counted, each must occur: back-pressure on a request-network
// input, delayed acceptance at a UART, ERR responses, read responses, mode
// switch to the traffic generator.
module tb_noc_top;
  import noc_pkg::*;

  localparam int N = 9, CPB = 868, NP = 100, FP = 4;

  logic                 clk = 0, rst_n = 0;
  logic [N-1:0][2:0]    m_cmd;
  logic [N-1:0][31:0]   m_addr, m_data, s_data;
  logic [N-1:0][3:0]    m_byteen;
  logic [N-1:0]         s_cmd_accept;
  logic [N-1:0][1:0]    s_resp;
  logic [N-1:0]         uart_rx, uart_tx;
  logic                 tg_mode, tg_start, tg_done;
  logic [8:0]           sink_rd_addr;
  logic [33:0]          sink_rd_data;
  logic [15:0]          sink_flit_count, sink_pkt_count;
  int                   checks = 0, failures = 0;

  always #5 clk = ~clk;

  noc_top dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  longint cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_backpressure = 0, n_uart_hold = 0, n_err = 0, n_dva = 0, n_tg = 0, n_mem = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++)
      if (flit_valid(dut.rq_in[n]) && !dut.rq_in_ack[n]) n_backpressure++;
    if (dut.g_node[1].u_cmd == 3'd1 && !dut.g_node[1].u_accept) n_uart_hold++;
  end

  // ---------------- OCP master models, one per node ----------------
  // Commands are queued per node; a driver per node issues them one at a
  // time, holds each until accepted and, for reads, waits for the response,
  // which it appends to that node's response queue as {SResp, SData}.
  typedef struct {
    bit          rd;
    logic [31:0] a;
    logic [31:0] d;
    logic [3:0]  be;
  } cmd_t;

  cmd_t        cq [N][$];
  logic [33:0] rq [N][$];
  bit          pending [N];
  bit          accepted [N];

  always @(posedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (m_cmd[n] != 3'd0 && s_cmd_accept[n]) accepted[n] <= 1'b1;
      if (s_resp[n] != 2'b00) begin
        rq[n].push_back({s_resp[n], s_data[n]});
        pending[n] <= 1'b0;
        if (s_resp[n] == 2'b01) n_dva++;
        if (s_resp[n] == 2'b11) n_err++;
      end
    end
  end

  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (accepted[n]) begin
        m_cmd[n]    = 3'd0;
        accepted[n] = 1'b0;
      end
      if (m_cmd[n] == 3'd0 && !pending[n] && cq[n].size() > 0) begin
        cmd_t c;
        c = cq[n].pop_front();
        m_cmd[n]    = c.rd ? 3'd2 : 3'd1;
        m_addr[n]   = c.a;
        m_data[n]   = c.d;
        m_byteen[n] = c.be;
        pending[n]  = c.rd;
      end
    end
  end

  function automatic bit all_idle();
    for (int n = 0; n < N; n++)
      if (cq[n].size() > 0 || pending[n] || m_cmd[n] != 3'd0) return 0;
    return 1;
  endfunction

  function automatic cmd_t wr(int node, int reg_no, logic [31:0] d);
    cmd_t c;
    c.rd = 0; c.a = {4'(node), 24'h0, 4'(reg_no << 2)}; c.d = d; c.be = 4'hF;
    return c;
  endfunction

  function automatic cmd_t rd(int node, int reg_no);
    cmd_t c;
    c.rd = 1; c.a = {4'(node), 24'h0, 4'(reg_no << 2)}; c.d = '0; c.be = 4'hF;
    return c;
  endfunction

  // memory accesses: address bit 27 selects the memory at the target node
  function automatic cmd_t mwr(int node, int word, logic [31:0] d, logic [3:0] be);
    cmd_t c;
    c.rd = 0; c.a = {4'(node), 1'b1, 25'(word), 2'b00}; c.d = d; c.be = be;
    return c;
  endfunction

  function automatic cmd_t mrd(int node, int word);
    cmd_t c;
    c.rd = 1; c.a = {4'(node), 1'b1, 25'(word), 2'b00}; c.d = '0; c.be = 4'hF;
    return c;
  endfunction

  // ---------------- serial monitors and drivers ----------------
  logic [7:0] txq [N][$];
  for (genvar k = 0; k < N; k++) begin : g_mon
    initial begin
      logic [7:0] b;
      forever begin
        @(negedge uart_tx[k]);
        repeat (CPB + CPB / 2) @(posedge clk);
        for (int i = 0; i < 8; i++) begin
          b[i] = uart_tx[k];
          repeat (CPB) @(posedge clk);
        end
        check(uart_tx[k] == 1'b1, "stop bit on serial output");
        txq[k].push_back(b);
      end
    end
  end

  // ---------------- serial helpers ----------------
  task automatic uart_put(int k, logic [7:0] b);
    logic [9:0] fr;
    fr = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx[k] = fr[i];
      repeat (CPB) @(posedge clk);
    end
  endtask

  function automatic logic [31:0] rotl(logic [31:0] x, int bits);
    logic [31:0] y;
    y = x;
    for (int i = 0; i < bits; i++) y = {y[30:0], y[31]};
    return y;
  endfunction


  initial begin
    m_cmd = '0; m_addr = '0; m_data = '0; m_byteen = '0;
    uart_rx = '1; tg_mode = 0; tg_start = 0; sink_rd_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // ---- 1 and 2: writes to the next node's UART, status reads ----
    for (int n = 0; n < N; n++) begin
      cq[n].push_back(wr((n + 1) % N, 0, 32'h40 + 32'(n)));
      if (n == 0) cq[n].push_back(wr(1, 0, 32'h7E));
      cq[n].push_back(rd((n + 1) % N, 2));
    end
    @(negedge clk);
    while (!all_idle()) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      check(rq[n].size() == 1, "one status response");
      if (rq[n].size() > 0) begin
        logic [33:0] r;
        r = rq[n].pop_front();
        check(r[33:32] == 2'b01, "status read answered");
        check(r[0] == 1'b1, "status shows the transmitter busy");
      end
    end
    repeat (12 * CPB) @(posedge clk);   // let the second byte of UART 1 finish
    for (int k = 0; k < N; k++) begin
      check(txq[k].size() == ((k == 1) ? 2 : 1), $sformatf("UART %0d sent %0d bytes", k, txq[k].size()));
      if (txq[k].size() > 0)
        check(txq[k].pop_front() == 8'(32'h40 + 32'((k + N - 1) % N)),
              $sformatf("UART %0d sent the byte written to it", k));
    end
    check(txq[1].size() == 1 && txq[1][0] == 8'h7E, "second byte to UART 1 sent after the first");

    // ---- 3: receive path ----
    for (int k = 0; k < N; k++) begin
      fork
        automatic int kk = k;
        uart_put(kk, 8'hA0 + 8'(kk));
      join_none
    end
    repeat (11 * CPB) @(posedge clk);
    for (int n = 0; n < N; n++) cq[n].push_back(rd((n + 3) % N, 1));
    @(negedge clk);
    while (!all_idle()) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      int tgt;
      tgt = (n + 3) % N;
      check(rq[n].size() == 1, "one RXDATA response");
      if (rq[n].size() > 0)
        check(rq[n].pop_front() == {2'b01, 23'b0, 1'b1, 8'hA0 + 8'(tgt)},
              $sformatf("node %0d reads the byte received by UART %0d", n, tgt));
    end

    // ---- 3b: remote memories, whole-word and byte-enable writes ----
    for (int n = 0; n < N; n++) begin
      int tgt;
      tgt = (n + 2) % N;
      cq[n].push_back(mwr(tgt, 4 + n, 32'h1111_1111 * 32'(n + 1), 4'hF));
      cq[n].push_back(mwr(tgt, 200 + n, 32'hDEAD_BEEF, 4'hF));
      cq[n].push_back(mwr(tgt, 200 + n, 32'h0000_5A00 + 32'(n), 4'b0011));
      cq[n].push_back(mrd(tgt, 4 + n));
      cq[n].push_back(mrd(tgt, 200 + n));
      cq[n].push_back(rd(tgt, 2));   // UART status at the same node still answers
    end
    @(negedge clk);
    while (!all_idle()) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      check(rq[n].size() == 3, "three memory-phase responses");
      if (rq[n].size() == 3) begin
        logic [33:0] r;
        r = rq[n].pop_front();
        check(r == {2'b01, 32'h1111_1111 * 32'(n + 1)}, $sformatf("node %0d reads back a remote word", n));
        r = rq[n].pop_front();
        check(r == {2'b01, 16'hDEAD, 16'h5A00 + 16'(n)}, $sformatf("node %0d partial write kept the other bytes", n));
        r = rq[n].pop_front();
        check(r[33:32] == 2'b01, "UART status read between memory accesses");
        n_mem++;
      end
      rq[n].delete();
    end

    // ---- 4: unreachable targets ----
    cq[4].push_back(rd(4, 2));
    cq[2].push_back(rd(12, 2));
    @(negedge clk);
    while (!all_idle()) @(negedge clk);
    check(rq[4].size() == 1 && rq[4][0][33:32] == 2'b11, "read of own node gives ERR");
    check(rq[2].size() == 1 && rq[2][0][33:32] == 2'b11, "read outside the mesh gives ERR");

    // ---- 5: traffic generator, 100 packets node 0 -> node 8 ----
    repeat (10) @(negedge clk);
    tg_mode = 1; n_tg++;
    @(negedge clk);
    tg_start = 1;
    begin
      longint t0, t_first, t_last;
      t0 = cycle;
      t_first = -1; t_last = -1;
      @(negedge clk);
      tg_start = 0;
      while (sink_pkt_count < 16'(NP) && cycle - t0 < 10000) begin
        @(posedge clk);
        if (flit_valid(dut.rq_out[N-1]) && dut.rq_out_ack[N-1]) begin
          if (t_first < 0) t_first = cycle - t0;
          t_last = cycle - t0;
        end
      end
      check(tg_done, "source finished");
      check(sink_pkt_count == 16'(NP) && sink_flit_count == 16'(NP * FP), "sink received every packet");
      $display("noc_top: packet delivery ratio %0d/%0d", sink_pkt_count, NP);
      $display("noc_top: first flit reached the sink %0d clocks after start, %0d flits in %0d clocks",
               t_first, NP * FP, t_last - t_first + 1);
      // one flit per clock inside a packet, one idle clock between packets
      // (each output port's mutex is released and re-requested)
      check(t_last - t_first + 1 == NP * FP + NP - 1, "source-to-sink stream rate");
    end
    for (int i = 0; i < NP * FP; i++) begin
      int p, f;
      logic [33:0] exp;
      p = i / FP; f = i % FP;
      if (f == 0)           exp = {2'd0, rotl(xy_route(0, 8, 3), 10)};
      else if (f == FP - 1) exp = {2'd2, 16'(p), 16'(f)};
      else                  exp = {2'd1, 16'(p), 16'(f)};
      sink_rd_addr = 9'(i);
      @(negedge clk);
      @(negedge clk);
      check(sink_rd_data == exp, $sformatf("captured flit %0d", i));
    end
    tg_mode = 0;

    check(n_backpressure > 0, "request back-pressure occurred");
    check(n_uart_hold > 0, "UART held off a write");
    check(n_err > 0, "ERR responses occurred");
    check(n_dva > 0, "read responses occurred");
    check(n_tg > 0, "traffic-generator mode used");
    check(n_mem > 0, "remote memories written and read");
    $display("noc_top: back-pressure %0d, UART hold-off %0d, DVA %0d, ERR %0d, test mode %0d, memory %0d",
             n_backpressure, n_uart_hold, n_dva, n_err, n_tg, n_mem);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
