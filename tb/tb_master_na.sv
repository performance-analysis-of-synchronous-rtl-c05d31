// tb_master_na: self-checking test of master_na at node 4 (mesh centre).
// Random OCP writes and reads to every node. The request packet must have the
// form header / control / address / data-or-return-route with the right flit
// types, the header must be the X-then-Y route to the target (computed here),
// a read must carry the route back, and a read is answered by a response
// packet the testbench injects after a random delay: SResp/SData must then
// show it for one clock. Reads of the own node or of a node outside the mesh
// must end with SResp = ERR and send nothing. The network side acknowledges
// at random, so request back-pressure is exercised and counted.
module tb_master_na;
  import noc_pkg::*;

  localparam int ROWS = 3, COLS = 3, N = 9, ME = 4;

  logic        clk = 0, rst_n = 0;
  logic [2:0]  m_cmd;
  logic [31:0] m_addr, m_data, s_data;
  logic [3:0]  m_byteen;
  logic        s_cmd_accept;
  logic [1:0]  s_resp;
  flit_t       req_flit, rsp_flit;
  logic        req_ack, rsp_ack;
  int          checks = 0, failures = 0;
  int          n_backpressure = 0, n_err = 0, n_rd = 0, n_wr = 0;

  always #5 clk = ~clk;

  master_na #(.ROWS(ROWS), .COLS(COLS), .NODE_ID(ME)) dut (.*);

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

  // independent X-then-Y route
  function automatic logic [31:0] route(int s, int d);
    logic [31:0] r;
    int pos, sr, sc, dr, dc, last;
    r = '0; pos = 32; last = 0;
    sr = s / COLS; sc = s % COLS; dr = d / COLS; dc = d % COLS;
    while (sc != dc) begin last = (dc > sc) ? 1 : 3; sc += (dc > sc) ? 1 : -1; pos -= 2; r[pos +: 2] = 2'(last); end
    while (sr != dr) begin last = (dr > sr) ? 2 : 0; sr += (dr > sr) ? 1 : -1; pos -= 2; r[pos +: 2] = 2'(last); end
    pos -= 2; r[pos +: 2] = 2'(last ^ 2);
    return r;
  endfunction

  // collect one request packet (4 flits) with random acknowledges
  task automatic get_packet(output flit_t f[4]);
    int k;
    k = 0;
    while (k < 4) begin
      req_ack = ($urandom_range(0, 2) != 0);
      #1;
      if (flit_valid(req_flit) && !req_ack) n_backpressure++;
      @(posedge clk);
      if (flit_valid(req_flit) && req_ack) begin f[k] = req_flit; k++; end
      @(negedge clk);
    end
    req_ack = 0;
  endtask

  initial begin
    m_cmd = 0; m_addr = 0; m_data = 0; m_byteen = 0; req_ack = 0; rsp_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      int dst;
      bit rd;
      logic [31:0] a, d;
      logic [3:0] be;
      dst = $urandom_range(0, 10);
      rd  = $urandom_range(0, 1);
      a   = {4'(dst), 28'($urandom)};
      d   = $urandom;
      be  = 4'($urandom);
      m_cmd = rd ? 3'd2 : 3'd1; m_addr = a; m_data = d; m_byteen = be;
      #1;
      check(s_cmd_accept, "idle adapter accepts");
      @(negedge clk);
      m_cmd = 0;
      #1;
      if (rd || (dst < N && dst != ME)) check(!s_cmd_accept, "busy adapter does not accept");
      else                              check(s_cmd_accept, "dropped write leaves the adapter idle");
      if (dst >= N || dst == ME) begin
        if (rd) begin
          @(negedge clk);
          check(s_resp == 2'b11, "unreachable read answered with ERR");
          n_err++;
        end
        check(!flit_valid(req_flit), "nothing sent for unreachable target");
        @(negedge clk);
        continue;
      end
      begin
        flit_t f[4];
        get_packet(f);
        check(f[0].rh && f[1].ri && f[2].ri && f[3].re, "flit types H,I,I,E");
        check(f[0].data == route(ME, dst), "header is the route to the target");
        check(f[1].data == {25'b0, (rd ? 3'd2 : 3'd1), be}, "control flit = {MCmd, MByteEn}");
        check(f[2].data == a, "address flit");
        if (rd) check(f[3].data == route(dst, ME), "read carries the return route");
        else    check(f[3].data == d, "write carries the data");
        if (!rd) begin
          n_wr++;
          @(negedge clk);
          continue;
        end
        n_rd++;
        // response after a random delay
        repeat ($urandom_range(0, 5)) begin
          #1; check(s_resp == 2'b00, "no response before the packet"); @(negedge clk);
        end
        begin
          logic [31:0] rdata;
          rdata = $urandom;
          for (int k = 0; k < 3; k++) begin
            rsp_flit = '0;
            rsp_flit.rh = (k == 0); rsp_flit.ri = (k == 1); rsp_flit.re = (k == 2);
            rsp_flit.data = (k == 0) ? 32'h0 : (k == 1) ? 32'h1 : rdata;
            #1; check(rsp_ack, "response flit accepted");
            @(negedge clk);
          end
          rsp_flit = '0;
          #1;
          check(s_resp == 2'b01 && s_data == rdata, "SResp=DVA with SData from the response");
          @(negedge clk);
          check(s_resp == 2'b00, "SResp lasts one clock");
        end
      end
    end
    check(n_backpressure > 0 && n_err > 0 && n_rd > 0 && n_wr > 0, "all cases occurred");
    $display("master_na: %0d reads, %0d writes, %0d errors, %0d back-pressured clocks",
             n_rd, n_wr, n_err, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
