// tb_traffic_sink: self-checking test of traffic_sink with a 64-entry
// capture memory. Random packets are offered; every stored entry, read back
// through the synchronous read port, must equal {type, data} of the flit in
// arrival order; the flit and packet counters must match; once full the sink
// must stop acknowledging.
module tb_traffic_sink;
  import noc_pkg::*;

  localparam int DEPTH = 64;

  logic        clk = 0, rst_n = 0;
  flit_t       in_flit;
  logic        in_ack;
  logic [5:0]  rd_addr;
  logic [33:0] rd_data;
  logic [15:0] flit_count, pkt_count;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  traffic_sink #(.DEPTH(DEPTH)) dut (.*);

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

  logic [33:0] sent[$];
  int pkts = 0;

  initial begin
    int idx;
    in_flit = '0; rd_addr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    idx = 0;
    while (sent.size() < DEPTH + 5) begin
      int t;
      t = (idx == 0) ? 0 : ($urandom_range(0, 2) == 0 ? 2 : 1);
      in_flit = '0;
      if ($urandom_range(0, 3) != 0) begin
        in_flit.rh = (t == 0); in_flit.ri = (t == 1); in_flit.re = (t == 2);
        in_flit.data = $urandom;
      end
      #1;
      if (sent.size() < DEPTH) check(in_ack, "acknowledges while not full");
      else                     check(!in_ack, "stops acknowledging when full");
      @(posedge clk);
      if (flit_valid(in_flit)) begin
        if (sent.size() < DEPTH) begin
          sent.push_back({2'(t), in_flit.data});
          if (t == 2) pkts++;
          idx = (t == 2) ? 0 : idx + 1;
        end else begin
          sent.push_back('0);   // only counts the attempts past full
        end
      end
      @(negedge clk);
    end
    in_flit = '0;
    check(flit_count == DEPTH, "flit counter");
    check(pkt_count == 16'(pkts), "packet counter");
    for (int i = 0; i < DEPTH; i++) begin
      rd_addr = 6'(i);
      @(negedge clk);
      check(rd_data == sent[i], $sformatf("captured entry %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
