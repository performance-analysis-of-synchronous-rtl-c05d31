// tb_noc_mesh: self-checking test of the 3x3 mesh.
// Every node sends packets to random other nodes at random times, and every
// node's local output is acknowledged at random. Routes are built here
// column-last (North/South first, then East/West), a different rule from the
// adapters', to show that the routers only follow the source route. Each
// packet carries {source, sequence number}; each destination must receive
// every packet addressed to it, whole and in order per source. Competition of
// several packets for one local output and back-pressure at local outputs are
// counted and must occur.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int ROWS = 3, COLS = 3, N = ROWS * COLS;
  localparam int PKTS = 40;   // per source

  logic          clk = 0, rst_n = 0;
  flit_t [N-1:0] loc_in_flit, loc_out_flit;
  logic  [N-1:0] loc_in_ack, loc_out_ack;
  int            checks = 0, failures = 0;
  int            n_stall = 0;

  always #5 clk = ~clk;

  noc_mesh #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

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

  // Y-then-X source route, last code = side of entry at the destination.
  function automatic logic [31:0] yx_route(int s, int d);
    logic [31:0] r;
    int pos, sr, sc, dr, dc, last;
    r = '0; pos = 32;
    sr = s / COLS; sc = s % COLS; dr = d / COLS; dc = d % COLS; last = 0;
    while (sr != dr) begin
      last = (dr > sr) ? 2 : 0; sr += (dr > sr) ? 1 : -1;
      pos -= 2; r[pos +: 2] = 2'(last);
    end
    while (sc != dc) begin
      last = (dc > sc) ? 1 : 3; sc += (dc > sc) ? 1 : -1;
      pos -= 2; r[pos +: 2] = 2'(last);
    end
    pos -= 2; r[pos +: 2] = 2'(last ^ 2);
    return r;
  endfunction

  int s_pkt[N], s_idx[N], s_len[N], s_dst[N];
  bit s_on[N];
  int next_seq [N][N];   // [dst][src]
  int sent_to  [N][N];
  int cur_src[N], cur_idx[N];
  bit busy[N];
  int delivered = 0;
  int max_hops_seen = 0;

  initial begin
    loc_in_flit = '0; loc_out_ack = '0;
    for (int i = 0; i < N; i++) begin
      s_pkt[i] = 0; s_on[i] = 0; busy[i] = 0;
      for (int j = 0; j < N; j++) begin next_seq[i][j] = 0; sent_to[i][j] = 0; end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (delivered < N * PKTS) begin
      for (int s = 0; s < N; s++) begin
        loc_in_flit[s] = '0;
        if (!s_on[s] && s_pkt[s] < PKTS && $urandom_range(0, 2) == 0) begin
          s_on[s] = 1; s_idx[s] = 0; s_len[s] = $urandom_range(2, 5);
          s_dst[s] = $urandom_range(0, N - 2);
          if (s_dst[s] >= s) s_dst[s]++;
        end
        if (s_on[s]) begin
          loc_in_flit[s].rh = (s_idx[s] == 0);
          loc_in_flit[s].re = (s_idx[s] == s_len[s] - 1);
          loc_in_flit[s].ri = !loc_in_flit[s].rh && !loc_in_flit[s].re;
          loc_in_flit[s].data = (s_idx[s] == 0) ? yx_route(s, s_dst[s])
                              : {4'(s), 12'(sent_to[s_dst[s]][s]), 16'(s_idx[s])};
        end
      end
      for (int d = 0; d < N; d++) loc_out_ack[d] = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      for (int d = 0; d < N; d++) begin
        if (flit_valid(loc_out_flit[d]) && !loc_out_ack[d]) n_stall++;
        if (flit_valid(loc_out_flit[d]) && loc_out_ack[d]) begin
          if (loc_out_flit[d].rh) begin
            check(!busy[d], "header only between packets");
            busy[d] = 1; cur_idx[d] = 0; cur_src[d] = -1;
          end else begin
            int s, q, f;
            s = int'(loc_out_flit[d].data[31:28]);
            q = int'(loc_out_flit[d].data[27:16]);
            f = int'(loc_out_flit[d].data[15:0]);
            check(busy[d], "body flit inside a packet");
            if (cur_src[d] < 0) begin
              cur_src[d] = s;
              check(s < N && q == next_seq[d][s], "packet arrives in order from its source");
            end
            check(s == cur_src[d] && f == cur_idx[d] + 1, "flits of one packet stay together");
            cur_idx[d] = f;
            if (loc_out_flit[d].re) begin
              busy[d] = 0; delivered++;
              if (s < N) next_seq[d][s]++;
            end
          end
        end
      end
      for (int s = 0; s < N; s++)
        if (flit_valid(loc_in_flit[s]) && loc_in_ack[s]) begin
          s_idx[s]++;
          if (s_idx[s] == s_len[s]) begin
            s_on[s] = 0; s_pkt[s]++; sent_to[s_dst[s]][s]++;
          end
        end
      @(negedge clk);
    end
    for (int d = 0; d < N; d++)
      for (int s = 0; s < N; s++)
        check(next_seq[d][s] == sent_to[d][s], "every packet delivered");
    check(n_stall > 0, "back-pressure at local outputs occurred");
    $display("noc_mesh: %0d packets delivered, %0d stalled clocks", delivered, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
