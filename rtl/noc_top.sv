// noc_top: 3x3 mesh network-on-chip multiprocessor platform.
//
// Every node has a router in each of two identical meshes: a request network
// carrying read and write requests from master adapters to slave adapters,
// and a response network carrying read data back. Keeping the two apart
// means a response can never wait behind a request, which rules out
// message-dependent deadlock.
//
// The processors themselves are not part of this design; their OCP ports
// are top-level ports indexed by node. Behind each slave adapter sit two
// slave cores, a UART and an on-chip memory (ocp_mem). Address bits [31:28]
// choose the target node and bit 27 the core there: 0 the UART (register in
// bits [3:2]), 1 the memory (word address from bit 2 up).
//
//   CPU port (OCP) -> master_na -> request mesh -> slave_na -+-> uart
//                                                            +-> ocp_mem
//
// For testing, tg_mode replaces master adapter 0 by a ROM traffic source and
// slave adapter N-1 by a capturing traffic sink on the request network; the
// source's packets are routed from node 0 to node N-1. tg_start starts it;
// the captured flits are read through sink_rd_addr / sink_rd_data (one clock
// latency). Change tg_mode only while both networks are idle.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned ROWS          = 3,
  parameter int unsigned COLS          = 3,
  parameter int unsigned FIFO_DEPTH    = 2,
  parameter int unsigned CLKS_PER_BIT  = 868,
  parameter int unsigned NUM_PACKETS   = 100,
  parameter int unsigned FLITS_PER_PKT = 4,
  parameter int unsigned SINK_DEPTH    = 512,
  parameter int unsigned MEM_WORDS     = 256
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // OCP ports of the master cores, one per node
  input  logic [ROWS*COLS-1:0][2:0]          m_cmd,
  input  logic [ROWS*COLS-1:0][31:0]         m_addr,
  input  logic [ROWS*COLS-1:0][31:0]         m_data,
  input  logic [ROWS*COLS-1:0][3:0]          m_byteen,
  output logic [ROWS*COLS-1:0]               s_cmd_accept,
  output logic [ROWS*COLS-1:0][1:0]          s_resp,
  output logic [ROWS*COLS-1:0][31:0]         s_data,
  // serial lines of the UARTs
  input  logic [ROWS*COLS-1:0]               uart_rx,
  output logic [ROWS*COLS-1:0]               uart_tx,
  // traffic generator test mode
  input  logic                               tg_mode,
  input  logic                               tg_start,
  output logic                               tg_done,
  input  logic [$clog2(SINK_DEPTH)-1:0]      sink_rd_addr,
  output logic [FLIT_W+1:0]                  sink_rd_data,
  output logic [15:0]                        sink_flit_count,
  output logic [15:0]                        sink_pkt_count
);

  localparam int unsigned N = ROWS * COLS;

  flit_t [N-1:0] rq_in, rq_out, rs_in, rs_out;
  logic  [N-1:0] rq_in_ack, rq_out_ack, rs_in_ack, rs_out_ack;

  noc_mesh #(.ROWS(ROWS), .COLS(COLS), .FIFO_DEPTH(FIFO_DEPTH)) u_req_mesh (
    .clk, .rst_n,
    .loc_in_flit (rq_in),  .loc_in_ack (rq_in_ack),
    .loc_out_flit(rq_out), .loc_out_ack(rq_out_ack)
  );

  noc_mesh #(.ROWS(ROWS), .COLS(COLS), .FIFO_DEPTH(FIFO_DEPTH)) u_rsp_mesh (
    .clk, .rst_n,
    .loc_in_flit (rs_in),  .loc_in_ack (rs_in_ack),
    .loc_out_flit(rs_out), .loc_out_ack(rs_out_ack)
  );

  // Traffic generator on the request network.
  flit_t tg_flit;
  logic  tg_ack;
  logic  sink_ack;

  traffic_source #(
    .NUM_PACKETS  (NUM_PACKETS),
    .FLITS_PER_PKT(FLITS_PER_PKT),
    .ROUTE        (xy_route(0, N - 1, COLS))
  ) u_tsrc (
    .clk, .rst_n,
    .start   (tg_start && tg_mode),
    .out_flit(tg_flit),
    .out_ack (tg_ack),
    .done    (tg_done)
  );

  traffic_sink #(.DEPTH(SINK_DEPTH)) u_tsink (
    .clk, .rst_n,
    .in_flit   (tg_mode ? rq_out[N-1] : '0),
    .in_ack    (sink_ack),
    .rd_addr   (sink_rd_addr),
    .rd_data   (sink_rd_data),
    .flit_count(sink_flit_count),
    .pkt_count (sink_pkt_count)
  );

  for (genvar n = 0; n < N; n++) begin : g_node
    flit_t       mna_flit;
    logic        mna_ack;
    flit_t       sna_flit;
    logic        sna_ack;
    logic [2:0]  u_cmd;
    logic [31:0] u_addr, u_wdata, u_rdata;
    logic [3:0]  u_be;
    logic        u_accept;
    logic [1:0]  u_resp;
    logic        sel_mem;
    logic [2:0]  uart_cmd, mem_cmd;
    logic        uart_accept, mem_accept;
    logic [1:0]  uart_resp, mem_resp;
    logic [31:0] uart_rdata, mem_rdata;

    master_na #(.ROWS(ROWS), .COLS(COLS), .NODE_ID(n)) u_mna (
      .clk, .rst_n,
      .m_cmd       (m_cmd[n]),
      .m_addr      (m_addr[n]),
      .m_data      (m_data[n]),
      .m_byteen    (m_byteen[n]),
      .s_cmd_accept(s_cmd_accept[n]),
      .s_resp      (s_resp[n]),
      .s_data      (s_data[n]),
      .req_flit    (mna_flit),
      .req_ack     (mna_ack),
      .rsp_flit    (rs_out[n]),
      .rsp_ack     (rs_out_ack[n])
    );

    slave_na u_sna (
      .clk, .rst_n,
      .req_flit    (sna_flit),
      .req_ack     (sna_ack),
      .rsp_flit    (rs_in[n]),
      .rsp_ack     (rs_in_ack[n]),
      .m_cmd       (u_cmd),
      .m_addr      (u_addr),
      .m_data      (u_wdata),
      .m_byteen    (u_be),
      .s_cmd_accept(u_accept),
      .s_resp      (u_resp),
      .s_data      (u_rdata)
    );

    // Address decode between the two slave cores. The slave adapter has one
    // command in flight at a time, so at most one core answers.
    assign sel_mem  = u_addr[27];
    assign uart_cmd = sel_mem ? 3'(OCP_IDLE) : u_cmd;
    assign mem_cmd  = sel_mem ? u_cmd : 3'(OCP_IDLE);
    assign u_accept = sel_mem ? mem_accept : uart_accept;
    assign u_resp   = uart_resp | mem_resp;
    assign u_rdata  = (mem_resp != OCP_NULL) ? mem_rdata : uart_rdata;

    ocp_mem #(.WORDS(MEM_WORDS)) u_mem (
      .clk, .rst_n,
      .m_cmd       (mem_cmd),
      .m_addr      (u_addr),
      .m_data      (u_wdata),
      .m_byteen    (u_be),
      .s_cmd_accept(mem_accept),
      .s_resp      (mem_resp),
      .s_data      (mem_rdata)
    );

    uart #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
      .clk, .rst_n,
      .m_cmd       (uart_cmd),
      .m_addr      (u_addr),
      .m_data      (u_wdata),
      .s_cmd_accept(uart_accept),
      .s_resp      (uart_resp),
      .s_data      (uart_rdata),
      .rx          (uart_rx[n]),
      .tx          (uart_tx[n])
    );

    // Request-network local ports: the traffic generator takes over node 0's
    // input and node N-1's output in test mode.
    if (n == 0) begin : g_src
      assign rq_in[n] = tg_mode ? tg_flit : mna_flit;
      assign mna_ack  = !tg_mode && rq_in_ack[n];
      assign tg_ack   = tg_mode && rq_in_ack[n];
    end else begin : g_nosrc
      assign rq_in[n] = mna_flit;
      assign mna_ack  = rq_in_ack[n];
    end

    if (n == N - 1) begin : g_snk
      assign sna_flit      = tg_mode ? flit_t'('0) : rq_out[n];
      assign rq_out_ack[n] = tg_mode ? sink_ack : sna_ack;
    end else begin : g_nosnk
      assign sna_flit      = rq_out[n];
      assign rq_out_ack[n] = sna_ack;
    end
  end

endmodule
