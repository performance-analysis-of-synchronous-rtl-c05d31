// master_na: network adapter between a master core (a CPU) and the network.
//
// Towards the core it is an OCP slave; towards the network it sends request
// packets on the request network and receives response packets from the
// response network. The target node is taken from the top address bits
// (MAddr[31:28]); a route lookup ROM, filled at elaboration with
// dimension-ordered (XY) routes from this node, gives the header flit, and a
// second ROM gives the route back, which a read request carries so the slave
// side can answer.
//
// Packets (one flit per row, type on the request wires):
//   write request : header=route | ctrl={MCmd,MByteEn} | MAddr | MData (end)
//   read request  : header=route | ctrl={MCmd,MByteEn} | MAddr | return route (end)
//   read response : header       | ctrl={SResp}        | SData (end)
// ctrl holds MCmd in bits [6:4] and MByteEn in [3:0], SResp in [1:0].
//
// OCP behaviour: SCmdAccept is high only while the adapter is idle, so a
// command waits until the previous one has left (request handshake). Writes
// are posted: no response. A read is answered when its response packet has
// arrived: SResp and SData are then valid for exactly one clock. A command to
// a node outside the mesh, or to this node itself (the network cannot turn a
// packet from the local input back to the local output), is not sent: a read
// gets SResp = ERR one clock after acceptance, a write is dropped.
module master_na
  import noc_pkg::*;
#(
  parameter int unsigned ROWS    = 3,
  parameter int unsigned COLS    = 3,
  parameter int unsigned NODE_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  // OCP, from the master core
  input  logic [2:0]        m_cmd,
  input  logic [31:0]       m_addr,
  input  logic [31:0]       m_data,
  input  logic [3:0]        m_byteen,
  output logic              s_cmd_accept,
  output logic [1:0]        s_resp,
  output logic [31:0]       s_data,
  // request network, local input
  output flit_t             req_flit,
  input  logic              req_ack,
  // response network, local output
  input  flit_t             rsp_flit,
  output logic              rsp_ack
);

  localparam int unsigned N = ROWS * COLS;

  typedef logic [N-1:0][FLIT_W-1:0] rom_t;

  function automatic rom_t make_rom(bit to_here);
    rom_t rom;
    for (int unsigned d = 0; d < N; d++)
      rom[d] = to_here ? xy_route(d, NODE_ID, COLS) : xy_route(NODE_ID, d, COLS);
    return rom;
  endfunction

  localparam rom_t ROUTE_ROM  = make_rom(1'b0);   // this node -> d
  localparam rom_t RETURN_ROM = make_rom(1'b1);   // d -> this node

  typedef enum logic [2:0] {S_IDLE, S_SEND, S_WAIT, S_ERR} state_e;
  state_e state;

  logic [2:0]  cmd_q;
  logic [3:0]  be_q;
  logic [31:0] addr_q, data_q;
  logic [3:0]  dst_q;
  logic [1:0]  idx;          // flit index within the request packet
  logic [1:0]  rsp_code_q;

  logic [3:0]  dst;
  logic        dst_ok;
  logic        is_cmd;

  assign dst    = m_addr[31:28];
  assign dst_ok = (32'(dst) < N) && (32'(dst) != NODE_ID);
  assign is_cmd = (m_cmd == OCP_WR) || (m_cmd == OCP_RD);

  assign s_cmd_accept = (state == S_IDLE);
  assign rsp_ack      = (state == S_WAIT);

  // Request flit for the current index.
  always_comb begin
    req_flit = '0;
    if (state == S_SEND) begin
      unique case (idx)
        2'd0: begin req_flit.rh = 1'b1; req_flit.data = ROUTE_ROM[dst_q[$clog2(N)-1:0]]; end
        2'd1: begin req_flit.ri = 1'b1; req_flit.data = {25'b0, cmd_q, be_q}; end
        2'd2: begin req_flit.ri = 1'b1; req_flit.data = addr_q; end
        2'd3: begin
          req_flit.re   = 1'b1;
          req_flit.data = (cmd_q == OCP_RD) ? RETURN_ROM[dst_q[$clog2(N)-1:0]] : data_q;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cmd_q      <= '0;
      be_q       <= '0;
      addr_q     <= '0;
      data_q     <= '0;
      dst_q      <= '0;
      idx        <= '0;
      rsp_code_q <= '0;
      s_resp     <= OCP_NULL;
      s_data     <= '0;
    end else begin
      s_resp <= OCP_NULL;
      unique case (state)
        S_IDLE: if (is_cmd) begin
          cmd_q  <= m_cmd;
          be_q   <= m_byteen;
          addr_q <= m_addr;
          data_q <= m_data;
          dst_q  <= dst;
          idx    <= '0;
          if (dst_ok)               state <= S_SEND;
          else if (m_cmd == OCP_RD) state <= S_ERR;
        end
        S_SEND: if (req_ack) begin
          idx <= idx + 1'b1;
          if (idx == 2'd3) state <= (cmd_q == OCP_RD) ? S_WAIT : S_IDLE;
        end
        S_WAIT: begin
          if (rsp_flit.ri) rsp_code_q <= rsp_flit.data[1:0];
          if (rsp_flit.re) begin
            s_resp <= rsp_code_q;
            s_data <= rsp_flit.data;
            state  <= S_IDLE;
          end
        end
        S_ERR: begin
          s_resp <= OCP_ERR;
          s_data <= '0;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  initial assert ((ROWS - 1) + (COLS - 1) + 1 <= FLIT_W / 2)
    else $error("master_na: mesh too large for a one-flit source route");

endmodule
