// slave_na: network adapter between the network and a slave core.
//
// It takes request packets from the request network (header, control,
// address, then data or return route; see master_na for the formats),
// replays each as one OCP command towards the slave core, and for a read
// sends a response packet (header = the return route carried by the request,
// control = SResp, end = SData) into the response network.
//
// Behaviour: flits are accepted one per clock while a packet is being
// collected; the header's remaining route bits are not needed and are
// dropped. After the end flit, MCmd/MAddr/MData/MByteEn are held until the
// core raises SCmdAccept (the core may delay acceptance as long as it
// likes). For a read the adapter then waits, for any number of clocks, for
// SResp other than NULL and captures SData; the response packet follows, one
// flit per clock when the network accepts it. No new request is taken until
// the current one has finished.
module slave_na
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // request network, local output
  input  flit_t       req_flit,
  output logic        req_ack,
  // response network, local input
  output flit_t       rsp_flit,
  input  logic        rsp_ack,
  // OCP, towards the slave core
  output logic [2:0]  m_cmd,
  output logic [31:0] m_addr,
  output logic [31:0] m_data,
  output logic [3:0]  m_byteen,
  input  logic        s_cmd_accept,
  input  logic [1:0]  s_resp,
  input  logic [31:0] s_data
);

  typedef enum logic [2:0] {S_COLLECT, S_CMD, S_WAIT, S_SEND} state_e;
  state_e state;

  logic [1:0]  idx;        // flit index (collect) or response flit (send)
  logic [2:0]  cmd_q;
  logic [3:0]  be_q;
  logic [31:0] addr_q, last_q, rdata_q;
  logic [1:0]  resp_q;

  assign req_ack  = (state == S_COLLECT);
  assign m_cmd    = (state == S_CMD) ? cmd_q : OCP_IDLE;
  assign m_addr   = addr_q;
  assign m_data   = last_q;
  assign m_byteen = be_q;

  always_comb begin
    rsp_flit = '0;
    if (state == S_SEND) begin
      unique case (idx)
        2'd0:    begin rsp_flit.rh = 1'b1; rsp_flit.data = last_q; end
        2'd1:    begin rsp_flit.ri = 1'b1; rsp_flit.data = {30'b0, resp_q}; end
        default: begin rsp_flit.re = 1'b1; rsp_flit.data = rdata_q; end
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_COLLECT;
      idx     <= '0;
      cmd_q   <= '0;
      be_q    <= '0;
      addr_q  <= '0;
      last_q  <= '0;
      rdata_q <= '0;
      resp_q  <= '0;
    end else begin
      unique case (state)
        S_COLLECT: begin
          if (req_flit.rh) idx <= 2'd1;
          if (req_flit.ri) begin
            if (idx == 2'd1) {cmd_q, be_q} <= req_flit.data[6:0];
            else             addr_q        <= req_flit.data;
            idx <= idx + 1'b1;
          end
          if (req_flit.re) begin
            last_q <= req_flit.data;
            state  <= S_CMD;
          end
        end
        S_CMD: if (s_cmd_accept) begin
          state <= (cmd_q == OCP_RD) ? S_WAIT : S_COLLECT;
          idx   <= '0;
        end
        S_WAIT: if (s_resp != OCP_NULL) begin
          resp_q  <= s_resp;
          rdata_q <= s_data;
          state   <= S_SEND;
        end
        S_SEND: if (rsp_ack) begin
          idx <= idx + 1'b1;
          if (idx == 2'd2) begin
            idx   <= '0;
            state <= S_COLLECT;
          end
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
