// ocp_mem: on-chip memory used as a slave core beside the UART at each node.
//
// WORDS 32-bit words, addressed by MAddr[AW+1:2] (word address; the two low
// bits are the byte within the word and are ignored). It follows the
// simplest OCP transfer: every command is accepted in the cycle it is
// presented (SCmdAccept is always high). A write stores the bytes whose
// MByteEn bit is set; a read is answered with SResp = DVA and SData in the
// following clock. Writes get no response. The memory contents are not
// reset; the size is this design's choice. Because every command is
// accepted and a read never fails, SCmdAccept is constant high and the
// upper SResp bit is constant low.
module ocp_mem
  import noc_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  m_cmd,
  input  logic [31:0] m_addr,
  input  logic [31:0] m_data,
  input  logic [3:0]  m_byteen,
  output logic        s_cmd_accept,
  output logic [1:0]  s_resp,
  output logic [31:0] s_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0]   mem [WORDS];
  logic [AW-1:0] widx;

  assign widx         = m_addr[AW+1:2];
  assign s_cmd_accept = 1'b1;

  always_ff @(posedge clk) begin
    if (m_cmd == OCP_WR)
      for (int b = 0; b < 4; b++)
        if (m_byteen[b]) mem[widx][8*b +: 8] <= m_data[8*b +: 8];
    if (m_cmd == OCP_RD) s_data <= mem[widx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s_resp <= OCP_NULL;
    else        s_resp <= (m_cmd == OCP_RD) ? OCP_DVA : OCP_NULL;
  end

endmodule
