// output_port: gives one of four competing input channels the output
// channel and keeps it for the whole packet.
//
// Four access-control circuits (one per input channel a..d) share a
// four-input mutex; the granted one passes its flits to a merge element that
// drives the single output channel. A packet owns the output from its header
// until its end flit, which is what wormhole switching needs: flits of
// different packets never interleave on a link.
//
// Timing: combinational from input to output channel; an idle output passes
// a header in the cycle it arrives. After each packet the input that sent it
// is locked out for one clock, which lets a waiting input take over.
module output_port
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t [3:0] in_flit,
  output logic  [3:0] in_ack,
  output flit_t       out_flit,
  input  logic        out_ack
);

  flit_t [3:0] gated;
  logic  [3:0] gated_ack;
  logic  [3:0] m_req, m_grant;

  for (genvar c = 0; c < 4; c++) begin : g_ac
    access_ctrl u_ac (
      .clk, .rst_n,
      .in_flit (in_flit[c]),
      .in_ack  (in_ack[c]),
      .out_flit(gated[c]),
      .out_ack (gated_ack[c]),
      .m_req   (m_req[c]),
      .m_grant (m_grant[c])
    );
  end

  mutex4 u_mutex (.clk, .rst_n, .req(m_req), .grant(m_grant));

  merge4 u_merge (
    .clk, .rst_n,
    .in_flit (gated),
    .in_ack  (gated_ack),
    .out_flit(out_flit),
    .out_ack (out_ack)
  );

endmodule
