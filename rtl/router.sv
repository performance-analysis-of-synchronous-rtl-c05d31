// router: five-port source-routed wormhole router for a two-dimensional mesh.
//
// Ports 0..4 are North, East, South, West and Local. Every port has an input
// and an output channel, each buffered by a flit_fifo. Behind the input
// buffers, five input ports pick an output from the header's two top bits;
// in front of the output buffers, five output ports arbitrate. The input and
// output ports are wired as a full crossbar with the one restriction of the
// routing scheme: a packet never leaves on the side it came in on. Instead,
// a direction code equal to the input's own side delivers the packet to the
// local port, so each input port needs only four output channels and each
// output port only four inputs:
//
//   input p (N/E/S/W), code c : output c, or Local when c == p
//   input Local,        code c : output c
//
// Timing: a flit spends one clock in the input buffer and one in the output
// buffer, so with an idle path it appears at the output two clocks after it
// was accepted, and one flit per clock can stream through each path. The
// FIFO depth is a parameter, as in the original; its default is this
// design's choice.
module router
  import noc_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  flit_t [NPORTS-1:0]  in_flit,
  output logic  [NPORTS-1:0]  in_ack,
  output flit_t [NPORTS-1:0]  out_flit,
  input  logic  [NPORTS-1:0]  out_ack
);

  // Output port reached from input p with code c.
  function automatic int unsigned out_of(int unsigned p, int unsigned c);
    return (p != PORT_L && c == p) ? PORT_L : c;
  endfunction

  // Channel index (0..3) of input p at output port q.
  function automatic int unsigned chan_of(int unsigned q, int unsigned p);
    if (q == PORT_L) return p;
    return (p < q) ? p : p - 1;
  endfunction

  flit_t [NPORTS-1:0]      ib_flit;     // input buffer -> input port
  logic  [NPORTS-1:0]      ib_ack;
  flit_t [NPORTS-1:0][3:0] ip_flit;     // input port channels
  logic  [NPORTS-1:0][3:0] ip_ack;
  flit_t [NPORTS-1:0][3:0] op_flit;     // output port channels
  logic  [NPORTS-1:0][3:0] op_ack;
  flit_t [NPORTS-1:0]      ob_flit;     // output port -> output buffer
  logic  [NPORTS-1:0]      ob_ack;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    flit_fifo #(.DEPTH(FIFO_DEPTH)) u_ififo (
      .clk, .rst_n,
      .in_flit (in_flit[p]), .in_ack (in_ack[p]),
      .out_flit(ib_flit[p]), .out_ack(ib_ack[p])
    );

    input_port u_in (
      .clk, .rst_n,
      .in_flit (ib_flit[p]), .in_ack (ib_ack[p]),
      .out_flit(ip_flit[p]), .out_ack(ip_ack[p])
    );

    output_port u_out (
      .clk, .rst_n,
      .in_flit (op_flit[p]), .in_ack (op_ack[p]),
      .out_flit(ob_flit[p]), .out_ack(ob_ack[p])
    );

    flit_fifo #(.DEPTH(FIFO_DEPTH)) u_ofifo (
      .clk, .rst_n,
      .in_flit (ob_flit[p]), .in_ack (ob_ack[p]),
      .out_flit(out_flit[p]), .out_ack(out_ack[p])
    );
  end

  // Crossbar wiring.
  for (genvar p = 0; p < NPORTS; p++) begin : g_xp
    for (genvar c = 0; c < 4; c++) begin : g_xc
      localparam int unsigned Q = out_of(p, c);
      localparam int unsigned K = chan_of(Q, p);
      assign op_flit[Q][K] = ip_flit[p][c];
      assign ip_ack[p][c]  = op_ack[Q][K];
    end
  end

endmodule
