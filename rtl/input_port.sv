// input_port: steers each packet arriving at a router port to one of four
// output channels (a..d) by source routing.
//
// The first flit of a packet, the header, carries the route: its two most
// significant bits name the direction of this hop (North 00, East 01,
// South 10, West 11). The input port uses those two bits to select the output
// channel for the header and stores them in an address latch, which then
// steers the intermediate and end flits of the same packet the same way
// (wormhole switching). The header leaves rotated left by two bits, so the
// code for the next hop is again in bits [31:30]; intermediate and end flits
// pass unchanged. The acknowledge of the selected channel is returned.
//
// Channel index = direction code. The router decides which output port each
// index reaches; a code equal to the side the packet came in on means "deliver
// to the local core".
//
// Timing: purely combinational from input to outputs; only the address latch
// is clocked, loaded when the header is transferred. The delay elements and
// C-element of the asynchronous original are not needed in this clocked
// version.
module input_port
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       in_flit,
  output logic        in_ack,
  output flit_t [3:0] out_flit,
  input  logic  [3:0] out_ack
);

  logic [1:0] dir_q;   // address latch
  logic [1:0] sel;

  // The header routes itself; the rest of the packet follows the latch.
  assign sel = in_flit.rh ? in_flit.data[FLIT_W-1 -: 2] : dir_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     dir_q <= '0;
    else if (in_flit.rh && in_ack)  dir_q <= in_flit.data[FLIT_W-1 -: 2];
  end

  logic [FLIT_W-1:0] data_out;
  assign data_out = in_flit.rh ? {in_flit.data[FLIT_W-3:0], in_flit.data[FLIT_W-1 -: 2]}
                               : in_flit.data;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      out_flit[c].data = data_out;
      out_flit[c].rh   = in_flit.rh && (sel == 2'(c));
      out_flit[c].ri   = in_flit.ri && (sel == 2'(c));
      out_flit[c].re   = in_flit.re && (sel == 2'(c));
    end
  end

  assign in_ack = out_ack[sel];

endmodule
