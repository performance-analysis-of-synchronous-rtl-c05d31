// merge4: relays the handshakes of four input channels onto one output
// channel. Its inputs must be mutually exclusive (the mutex in front of it
// ensures that): at most one channel presents a flit at a time.
//
// Each output request wire is the OR of the same wire on the four inputs;
// each input channel's activity (the OR of its three requests) selects the
// data multiplexer and steers the output acknowledge back to that channel
// only. Purely combinational.
module merge4
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t [3:0] in_flit,
  output logic  [3:0] in_ack,
  output flit_t       out_flit,
  input  logic        out_ack
);

  logic [3:0] active;

  always_comb begin
    out_flit = '0;
    for (int c = 0; c < 4; c++) begin
      active[c] = flit_valid(in_flit[c]);
      in_ack[c] = active[c] && out_ack;
      out_flit.rh |= in_flit[c].rh;
      out_flit.ri |= in_flit[c].ri;
      out_flit.re |= in_flit[c].re;
      if (active[c]) out_flit.data = in_flit[c].data;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(active))
    else $error("merge4: input requests are not mutually exclusive");

endmodule
