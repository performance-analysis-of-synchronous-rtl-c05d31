// flit_fifo: the buffer placed at every input and output port of a router.
//
// The buffer is a chain of flit-holding stages in the original architecture;
// here it is a clocked circular buffer of DEPTH entries that stores each
// flit's type wires together with its data, so header, intermediate and end
// flits leave in the order and with the type they arrived with.
//
// Interface: a flit channel in (in_flit/in_ack) and one out
// (out_flit/out_ack). A flit enters on a clock edge where it is valid and
// in_ack is high, and leaves on an edge where out_flit is valid and out_ack
// is high. in_ack is "not full" and comes straight from registers, so the
// acknowledge never passes combinationally through the buffer; with the
// default DEPTH of 2 one flit per clock streams through. A flit written in
// one cycle appears at the output in the next (one cycle of latency).
// The depth is configurable, as in the original; its default is this
// design's choice.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  output logic  in_ack,
  output flit_t out_flit,
  input  logic  out_ack
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t           mem [DEPTH];
  logic [AW-1:0]   wr_ptr, rd_ptr;
  logic [AW:0]     count;
  logic            push, pop;

  assign in_ack = (count < (AW+1)'(DEPTH));
  assign push   = flit_valid(in_flit) && in_ack;
  assign pop    = (count != '0) && out_ack;

  always_comb begin
    out_flit = mem[rd_ptr];
    if (count == '0) begin
      out_flit.rh = 1'b0;
      out_flit.ri = 1'b0;
      out_flit.re = 1'b0;
    end
  end

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= incr(wr_ptr);
      if (pop)  rd_ptr <= incr(rd_ptr);
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_flit;
  end

  // A valid flit carries exactly one type request.
  assert property (@(posedge clk) disable iff (!rst_n)
                   flit_valid(in_flit) |-> $onehot({in_flit.rh, in_flit.ri, in_flit.re}))
    else $error("flit_fifo: more than one request wire high");

endmodule
