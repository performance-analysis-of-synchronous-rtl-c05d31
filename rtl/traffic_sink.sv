// traffic_sink: test receiver that stores every flit arriving on a network
// port, with its type, in a capture memory that can be read out afterwards
// and compared with what was sent.
//
// Flits are acknowledged one per clock until the memory is full (then the
// port is back-pressured). Each entry is {type, data} with type 0 header,
// 1 intermediate, 2 end. flit_count counts stored flits and pkt_count the end
// flits. The read port is synchronous: rd_data shows the entry at rd_addr one
// clock after rd_addr is applied.
module traffic_sink
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  flit_t                    in_flit,
  output logic                     in_ack,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [FLIT_W+1:0]        rd_data,
  output logic [15:0]              flit_count,
  output logic [15:0]              pkt_count
);

  logic [FLIT_W+1:0] mem [DEPTH];
  logic              store;
  logic [1:0]        ftype;

  assign in_ack = (32'(flit_count) < DEPTH);
  assign store  = flit_valid(in_flit) && in_ack;
  assign ftype  = in_flit.rh ? 2'd0 : in_flit.ri ? 2'd1 : 2'd2;

  always_ff @(posedge clk) begin
    if (store) mem[flit_count[$clog2(DEPTH)-1:0]] <= {ftype, in_flit.data};
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flit_count <= '0;
      pkt_count  <= '0;
    end else if (store) begin
      flit_count <= flit_count + 1'b1;
      if (in_flit.re) pkt_count <= pkt_count + 1'b1;
    end
  end

endmodule
