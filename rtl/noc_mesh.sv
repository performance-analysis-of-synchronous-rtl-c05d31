// noc_mesh: ROWS x COLS two-dimensional mesh of routers with two-way links.
//
// Node n sits at row n / COLS, column n % COLS, node 0 in the north-west
// corner. North is the row above, South the row below, East the next column,
// West the previous one. Each router's East output drives the West input of
// its eastern neighbour and so on; the local ports of all routers are brought
// out as arrays indexed by node number. Ports on the rim of the mesh are
// tied off: nothing enters there and nothing is acknowledged there, so a
// packet whose route pointed off the mesh would stop in that output buffer
// (an assertion reports it). Routes are computed by the source (see
// master_na), which never produces such a route.
//
// Timing: two clocks per router hop with idle links (see router).
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned ROWS       = 3,
  parameter int unsigned COLS       = 3,
  parameter int unsigned FIFO_DEPTH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  flit_t [ROWS*COLS-1:0]    loc_in_flit,
  output logic  [ROWS*COLS-1:0]    loc_in_ack,
  output flit_t [ROWS*COLS-1:0]    loc_out_flit,
  input  logic  [ROWS*COLS-1:0]    loc_out_ack
);

  localparam int unsigned N = ROWS * COLS;

  flit_t [N-1:0][NPORTS-1:0] r_in, r_out;
  logic  [N-1:0][NPORTS-1:0] r_in_ack, r_out_ack;

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int unsigned R = n / COLS;
    localparam int unsigned C = n % COLS;

    router #(.FIFO_DEPTH(FIFO_DEPTH)) u_router (
      .clk, .rst_n,
      .in_flit (r_in[n]),  .in_ack (r_in_ack[n]),
      .out_flit(r_out[n]), .out_ack(r_out_ack[n])
    );

    assign r_in[n][PORT_L]      = loc_in_flit[n];
    assign loc_in_ack[n]        = r_in_ack[n][PORT_L];
    assign loc_out_flit[n]      = r_out[n][PORT_L];
    assign r_out_ack[n][PORT_L] = loc_out_ack[n];

    // North side
    if (R > 0) begin : g_n
      assign r_in[n][PORT_N]      = r_out[n-COLS][PORT_S];
      assign r_out_ack[n][PORT_N] = r_in_ack[n-COLS][PORT_S];
    end else begin : g_n_rim
      assign r_in[n][PORT_N]      = '0;
      assign r_out_ack[n][PORT_N] = 1'b0;
    end
    // South side
    if (R < ROWS - 1) begin : g_s
      assign r_in[n][PORT_S]      = r_out[n+COLS][PORT_N];
      assign r_out_ack[n][PORT_S] = r_in_ack[n+COLS][PORT_N];
    end else begin : g_s_rim
      assign r_in[n][PORT_S]      = '0;
      assign r_out_ack[n][PORT_S] = 1'b0;
    end
    // East side
    if (C < COLS - 1) begin : g_e
      assign r_in[n][PORT_E]      = r_out[n+1][PORT_W];
      assign r_out_ack[n][PORT_E] = r_in_ack[n+1][PORT_W];
    end else begin : g_e_rim
      assign r_in[n][PORT_E]      = '0;
      assign r_out_ack[n][PORT_E] = 1'b0;
    end
    // West side
    if (C > 0) begin : g_w
      assign r_in[n][PORT_W]      = r_out[n-1][PORT_E];
      assign r_out_ack[n][PORT_W] = r_in_ack[n-1][PORT_E];
    end else begin : g_w_rim
      assign r_in[n][PORT_W]      = '0;
      assign r_out_ack[n][PORT_W] = 1'b0;
    end

    for (genvar p = 0; p < 4; p++) begin : g_rim_chk
      if ((p == PORT_N && R == 0) || (p == PORT_S && R == ROWS - 1) ||
          (p == PORT_E && C == COLS - 1) || (p == PORT_W && C == 0)) begin : g_chk
        assert property (@(posedge clk) disable iff (!rst_n) !flit_valid(r_out[n][p]))
          else $error("noc_mesh: node %0d routed a flit off the mesh (port %0d)", n, p);
      end
    end
  end

endmodule
