// noc_pkg: types and constants shared by the network-on-chip blocks.
//
// A flit travels on a channel made of three one-hot request wires, which
// encode the flit type (header, intermediate, end), a 32-bit data word and a
// single acknowledge wire running back. Coding the type on the request wires,
// rather than in extra data bits, keeps the routers' control simple: they know
// the type of a flit without looking at its data. In this clocked version a
// flit moves on the rising clock edge at which one request and the
// acknowledge are both high.
//
// Router ports are numbered in the order of the two-bit direction code used
// in header flits (North 00, East 01, South 10, West 11), followed by the
// local port. The OCP command and response codes are the usual ones of the
// Open Core Protocol.
package noc_pkg;

  localparam int unsigned FLIT_W = 32;   // flit and OCP data width
  localparam int unsigned NPORTS = 5;    // N, E, S, W, local

  typedef enum logic [1:0] {
    DIR_N = 2'b00,
    DIR_E = 2'b01,
    DIR_S = 2'b10,
    DIR_W = 2'b11
  } dir_e;

  localparam int unsigned PORT_N = 0;
  localparam int unsigned PORT_E = 1;
  localparam int unsigned PORT_S = 2;
  localparam int unsigned PORT_W = 3;
  localparam int unsigned PORT_L = 4;

  // A flit as it sits on a channel or in a buffer: the three request wires
  // and the data word. Exactly one of rh/ri/re is high for a valid flit.
  typedef struct packed {
    logic              rh;   // header flit
    logic              ri;   // intermediate flit
    logic              re;   // end flit
    logic [FLIT_W-1:0] data;
  } flit_t;

  localparam int unsigned FLIT_BITS = $bits(flit_t);

  // OCP MCmd
  typedef enum logic [2:0] {
    OCP_IDLE = 3'b000,
    OCP_WR   = 3'b001,
    OCP_RD   = 3'b010
  } ocp_cmd_e;

  // OCP SResp
  typedef enum logic [1:0] {
    OCP_NULL = 2'b00,
    OCP_DVA  = 2'b01,
    OCP_FAIL = 2'b10,
    OCP_ERR  = 2'b11
  } ocp_resp_e;

  function automatic logic flit_valid(flit_t f);
    return f.rh | f.ri | f.re;
  endfunction

  // The side a packet enters a router on, given the direction it travels.
  function automatic dir_e opposite(dir_e d);
    unique case (d)
      DIR_N:   return DIR_S;
      DIR_E:   return DIR_W;
      DIR_S:   return DIR_N;
      default: return DIR_E;
    endcase
  endfunction

  // Source route from node src to node dst of a mesh with the given number
  // of columns, dimension-ordered (East/West first, then North/South). The
  // code of the first hop is in bits [31:30], the next in [29:28] and so on;
  // the last code names the side the packet enters the destination router
  // on, which that router reads as "deliver locally". Unused low bits are 0.
  // src == dst has no route (a local input cannot reach the local output);
  // the result is then 0 and callers must not use it.
  function automatic logic [FLIT_W-1:0] xy_route(int unsigned src, int unsigned dst,
                                                 int unsigned cols);
    logic [FLIT_W-1:0] r;
    int unsigned       pos;
    int                sr, sc, dr, dc;
    dir_e              last;
    r    = '0;
    pos  = FLIT_W;
    sr   = int'(src / cols);
    sc   = int'(src % cols);
    dr   = int'(dst / cols);
    dc   = int'(dst % cols);
    last = DIR_N;
    if (src == dst) return '0;
    while (sc != dc) begin
      if (dc > sc) last = DIR_E;
      else         last = DIR_W;
      sc   = (dc > sc) ? sc + 1 : sc - 1;
      pos -= 2;
      r[pos +: 2] = last;
    end
    while (sr != dr) begin
      if (dr > sr) last = DIR_S;
      else         last = DIR_N;
      sr   = (dr > sr) ? sr + 1 : sr - 1;
      pos -= 2;
      r[pos +: 2] = last;
    end
    pos -= 2;
    r[pos +: 2] = opposite(last);
    return r;
  endfunction

endpackage
