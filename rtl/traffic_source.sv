// traffic_source: test traffic generator that plays a fixed set of packets
// from a ROM into a network port.
//
// Each ROM entry is one flit: its type (header, intermediate, end) and its
// data. The ROM holds NUM_PACKETS packets of FLITS_PER_PKT flits each; the
// header of every packet is ROUTE, and flit f of packet p carries
// {p[15:0], f[15:0]}, so a receiver can tell exactly which flit it got. The
// contents are computed when the design is elaborated.
//
// An address counter advances on every acknowledged flit; the entry's type
// selects which of the three request wires is raised. Sending starts on a
// start pulse (or level) and stops after the last entry, when done goes high.
// One flit per clock while the port acknowledges.
module traffic_source
  import noc_pkg::*;
#(
  parameter int unsigned       NUM_PACKETS   = 100,
  parameter int unsigned       FLITS_PER_PKT = 4,
  parameter logic [FLIT_W-1:0] ROUTE         = 32'h5A00_0000
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  output flit_t out_flit,
  input  logic  out_ack,
  output logic  done
);

  localparam int unsigned TOTAL = NUM_PACKETS * FLITS_PER_PKT;
  localparam int unsigned AW    = $clog2(TOTAL + 1);

  typedef enum logic [1:0] {T_HDR = 2'd0, T_INT = 2'd1, T_END = 2'd2} ftype_e;
  typedef struct packed {
    ftype_e            ftype;
    logic [FLIT_W-1:0] data;
  } entry_t;
  typedef entry_t [TOTAL-1:0] rom_t;

  function automatic rom_t make_rom();
    rom_t rom;
    for (int unsigned i = 0; i < TOTAL; i++) begin
      int unsigned p, f;
      p = i / FLITS_PER_PKT;
      f = i % FLITS_PER_PKT;
      if (f == 0) begin
        rom[i].ftype = T_HDR;
        rom[i].data  = ROUTE;
      end else begin
        rom[i].ftype = (f == FLITS_PER_PKT - 1) ? T_END : T_INT;
        rom[i].data  = {p[15:0], f[15:0]};
      end
    end
    return rom;
  endfunction

  localparam rom_t ROM = make_rom();

  logic [AW-1:0] addr;
  logic          running;
  entry_t        cur;

  assign cur  = ROM[addr[$clog2(TOTAL)-1:0]];
  assign done = (addr == AW'(TOTAL));

  always_comb begin
    out_flit      = '0;
    out_flit.data = cur.data;
    if (running && !done) begin
      out_flit.rh = (cur.ftype == T_HDR);
      out_flit.ri = (cur.ftype == T_INT);
      out_flit.re = (cur.ftype == T_END);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr    <= '0;
      running <= 1'b0;
    end else begin
      if (start) running <= 1'b1;
      if (running && !done && out_ack) addr <= addr + 1'b1;
    end
  end

  initial assert (FLITS_PER_PKT >= 2)
    else $error("traffic_source: a packet needs a header and an end flit");

endmodule
