// access_ctrl: the access-control circuit in front of each input channel of
// an output port.
//
// A header request on the input asks the mutex for the output (m_req). Once
// the mutex grants it, the header and every later flit of the packet pass
// straight through, requests forward and acknowledge back. The grant is kept
// until the end flit has been handed over; then m_req is withdrawn for one
// clock so the mutex can pass the output to another waiting input, mirroring
// the order of the original signal-transition graph (header request, mutex
// request, grant, header out ... end flit out, mutex request released, grant
// released). Competing inputs simply wait with their header request raised.
//
// States: IDLE (no packet), OWN (packet in progress, mutex held), RELEASE (one
// clock after the end flit, mutex request low).
// Timing: requests and acknowledge pass combinationally while granted; the
// header can go out in the same cycle the mutex grants it.
// The data bits are wired straight through; only the three request wires
// and the acknowledge are gated. The merge element selects the data of the
// granted channel.
module access_ctrl
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit,
  output logic  in_ack,
  output flit_t out_flit,
  input  logic  out_ack,
  output logic  m_req,
  input  logic  m_grant
);

  typedef enum logic [1:0] {IDLE, OWN, RELEASE} state_e;
  state_e state, state_n;

  logic pass;

  assign m_req = (state == OWN) || (state == IDLE && in_flit.rh);
  // A header may only start a packet from IDLE; inside a packet only
  // intermediate and end flits are expected.
  assign pass  = m_grant && ((state == IDLE && in_flit.rh) ||
                             (state == OWN && (in_flit.ri || in_flit.re)));

  always_comb begin
    out_flit      = in_flit;
    out_flit.rh   = pass && in_flit.rh;
    out_flit.ri   = pass && in_flit.ri;
    out_flit.re   = pass && in_flit.re;
    in_ack        = pass && out_ack;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:    if (pass && in_flit.rh && out_ack) state_n = OWN;
      OWN:     if (pass && in_flit.re && out_ack) state_n = RELEASE;
      RELEASE: state_n = IDLE;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_n;
  end

endmodule
