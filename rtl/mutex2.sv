// mutex2: two-input mutual-exclusion element, the building block of mutex4.
//
// At most one of g[1:0] is high. A grant is held for as long as its request
// stays high. When the element is free it grants a lone request in the same
// cycle; if both inputs ask at once, the input that did not win last time
// wins, so neither can be passed over twice in a row. An asynchronous
// two-input mutex needs a metastability filter to settle requests that
// arrive together; a clocked one sees them in the same cycle and needs none.
// The alternating tie-break is this design's choice.
//
// Interface: r[1:0] requests, g[1:0] grants. Timing: g is combinational from
// r and the registered owner; the owner register follows the grant.
module mutex2 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] r,
  output logic [1:0] g
);

  logic held_q;   // a grant is being held
  logic owner_q;  // input holding it, or the last winner when free
  logic keep;
  logic pick;

  assign keep = held_q && r[owner_q];
  // when free: a lone request wins, and a tie goes to the last loser
  assign pick = (r == 2'b11) ? !owner_q : r[1];

  always_comb begin
    g = '0;
    if (keep)        g[owner_q] = 1'b1;
    else if (|r)     g[pick]    = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held_q  <= 1'b0;
      owner_q <= 1'b1;
    end else if (!keep) begin
      held_q <= |r;
      if (|r) owner_q <= pick;
    end
  end

endmodule
