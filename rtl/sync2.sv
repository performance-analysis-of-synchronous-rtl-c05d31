// sync2: two flip-flop synchronizer for a single asynchronous input.
// The output follows the input two to three clocks later; the first flop may
// go metastable and the second gives it a clock period to settle. RESET_VAL
// is the level held during reset (high for an idle serial line).
module sync2 #(
  parameter bit RESET_VAL = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= {RESET_VAL, RESET_VAL};
    else        {q, meta} <= {meta, d};
  end
endmodule
