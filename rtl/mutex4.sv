// mutex4: four-input mutual-exclusion element of an output port.
//
// Built as in the original from six two-input mutexes (mutex2) in three
// stages, one for every pair of inputs. An input's request enters its
// stage-1 mutex; winning it raises the input's request into its stage-2
// mutex, and winning that into its stage-3 mutex. Winning the last stage is
// the grant:
//
//   stage 1: {0,1} {2,3}    stage 2: {0,2} {1,3}    stage 3: {0,3} {1,2}
//
// Every pair of inputs meets in exactly one mutex, so two inputs can never
// both be granted. Each input takes its three mutexes in stage order and
// holds those it has won while its request stays high, so there is no
// circular wait. When the request drops, all three are released in the same
// cycle. A waiting input blocks only its partners at stages it has already
// won, and each mutex gives a tie to its last loser. With fair two-input
// mutexes, as in the original, a request is overtaken by at most two
// requests raised after it, and it waits through at most five grants in all:
// while it waits for its stage-1 partner, that partner can wait behind one
// grant to each of the other two; afterwards the stage-2 and stage-3
// partners can each be ahead once more.
//
// Interface: req[3:0] requests, grant[3:0] one-hot grant, held while its
// request stays high. Timing: grant is combinational from req and the six
// owner registers; a request to an idle element is granted in the same
// cycle, and a released output is handed over in the same cycle. The
// stage order and tie-break are this design's choices.
module mutex4 (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] req,
  output logic [3:0] grant
);

  logic [3:0] s1, s2;   // inputs that have won stage 1, stage 2

  mutex2 u_01 (.clk, .rst_n, .r({req[1], req[0]}), .g({s1[1], s1[0]}));
  mutex2 u_23 (.clk, .rst_n, .r({req[3], req[2]}), .g({s1[3], s1[2]}));

  mutex2 u_02 (.clk, .rst_n, .r({s1[2], s1[0]}), .g({s2[2], s2[0]}));
  mutex2 u_13 (.clk, .rst_n, .r({s1[3], s1[1]}), .g({s2[3], s2[1]}));

  mutex2 u_03 (.clk, .rst_n, .r({s2[3], s2[0]}), .g({grant[3], grant[0]}));
  mutex2 u_12 (.clk, .rst_n, .r({s2[2], s2[1]}), .g({grant[2], grant[1]}));

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant))
    else $error("mutex4: more than one grant");

endmodule
