// Global reset generator: holds the design in reset while the board reset is asserted or the
// clock is not yet locked, and releases it synchronously to the sample clock.
//
// `reset` (active high) and `!locked` assert `glbl_reset_b` (active low) at once,
// asynchronously; release takes STAGES rising clock edges after both have gone away, through a
// chain of flip-flops, so all logic leaves reset on the same edge.
// As in the source design: a reset block between the board reset, the clock manager's lock
// flag and the data path. This design's own choices: the synchroniser and its depth.
module reset_sync #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic reset,
  input  logic locked,
  output logic glbl_reset_b
);
  logic [STAGES-1:0] chain;
  logic              arst_n;

  assign arst_n = !reset && locked;

  always_ff @(posedge clk or negedge arst_n)
    if (!arst_n) chain <= '0;
    else         chain <= {chain[STAGES-2:0], 1'b1};

  assign glbl_reset_b = chain[STAGES-1];
endmodule
