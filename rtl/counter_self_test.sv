// counter_self_test: compares the element's four 6-bit byte counters in
// test mode.
//
// The two write address counters and the two read address counters are
// identical 6-bit counters. In test mode they are all released together
// from zero and count on every rising edge; this block compares their
// outputs on each rising edge and raises ERR, held until RESET or the end
// of test mode, at the first count where any of them differs. Sixty-four
// clock cycles run every counter through its whole range, which is an
// exhaustive test of all four. The method follows the design; holding the
// error flag until test mode ends is this implementation's choice.
module counter_self_test #(
  parameter int unsigned N = 4,   // counters compared
  parameter int unsigned W = 6    // counter width
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              test,      // counter test mode
  input  logic [N-1:0][W-1:0] count,
  output logic              err        // a counter disagreed
);

  logic mismatch;

  always_comb begin
    mismatch = 1'b0;
    for (int i = 1; i < N; i++)
      if (count[i] != count[0]) mismatch = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || !test) err <= 1'b0;
    else if (mismatch) err <= 1'b1;
  end

endmodule
