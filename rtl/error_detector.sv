// Error latch of the parallel comparator.
//
// During the evaluate phase of a test-mode read the latch is set when the
// comparator reports that the selected bit lines differ, and stays set over
// further reads.  During a write and whenever the RAM is in normal mode it
// is clamped to 0, so ERROR has to be looked at after each test-mode read,
// before the next write.  Between operations it holds.
//
// Interface: test_i, rd_i, wr_i (the operation executing in this cycle),
// same_i (comparator result), error_o.
// Timing: error_o reflects a read one clock after it executes.  The clocked
// latch stands for the transistor latch and the clock phases that drive it;
// reset to 0 is this design's choice.
module error_detector (
  input  logic clk,
  input  logic rst_n,
  input  logic test_i,
  input  logic rd_i,
  input  logic wr_i,
  input  logic same_i,
  output logic error_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 error_o <= 1'b0;
    else if (!test_i || wr_i)   error_o <= 1'b0;        // clamp
    else if (rd_i && !same_i)   error_o <= 1'b1;        // set on mismatch
  end

endmodule
