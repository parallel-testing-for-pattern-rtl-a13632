// Column multiplexer between the sense amplifiers and the data-out buffer.
//
// All bit lines chosen by the bit line decoder are connected to the data-out
// line at once.  With one bit line chosen (normal mode) the output is that
// cell.  With several chosen (parallel test, or a decoder fault that selects
// more than one line) the shared line resolves to the OR of the chosen cells,
// or to their AND when WIRED_AND = 1; when all chosen cells agree both give
// the cell value, which is what lets the test read data without ambiguity.
//
// Interface: sense_i (B bits from the sense amplifiers), sel_i (B bits from
// the bit line decoder), dout_o.  Purely combinational.
// Which of OR and AND the real circuit produces is left open in the
// document; OR is this design's default.
module column_mux #(
  parameter int unsigned B         = 256,
  parameter bit          WIRED_AND = 1'b0
) (
  input  logic [B-1:0] sense_i,
  input  logic [B-1:0] sel_i,
  output logic         dout_o
);

  always_comb begin
    if (WIRED_AND) dout_o = (|sel_i) && (&(sense_i | ~sel_i));
    else           dout_o = |(sense_i & sel_i);
  end

endmodule
