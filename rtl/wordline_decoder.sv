// Word line decoder: turns the buffered word line address into a one-hot
// word line select.
//
// Word lines are always accessed one at a time, in normal and in test mode
// alike: the parallel test only widens the access along the word line.  When
// en_i is low no word line is raised.
//
// Interface: addr_i (log2 W bits), en_i, wl_o (W bits, one-hot or zero).
// Purely combinational.  The decoder is named in the RAM organisation; its
// implementation as a plain binary decoder is this design's choice.
module wordline_decoder #(
  parameter int unsigned W  = 256,
  parameter int unsigned AW = $clog2(W)
) (
  input  logic          en_i,
  input  logic [AW-1:0] addr_i,
  output logic [W-1:0]  wl_o
);

  always_comb begin
    wl_o = '0;
    if (en_i && (32'(addr_i) < W)) wl_o[addr_i] = 1'b1;
  end

endmodule
