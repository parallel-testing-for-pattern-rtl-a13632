// Modified bit line decoder with parallel group select.
//
// The ordinary decoder output for bit line i is OR-ed with a group select
// line: every even bit line hangs on line L1 and every odd bit line on line
// L2, both active low.  In normal mode (TEST = 0, L1 = L2 = 1) exactly the
// addressed bit line is selected.  In test mode (TEST = 1) all decoder
// outputs are forced off and L1 = 0 selects all even bit lines, L2 = 0 all
// odd ones, both low selects every bit line.  This follows the modified PLA
// decoder (an extra product-line pull-down driven by TEST and one pass
// transistor per bit line to L1 or L2) at the level of its logic function.
//
// Interface: test_i, l1_n_i, l2_n_i, addr_i (log2 B bits), en_i gates the
// whole decoder when no operation is active; bl_o (B bits) is the bit line
// select.  Purely combinational.
module bitline_decoder #(
  parameter int unsigned B  = 256,
  parameter int unsigned AW = $clog2(B)
) (
  input  logic          en_i,
  input  logic          test_i,
  input  logic          l1_n_i,
  input  logic          l2_n_i,
  input  logic [AW-1:0] addr_i,
  output logic [B-1:0]  bl_o
);

  always_comb begin
    bl_o = '0;
    for (int unsigned i = 0; i < B; i++) begin
      bl_o[i] = ((!test_i) && (32'(addr_i) == i))        // decoder output
              || ((i % 2 == 0) ? !l1_n_i : !l2_n_i);    // group select
    end
    if (!en_i) bl_o = '0;
  end

  // In normal mode with both group lines high the decoder is one-hot.
  always_comb
    if (en_i && !test_i && l1_n_i && l2_n_i && (32'(addr_i) < B))
      assert ($onehot(bl_o)) else $error("bitline_decoder: normal mode select is not one-hot");

endmodule
