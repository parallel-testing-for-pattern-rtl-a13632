// Memory array of one subarray: B bit lines by W word lines of one-bit cells.
//
// Cell C(i,j) sits where bit line i crosses word line j.  A write drives the
// data-in value onto every bit line whose write enable is set and stores it
// in every cell of the raised word line(s) on those bit lines, so one write
// can fill many cells of a word line at once: that is what the parallel test
// needs.  Reading raises the word line and presents the whole row on the bit
// lines; rdata_o is the row as the sense amplifiers deliver it (if more than
// one word line were raised the bit lines would show the OR of the rows).
//
// Interface: wl_i (W bits, word line select), bl_we_i (B bits, bit lines
// driven in this write), wdata_i, rdata_o (B bits).
// Timing: the write takes effect at the clock edge; rdata_o is combinational
// from wl_i and the stored cells.  The cells are not reset, as in a DRAM.
// The array geometry is the document's; the storage is a plain register
// array, which is this design's choice.
module memory_array #(
  parameter int unsigned B = 256,
  parameter int unsigned W = 256
) (
  input  logic         clk,
  input  logic [W-1:0] wl_i,
  input  logic [B-1:0] bl_we_i,
  input  logic         wdata_i,
  output logic [B-1:0] rdata_o
);

  logic [B-1:0] cells [W];

  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < W; j++)
      if (wl_i[j]) cells[j] <= (cells[j] & ~bl_we_i) | ({B{wdata_i}} & bl_we_i);
  end

  always_comb begin
    rdata_o = '0;
    for (int unsigned j = 0; j < W; j++)
      if (wl_i[j]) rdata_o |= cells[j];
  end

endmodule
