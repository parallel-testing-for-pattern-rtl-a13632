// Data-in and data-out buffers of a subarray.
//
// The data-in buffer captures the port's write value when an operation is
// issued, together with the address buffers, and drives it onto the selected
// bit lines during the write.  The data-out buffer captures the column
// multiplexer output at the end of each read and holds it until the next
// read.  Both are cleared by reset.
//
// Interface: load_i / din_i (issue side), wdata_o (to the bit lines), rd_i /
// mux_i (read executing in this cycle and its value), dout_o.
// Timing: wdata_o one clock after load_i; dout_o one clock after the read
// executes.  Only the two buffers' names come from the RAM organisation.
module data_buffer (
  input  logic clk,
  input  logic rst_n,
  input  logic load_i,
  input  logic din_i,
  output logic wdata_o,
  input  logic rd_i,
  input  logic mux_i,
  output logic dout_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wdata_o <= 1'b0;
      dout_o  <= 1'b0;
    end else begin
      if (load_i) wdata_o <= din_i;
      if (rd_i)   dout_o  <= mux_i;
    end
  end

endmodule
