// Address buffer: the word line buffer and the bit line buffer in front of
// the two decoders of a subarray.
//
// The buffer captures the address presented at the port on the clock edge at
// which an operation is issued (load = 1) and holds it for the decoders while
// the operation runs in the following cycle.  It is cleared by reset so the
// decoders never see an unknown address.
//
// Interface: addr_i is the port address, load_i the issue strobe, addr_o the
// buffered address.  Timing: addr_o changes one clock after load_i.
// Only the existence of the two buffers comes from the RAM organisation; the
// register with load enable is this design's reading of them.
module address_buffer #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load_i,
  input  logic [WIDTH-1:0] addr_i,
  output logic [WIDTH-1:0] addr_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      addr_o <= '0;
    else if (load_i) addr_o <= addr_i;
  end

endmodule
