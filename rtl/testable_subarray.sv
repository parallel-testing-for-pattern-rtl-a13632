// Testable subarray: one B x W memory matrix with the circuitry that lets it
// be written and checked many cells at a time.
//
// Organisation: word line buffer -> word line decoder -> memory array; bit
// line buffer -> modified bit line decoder -> column multiplexer -> data-out
// buffer; the sensed row also feeds the parallel comparator, whose result
// sets the error latch.  In test mode (ctrl.test = 1) the bit line decoder
// selects every even (l1 = 0) or every odd (l2 = 0) bit line of the addressed
// word line, so one write stores the data-in bit into Q = B/2 cells and one
// read checks that those Q cells agree.  In normal mode it is an ordinary
// one-bit-wide RAM.
//
// Interface: cs_i enables the subarray for the operation issued this cycle;
// ctrl_i carries TEST, L1, L2 and the write / read strobes; wl_addr_i,
// bl_addr_i, din_i complete the operation.  dout_o is the data-out buffer,
// error_o the error latch.
// Timing: an operation is issued in cycle t (inputs captured by the buffers
// at the end of t), executes in cycle t+1 (write at the end of t+1), and its
// read data and error flag are visible from cycle t+2.  One operation can be
// issued every cycle.  The structure follows the document's testable RAM
// organisation; the buffers, the two-cycle timing and the register-array
// cells are this design's choices.
module testable_subarray
  import ptram_pkg::*;
#(
  parameter int unsigned B         = 256,
  parameter int unsigned W         = 256,
  parameter bit          WIRED_AND = 1'b0,
  parameter int unsigned BAW       = $clog2(B),
  parameter int unsigned WAW       = $clog2(W)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cs_i,
  input  ctrl_t          ctrl_i,
  input  logic [WAW-1:0] wl_addr_i,
  input  logic [BAW-1:0] bl_addr_i,
  input  logic           din_i,
  output logic           dout_o,
  output logic           error_o
);

  // Operation executing in this cycle (captured by the buffers).
  ctrl_t          ctrl_q;
  logic           act_q;
  logic [WAW-1:0] wl_addr_q;
  logic [BAW-1:0] bl_addr_q;
  logic           wdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q <= CTRL_IDLE;
      act_q  <= 1'b0;
    end else begin
      act_q  <= cs_i && (ctrl_i.we || ctrl_i.re);
      ctrl_q <= cs_i ? ctrl_i : CTRL_IDLE;
    end
  end

  address_buffer #(.WIDTH(WAW)) u_wl_buf (
    .clk, .rst_n, .load_i(cs_i), .addr_i(wl_addr_i), .addr_o(wl_addr_q));

  address_buffer #(.WIDTH(BAW)) u_bl_buf (
    .clk, .rst_n, .load_i(cs_i), .addr_i(bl_addr_i), .addr_o(bl_addr_q));

  logic [W-1:0] wl;
  logic [B-1:0] bl_sel;
  logic [B-1:0] sense;
  logic         mux_out;
  logic         all_one, all_zero, same;

  wordline_decoder #(.W(W)) u_wl_dec (
    .en_i(act_q), .addr_i(wl_addr_q), .wl_o(wl));

  bitline_decoder #(.B(B)) u_bl_dec (
    .en_i(act_q), .test_i(ctrl_q.test), .l1_n_i(ctrl_q.l1), .l2_n_i(ctrl_q.l2),
    .addr_i(bl_addr_q), .bl_o(bl_sel));

  memory_array #(.B(B), .W(W)) u_array (
    .clk, .wl_i(wl), .bl_we_i(ctrl_q.we ? bl_sel : '0), .wdata_i(wdata_q),
    .rdata_o(sense));

  column_mux #(.B(B), .WIRED_AND(WIRED_AND)) u_mux (
    .sense_i(sense), .sel_i(bl_sel), .dout_o(mux_out));

  data_buffer u_data (
    .clk, .rst_n, .load_i(cs_i), .din_i(din_i), .wdata_o(wdata_q),
    .rd_i(act_q && ctrl_q.re), .mux_i(mux_out), .dout_o(dout_o));

  parallel_comparator #(.B(B)) u_cmp (
    .sense_i(sense), .l2_n_i(ctrl_q.l2),
    .all_one_o(all_one), .all_zero_o(all_zero), .same_o(same));

  error_detector u_err (
    .clk, .rst_n, .test_i(ctrl_q.test), .rd_i(act_q && ctrl_q.re),
    .wr_i(act_q && ctrl_q.we), .same_i(same), .error_o(error_o));

  // A single operation either reads or writes.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
                             cs_i |-> !(ctrl_i.we && ctrl_i.re))
    else $error("testable_subarray: read and write issued together");

endmodule
