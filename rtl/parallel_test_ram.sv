// Parallel-test RAM: an n-bit, one-bit-wide RAM built from P subarrays of
// B bit lines by W word lines (n = P*B*W), each of which can be tested many
// cells at a time for static and dynamic pattern sensitive faults.
//
// Every subarray has a modified bit line decoder that, in test mode, selects
// all even or all odd bit lines of a word line, and a parallel comparator
// with an error latch that flags a read whose selected cells disagree.  In
// test mode all P subarrays take the same operation, so the whole RAM is
// tested in the time of one subarray.  The test operations either come from
// the port (an external tester drives TEST, L1, L2 and the addresses) or
// from the built-in sequencer, which runs the parallel pattern sensitive
// fault test and the bit line decoder test and reports pass / fail.
//
// Port use:
//   normal access: ext_ctrl_i.test = 0, l1 = l2 = 1, ext_sub_i picks the
//     subarray, ext_wl_addr_i / ext_bl_addr_i the cell;
//   external parallel test: ext_ctrl_i.test = 1, l1 = 0 for the even bit
//     lines or l2 = 0 for the odd ones, every subarray takes part;
//   built-in test: pulse bist_start_i; while bist_busy_o is high the port
//     is ignored; bist_done_o then holds and bist_fail_o gives the verdict.
// dout_o[p] and error_o[p] are subarray p's data-out buffer and error latch.
// Timing: an operation issued in cycle t shows its read data and error flag
// in cycle t+2; one operation per cycle.
// The subarray organisation, the group select and the comparator follow the
// document.  The subarray count and size defaults are its 256K-bit, four
// partition example with square (e = 1) partitions; the subarray select of
// the normal-mode port and the built-in sequencer are this design's.
module parallel_test_ram
  import ptram_pkg::*;
#(
  parameter int unsigned B         = 256,
  parameter int unsigned W         = 256,
  parameter int unsigned P         = 4,
  parameter bit          WIRED_AND = 1'b0,
  parameter int unsigned BAW       = $clog2(B),
  parameter int unsigned WAW       = $clog2(W),
  parameter int unsigned PAW       = (P > 1) ? $clog2(P) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // memory port
  input  ctrl_t          ext_ctrl_i,
  input  logic [PAW-1:0] ext_sub_i,
  input  logic [WAW-1:0] ext_wl_addr_i,
  input  logic [BAW-1:0] ext_bl_addr_i,
  input  logic           ext_din_i,
  output logic [P-1:0]   dout_o,
  output logic [P-1:0]   error_o,
  // built-in test
  input  logic           bist_start_i,
  output logic           bist_busy_o,
  output logic           bist_done_o,
  output logic           bist_fail_o,
  output logic [31:0]    bist_fail_count_o,
  output logic [31:0]    bist_fail_op_o,
  output logic [31:0]    bist_op_count_o,
  output phase_t         bist_phase_o
);

  ctrl_t          seq_ctrl, ctrl;
  logic [WAW-1:0] seq_wl, wl_addr;
  logic [BAW-1:0] seq_bl, bl_addr;
  logic           seq_din, din;
  logic [P-1:0]   cs;

  psf_test_sequencer #(.B(B), .W(W), .P(P)) u_seq (
    .clk, .rst_n,
    .start_i(bist_start_i), .busy_o(bist_busy_o), .done_o(bist_done_o),
    .fail_o(bist_fail_o), .fail_count_o(bist_fail_count_o),
    .fail_op_o(bist_fail_op_o), .op_count_o(bist_op_count_o),
    .phase_o(bist_phase_o),
    .ctrl_o(seq_ctrl), .wl_addr_o(seq_wl), .bl_addr_o(seq_bl), .din_o(seq_din),
    .dout_i(dout_o), .error_i(error_o));

  always_comb begin
    if (bist_busy_o) begin
      ctrl    = seq_ctrl;
      wl_addr = seq_wl;
      bl_addr = seq_bl;
      din     = seq_din;
      cs      = '1;                       // every subarray runs the test
    end else begin
      ctrl    = ext_ctrl_i;
      wl_addr = ext_wl_addr_i;
      bl_addr = ext_bl_addr_i;
      din     = ext_din_i;
      cs      = '0;
      if (ext_ctrl_i.test) cs = '1;       // parallel test reaches all subarrays
      else if (32'(ext_sub_i) < P) cs[ext_sub_i] = 1'b1;
    end
  end

  for (genvar p = 0; p < P; p++) begin : g_sub
    testable_subarray #(.B(B), .W(W), .WIRED_AND(WIRED_AND)) u_sub (
      .clk, .rst_n, .cs_i(cs[p]), .ctrl_i(ctrl),
      .wl_addr_i(wl_addr), .bl_addr_i(bl_addr), .din_i(din),
      .dout_o(dout_o[p]), .error_o(error_o[p]));
  end

endmodule
