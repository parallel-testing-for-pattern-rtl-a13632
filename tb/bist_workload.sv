// Testbench helper: one parallel-test RAM of a given size with its port
// held idle, so that its built-in test can be started and its verdict read.
module bist_workload #(
  parameter int unsigned B = 256,
  parameter int unsigned W = 256,
  parameter int unsigned P = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output logic        fail,
  output logic [31:0] ops
);
  import ptram_pkg::*;

  localparam int unsigned PAW = (P > 1) ? $clog2(P) : 1;

  logic [P-1:0] dout, error;
  logic         busy;
  logic [31:0]  fail_count, fail_op;
  phase_t       phase;

  parallel_test_ram #(.B(B), .W(W), .P(P)) dut (
    .clk, .rst_n,
    .ext_ctrl_i(CTRL_IDLE), .ext_sub_i(PAW'(0)), .ext_wl_addr_i('0), .ext_bl_addr_i('0),
    .ext_din_i(1'b0), .dout_o(dout), .error_o(error),
    .bist_start_i(start), .bist_busy_o(busy), .bist_done_o(done),
    .bist_fail_o(fail), .bist_fail_count_o(fail_count), .bist_fail_op_o(fail_op),
    .bist_op_count_o(ops), .bist_phase_o(phase));
endmodule
