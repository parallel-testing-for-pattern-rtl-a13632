// Full-size testbench: the parallel-test RAM at its default size
// (4 subarrays of 256 x 256 cells, 256K bits).
//
// A few normal-mode and parallel test-mode accesses are made, then one
// complete built-in test runs on the fault-free array.  The run must pass,
// issue exactly 194*W + 4*B + 1 operations and take that many cycles plus
// the four cycles of start and response flush.  A second run with one cell
// upset in the middle of Algorithm 1 must fail.
module tb_parallel_test_ram_full;
  import ptram_pkg::*;

  localparam int unsigned B = 256, W = 256, P = 4;
  localparam int unsigned EXP_OPS = 194 * W + 4 * B + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ctrl_t       ctrl;
  logic [1:0]  sub;
  logic [7:0]  wl, bl;
  logic        din;
  logic [P-1:0] dout, error;
  logic        start, busy, done, fail;
  logic [31:0] fail_count, fail_op, op_count;
  phase_t      phase;

  parallel_test_ram dut (
    .clk, .rst_n,
    .ext_ctrl_i(ctrl), .ext_sub_i(sub), .ext_wl_addr_i(wl), .ext_bl_addr_i(bl),
    .ext_din_i(din), .dout_o(dout), .error_o(error),
    .bist_start_i(start), .bist_busy_o(busy), .bist_done_o(done),
    .bist_fail_o(fail), .bist_fail_count_o(fail_count), .bist_fail_op_o(fail_op),
    .bist_op_count_o(op_count), .bist_phase_o(phase));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic op(ctrl_t c, int s, int w, int b, logic d);
    @(negedge clk);
    ctrl = c; sub = 2'(s); wl = 8'(w); bl = 8'(b); din = d;
    @(negedge clk);
    ctrl = '{test: c.test, l1: 1'b1, l2: 1'b1, we: 1'b0, re: 1'b0};
    @(negedge clk);
  endtask

  task automatic run_bist(output int cycles);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done && cycles < 200000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    ctrl = CTRL_IDLE; sub = '0; wl = '0; bl = '0; din = 1'b0; start = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // a parallel write of the odd group of word line 77, then a normal
    // write of one even cell in subarray 2 and reads of both
    op('{test: 1'b1, l1: 1'b1, l2: 1'b0, we: 1'b1, re: 1'b0}, 0, 77, 0, 1'b1);
    op('{test: 1'b1, l1: 1'b1, l2: 1'b0, we: 1'b0, re: 1'b1}, 0, 77, 0, 1'b0);
    check(dout == '1 && error == '0, "parallel read of a uniform group");
    op('{test: 1'b0, l1: 1'b1, l2: 1'b1, we: 1'b0, re: 1'b1}, 3, 77, 201, 1'b0);
    check(dout[3] == 1'b1, "normal read of a cell written in parallel");

    run_bist(cyc);
    check(done && !fail, "fault-free built-in test passes");
    check(op_count == EXP_OPS, $sformatf("operation count %0d, expected %0d", op_count, EXP_OPS));
    check(cyc == int'(EXP_OPS) + 4, $sformatf("run length %0d, expected %0d", cyc, EXP_OPS + 4));
    $display("built-in test: %0d operations, %0d cycles", op_count, cyc);

    fork
      run_bist(cyc);
      begin
        wait (phase == PH_A1_LOOP);
        repeat (20000) @(negedge clk);
        dut.g_sub[2].u_sub.u_array.cells[100][33] = !dut.g_sub[2].u_sub.u_array.cells[100][33];
      end
    join
    check(done && fail && fail_count > 0, "upset cell detected");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
