// End-to-end testbench of the parallel-test RAM at a reduced size
// (B = 16 bit lines, W = 8 word lines, P = 2 subarrays).
//
// It exercises, and counts, each mechanism of the design:
//   normal-mode write and read of single cells in a chosen subarray,
//   parallel test-mode write and read of the even and odd bit line groups in
//   all subarrays at once, a comparator mismatch setting the error latch,
//   the latch being clamped by a write and by normal mode, a complete
//   built-in test run on a fault-free array (pass, exact operation count and
//   run length, all phases visited, final memory contents), and two runs with
//   a cell disturbed in the middle of Algorithm 1 and of Algorithm 2, both of
//   which must fail.  Expected values come from a behavioural copy of the
//   memory kept in the testbench.
module tb_parallel_test_ram;
  import ptram_pkg::*;

  localparam int unsigned B = 16, W = 8, P = 2;
  localparam int unsigned BAW = $clog2(B), WAW = $clog2(W);
  localparam int unsigned EXP_OPS = 194 * W + 4 * B + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ctrl_t          ctrl;
  logic [0:0]     sub;
  logic [WAW-1:0] wl;
  logic [BAW-1:0] bl;
  logic           din;
  logic [P-1:0]   dout, error;
  logic           start, busy, done, fail;
  logic [31:0]    fail_count, fail_op, op_count;
  phase_t         phase;

  parallel_test_ram #(.B(B), .W(W), .P(P)) dut (
    .clk, .rst_n,
    .ext_ctrl_i(ctrl), .ext_sub_i(sub), .ext_wl_addr_i(wl), .ext_bl_addr_i(bl),
    .ext_din_i(din), .dout_o(dout), .error_o(error),
    .bist_start_i(start), .bist_busy_o(busy), .bist_done_o(done),
    .bist_fail_o(fail), .bist_fail_count_o(fail_count), .bist_fail_op_o(fail_op),
    .bist_op_count_o(op_count), .bist_phase_o(phase));

  int checks = 0, failures = 0;
  logic model [P][W][B];

  // mechanism counters
  int n_norm_wr = 0, n_norm_rd = 0, n_par_wr = 0, n_par_rd = 0;
  int n_err_set = 0, n_clamp = 0, n_bist_pass = 0, n_bist_fail = 0;
  int phase_seen [9];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam ctrl_t NRD = '{test: 1'b0, l1: 1'b1, l2: 1'b1, we: 1'b0, re: 1'b1};
  localparam ctrl_t NWR = '{test: 1'b0, l1: 1'b1, l2: 1'b1, we: 1'b1, re: 1'b0};

  // Issue one operation and wait until its result is visible.
  task automatic op(ctrl_t c, int s, int w, int b, logic d);
    @(negedge clk);
    ctrl = c; sub = 1'(s); wl = WAW'(w); bl = BAW'(b); din = d;
    @(negedge clk);
    ctrl = '{test: c.test, l1: 1'b1, l2: 1'b1, we: 1'b0, re: 1'b0};  // mode pin stays
    @(negedge clk);
  endtask

  function automatic ctrl_t tgrp(bit odd, bit we);
    return '{test: 1'b1, l1: odd, l2: !odd, we: we, re: !we};
  endfunction

  task automatic run_bist(output int cycles);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100000) begin
      phase_seen[phase]++;
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    bit v;
    ctrl = CTRL_IDLE; sub = '0; wl = '0; bl = '0; din = 1'b0; start = 1'b0;
    foreach (phase_seen[k]) phase_seen[k] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // ---- normal mode: random single-cell writes then reads
    for (int s = 0; s < int'(P); s++)
      for (int w = 0; w < int'(W); w++)
        for (int b = 0; b < int'(B); b++) begin
          v = 1'($urandom);
          model[s][w][b] = v;
          op(NWR, s, w, b, v);
          n_norm_wr++;
        end
    for (int k = 0; k < 64; k++) begin
      int s = $urandom_range(P-1), w = $urandom_range(W-1), b = $urandom_range(B-1);
      op(NRD, s, w, b, 1'b0);
      n_norm_rd++;
      check(dout[s] == model[s][w][b], $sformatf("normal read s%0d w%0d b%0d", s, w, b));
      check(error == '0, "error latch clamped in normal mode");
    end

    // ---- parallel test mode: write a group in every subarray, read it back
    for (int w = 0; w < int'(W); w++)
      for (int g = 0; g < 2; g++) begin
        v = 1'($urandom);
        op(tgrp(g[0], 1'b1), 0, w, 0, v);
        n_par_wr++;
        for (int s = 0; s < int'(P); s++)
          for (int b = g; b < int'(B); b += 2) model[s][w][b] = v;
        op(tgrp(g[0], 1'b0), 0, w, 0, 1'b0);
        n_par_rd++;
        check(dout == {P{v}}, "parallel read data");
        check(error == '0, "no error on uniform group");
      end
    // the other group was not disturbed by the group writes
    for (int k = 0; k < 32; k++) begin
      int s = $urandom_range(P-1), w = $urandom_range(W-1), b = $urandom_range(B-1);
      op(NRD, s, w, b, 1'b0);
      check(dout[s] == model[s][w][b], "cell after group writes");
    end

    // ---- mismatch: disturb one odd cell of subarray 1, word line 3
    op(tgrp(1'b1, 1'b1), 0, 3, 0, 1'b0);            // odd group of wl 3 := 0
    op(NWR, 1, 3, 5, 1'b1);                          // one cell := 1
    op(tgrp(1'b1, 1'b0), 0, 3, 0, 1'b0);             // parallel read
    check(error == 2'b10, "error latch set only in the disturbed subarray");
    check(dout == 2'b10, "wired-OR data out of the disturbed group");
    if (error[1]) n_err_set++;
    op(tgrp(1'b0, 1'b0), 0, 3, 0, 1'b0);             // a second read keeps it
    check(error == 2'b10, "error latch holds across reads");
    op(tgrp(1'b0, 1'b1), 0, 6, 0, 1'b0);             // any write clamps it
    check(error == 2'b00, "error latch clamped by a write");
    if (error == 2'b00) n_clamp++;
    op(tgrp(1'b1, 1'b0), 0, 3, 0, 1'b0);
    check(error == 2'b10, "error set again");
    op(NRD, 0, 0, 0, 1'b0);                          // normal mode clamps it
    ctrl = CTRL_IDLE;
    check(error == 2'b00, "error latch clamped in normal mode");
    if (error == 2'b00) n_clamp++;

    // ---- built-in test on a fault-free array
    run_bist(cyc);
    check(done && !fail, "fault-free built-in test passes");
    check(fail_count == 0, "no failing reads");
    check(op_count == EXP_OPS, $sformatf("operation count %0d, expected %0d", op_count, EXP_OPS));
    check(cyc == int'(EXP_OPS) + 4, $sformatf("run length %0d cycles, expected %0d", cyc, EXP_OPS + 4));
    if (done && !fail) n_bist_pass++;
    for (int k = int'(PH_A1_INIT0); k <= int'(PH_FLUSH); k++)
      check(phase_seen[k] > 0, $sformatf("phase %0d visited", k));
    // final contents: even bit lines 1, odd bit lines 0, word line 0 cleared
    for (int k = 0; k < 48; k++) begin
      int s = $urandom_range(P-1), w = $urandom_range(W-1), b = $urandom_range(B-1);
      op(NRD, s, w, b, 1'b0);
      check(dout[s] == ((w != 0) && (b % 2 == 0)), $sformatf("final cell s%0d w%0d b%0d", s, w, b));
    end

    // ---- a cell upset during Algorithm 1 must be caught
    fork
      run_bist(cyc);
      begin
        wait (phase == PH_A1_LOOP);
        repeat (300) @(negedge clk);
        dut.g_sub[1].u_sub.u_array.cells[5][7] = !dut.g_sub[1].u_sub.u_array.cells[5][7];
      end
    join
    check(done && fail, "upset during Algorithm 1 detected");
    check(fail_count > 0, "failing reads counted");
    if (fail) n_bist_fail++;

    // ---- a cell upset ahead of the Algorithm 2 scan must be caught
    fork
      run_bist(cyc);
      begin
        wait (phase == PH_A2_UP);
        repeat (4) @(negedge clk);
        dut.g_sub[0].u_sub.u_array.cells[0][B-2] = 1'b1;   // pretend a multiple access
      end
    join
    check(done && fail, "disturbance during Algorithm 2 detected");
    check(fail_op > 194 * W, "first failure lies in Algorithm 2");
    if (fail) n_bist_fail++;

    // ---- every mechanism happened
    check(n_norm_wr > 0, "normal writes");
    check(n_norm_rd > 0, "normal reads");
    check(n_par_wr > 0,  "parallel writes");
    check(n_par_rd > 0,  "parallel reads");
    check(n_err_set > 0, "error latch set");
    check(n_clamp == 2,  "error latch clamped by write and by normal mode");
    check(n_bist_pass == 1, "built-in test pass");
    check(n_bist_fail == 2, "built-in test fail");
    $display("mechanisms: norm_wr=%0d norm_rd=%0d par_wr=%0d par_rd=%0d err_set=%0d clamp=%0d bist_pass=%0d bist_fail=%0d",
             n_norm_wr, n_norm_rd, n_par_wr, n_par_rd, n_err_set, n_clamp, n_bist_pass, n_bist_fail);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
