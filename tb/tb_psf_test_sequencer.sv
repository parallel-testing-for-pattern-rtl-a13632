// Testbench of the test sequencer, connected to a behavioural model of one
// subarray (B = 8, W = 8) kept in this file: same two-cycle timing, group
// select by L1 / L2, wired-OR data out and an error flag for a non-uniform
// group.
//
// Checks: the fault-free run passes with exactly 194*W + 4*B + 1
// operations; at every procedure boundary the four-cell neighbourhood state
// of one cell of each class is recorded, and the eight states of every loop
// must equal the transition write sequences tabulated for the algorithm
// (state bit 0: the cell, bit 1: its neighbour on the same bit line,
// bit 2: on the same word line, bit 3: diagonal); Algorithm 2 must scan the
// bit lines up then down in normal mode; a stuck-at cell must make the run
// fail.  The model can also take decoder faults: a word line address that
// raises a second word line (caught in Algorithm 1), and a bit line address
// that in normal mode also selects a bit line of the other parity above or
// below it (invisible to Algorithm 1, caught in Algorithm 2).
module tb_psf_test_sequencer;
  import ptram_pkg::*;
  localparam int unsigned B = 8, W = 8, P = 1;
  localparam int unsigned PROC_OPS = (W / 2) * 6;
  localparam int unsigned EXP_OPS = 194 * W + 4 * B + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, busy, done, fail;
  logic [31:0] fail_count, fail_op, op_count;
  phase_t phase;
  ctrl_t ctrl;
  logic [2:0] wl, bl;
  logic din;
  logic [0:0] dout, error;

  psf_test_sequencer #(.B(B), .W(W), .P(P)) dut (
    .clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done), .fail_o(fail),
    .fail_count_o(fail_count), .fail_op_o(fail_op), .op_count_o(op_count), .phase_o(phase),
    .ctrl_o(ctrl), .wl_addr_o(wl), .bl_addr_o(bl), .din_o(din), .dout_i(dout), .error_i(error));

  // ---------------- behavioural subarray
  logic mem [W][B];
  ctrl_t c_q; logic [2:0] wl_q, bl_q; logic din_q;
  int stuck_w = -1, stuck_b = -1; logic stuck_v;
  int wl_from = -1, wl_also = -1;   // word line decoder multiple access
  int bl_from = -1, bl_also = -1;   // bit line decoder multiple access
  int a2_reads_up = 0, a2_reads_down = 0, a2_order_bad = 0, last_bl = -1;

  always_ff @(posedge clk) begin
    c_q <= ctrl; wl_q <= wl; bl_q <= bl; din_q <= din;
    if (c_q.we || c_q.re) begin
      logic o, u, first, sel, rsel;
      logic [B-1:0] row;
      o = 1'b0; u = 1'b1; first = 1'b0; row = '0;
      for (int r = 0; r < int'(W); r++) begin
        rsel = (r == int'(wl_q)) || (int'(wl_q) == wl_from && r == wl_also);
        for (int i = 0; i < int'(B); i++) begin
          sel = c_q.test ? ((i % 2 == 0) ? !c_q.l1 : !c_q.l2)
                         : (i == int'(bl_q)) || (int'(bl_q) == bl_from && i == bl_also);
          if (rsel && sel && c_q.we) mem[r][i] <= din_q;
          if (rsel) row[i] |= mem[r][i];          // raised rows share the bit lines
        end
      end
      if (c_q.re) begin
        for (int i = 0; i < int'(B); i++) begin
          sel = c_q.test ? ((i % 2 == 0) ? !c_q.l1 : !c_q.l2)
                         : (i == int'(bl_q)) || (int'(bl_q) == bl_from && i == bl_also);
          if (sel) o |= row[i];
        end
        for (int i = (c_q.l2 ? 0 : 1); i < int'(B); i += 2) begin
          if (i < 2) first = row[i];
          else if (row[i] != first) u = 1'b0;
        end
        dout[0] <= o;
      end
      error[0] <= c_q.test && !c_q.we && c_q.re && !u ? 1'b1 : (c_q.we || !c_q.test) ? 1'b0 : error[0];
    end
    if (stuck_w >= 0) mem[stuck_w][stuck_b] <= stuck_v;
  end

  // Algorithm 2 bit line order
  always @(negedge clk)
    if (phase inside {PH_A2_UP, PH_A2_DOWN} && ctrl.re) begin
      if (ctrl.test) a2_order_bad++;
      if (phase == PH_A2_UP) begin
        if (int'(bl) != last_bl + 1) a2_order_bad++;
        a2_reads_up++;
      end else begin
        if (!(int'(bl) == last_bl - 1 || (a2_reads_down == 0 && int'(bl) == int'(B) - 1))) a2_order_bad++;
        a2_reads_down++;
      end
      last_bl = int'(bl);
    end

  // ---------------- expected neighbourhood cycles, one row per loop and
  // cell class (A odd/odd, B odd/even, C even/even, D even/odd)
  typedef int cyc_t [9];
  cyc_t tour [8][4];
  initial begin
    tour[0] = '{'{0,1,9,13,15,14,6,2,0}, '{0,2,6,14,15,13,9,1,0}, '{0,8,9,11,15,7,6,4,0}, '{0,4,6,7,15,11,9,8,0}};
    tour[1] = '{'{0,2,6,14,15,13,9,1,0}, '{0,1,9,13,15,14,6,2,0}, '{0,4,6,7,15,11,9,8,0}, '{0,8,9,11,15,7,6,4,0}};
    tour[2] = '{'{0,8,9,11,15,7,6,4,0}, '{0,4,6,7,15,11,9,8,0}, '{0,1,9,13,15,14,6,2,0}, '{0,2,6,14,15,13,9,1,0}};
    tour[3] = '{'{0,4,6,7,15,11,9,8,0}, '{0,8,9,11,15,7,6,4,0}, '{0,2,6,14,15,13,9,1,0}, '{0,1,9,13,15,14,6,2,0}};
    tour[4] = '{'{12,4,5,7,3,11,10,8,12}, '{12,8,10,11,3,7,5,4,12}, '{3,2,10,14,12,13,5,1,3}, '{3,1,5,13,12,14,10,2,3}};
    tour[5] = '{'{12,8,10,11,3,7,5,4,12}, '{12,4,5,7,3,11,10,8,12}, '{3,1,5,13,12,14,10,2,3}, '{3,2,10,14,12,13,5,1,3}};
    tour[6] = '{'{12,13,5,1,3,2,10,14,12}, '{12,14,10,2,3,1,5,13,12}, '{3,11,10,8,12,4,5,7,3}, '{3,7,5,4,12,8,10,11,3}};
    tour[7] = '{'{12,14,10,2,3,1,5,13,12}, '{12,13,5,1,3,2,10,14,12}, '{3,7,5,4,12,8,10,11,3}, '{3,11,10,8,12,4,5,7,3}};
  end

  // observed cell of each class: (bit line, word line)
  localparam int OBS_B [4] = '{3, 3, 4, 4};
  localparam int OBS_W [4] = '{3, 4, 4, 3};

  function automatic int nstate(int t);
    int i = OBS_B[t], j = OBS_W[t];
    return int'(mem[j][i]) + 2 * int'(mem[j-1][i]) + 4 * int'(mem[j][i+1]) + 8 * int'(mem[j-1][i+1]);
  endfunction

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // operation number at which loop L starts
  function automatic int loop_start(int l);
    return int'(W) + l * 8 * int'(PROC_OPS) + ((l >= 4) ? int'(W) : 0);
  endfunction

  int tour_bad = 0, tour_checked = 0;
  always @(negedge clk)
    if (busy)
      for (int l = 0; l < 8; l++)
        for (int s = 0; s <= 8; s++)
          if (int'(op_count) == loop_start(l) + s * int'(PROC_OPS) + 2 && stuck_w < 0)
            for (int t = 0; t < 4; t++) begin
              tour_checked++;
              if (nstate(t) != tour[l][t][s]) begin
                tour_bad++;
                $display("loop %0d step %0d class %0d: state %0d, expected %0d", l, s, t, nstate(t), tour[l][t][s]);
              end
            end

  task automatic run(output int cycles);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100000) begin @(negedge clk); cycles++; end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 1'b0; dout = '0; error = '0; c_q = CTRL_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!busy && !done, "idle after reset");

    run(cyc);
    check(done && !fail, "fault-free run passes");
    check(op_count == EXP_OPS, $sformatf("op count %0d, expected %0d", op_count, EXP_OPS));
    check(cyc == int'(EXP_OPS) + 4, $sformatf("run length %0d", cyc));
    check(tour_checked == 8 * 9 * 4, $sformatf("neighbourhood states sampled: %0d", tour_checked));
    check(tour_bad == 0, "neighbourhood tours match the tabulated sequences");
    check(a2_reads_up == int'(B) && a2_reads_down == int'(B), "Algorithm 2 reads every bit line twice");
    check(a2_order_bad == 0, "Algorithm 2 scans up then down in normal mode");

    // stuck-at-0 cell
    stuck_w = 5; stuck_b = 2; stuck_v = 1'b0;
    run(cyc);
    check(done && fail && fail_count > 0, "stuck-at-0 cell detected");
    // stuck-at-1 cell on an odd bit line
    stuck_w = 2; stuck_b = 7; stuck_v = 1'b1;
    run(cyc);
    check(done && fail && fail_count > 0, "stuck-at-1 cell detected");
    stuck_w = -1;
    // word line decoder: address 6 also raises word line 1
    wl_from = 6; wl_also = 1;
    run(cyc);
    check(done && fail, "word line multiple access detected");
    check(fail_op < 194 * W, "word line fault caught by Algorithm 1");
    wl_from = -1;
    // bit line decoder: address 2 also selects bit line 5 (j > i)
    bl_from = 2; bl_also = 5;
    run(cyc);
    check(done && fail, "bit line multiple access to a higher line detected");
    check(fail_op >= 194 * W, $sformatf("higher-line fault first caught by Algorithm 2 (op %0d)", fail_op));
    // bit line decoder: address 6 also selects bit line 1 (j < i)
    bl_from = 6; bl_also = 1;
    run(cyc);
    check(done && fail, "bit line multiple access to a lower line detected");
    check(fail_op >= 194 * W, $sformatf("lower-line fault first caught by Algorithm 2 (op %0d)", fail_op));
    bl_from = -1;
    // healthy again: a new start clears the verdict
    run(cyc);
    check(done && !fail && fail_count == 0, "verdict cleared by a new run");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
