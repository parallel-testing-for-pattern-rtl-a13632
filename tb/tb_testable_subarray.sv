// Testbench of one testable subarray (B = 16, W = 8).
//
// Normal-mode random writes and reads against a behavioural copy of the
// cells; test-mode group writes and reads (data out is the OR of the group,
// error flag set when the group is not uniform); the error latch clamped by
// writes and by normal mode; operations disabled by chip select; and the
// two-cycle latency: read data issued in cycle t must not be visible in
// t+1 and must be visible in t+2.
module tb_testable_subarray;
  import ptram_pkg::*;
  localparam int unsigned B = 16, W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cs, din, dout, err;
  ctrl_t ctrl;
  logic [2:0] wl;
  logic [3:0] bl;
  logic model [W][B];
  int checks = 0, failures = 0;

  testable_subarray #(.B(B), .W(W)) dut (.clk, .rst_n, .cs_i(cs), .ctrl_i(ctrl),
    .wl_addr_i(wl), .bl_addr_i(bl), .din_i(din), .dout_o(dout), .error_o(err));

  localparam ctrl_t NRD = '{test: 1'b0, l1: 1'b1, l2: 1'b1, we: 1'b0, re: 1'b1};
  localparam ctrl_t NWR = '{test: 1'b0, l1: 1'b1, l2: 1'b1, we: 1'b1, re: 1'b0};

  function automatic ctrl_t tg(bit odd, bit we);
    return '{test: 1'b1, l1: odd, l2: !odd, we: we, re: !we};
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic op(ctrl_t c, int w, int b, logic d, bit sel = 1'b1);
    @(negedge clk);
    cs = sel; ctrl = c; wl = 3'(w); bl = 4'(b); din = d;
    @(negedge clk);
    cs = 1'b1; ctrl = '{test: c.test, l1: 1'b1, l2: 1'b1, we: 1'b0, re: 1'b0};
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit v, o, u;
    cs = 1'b0; ctrl = CTRL_IDLE; wl = '0; bl = '0; din = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(dout == 1'b0 && err == 1'b0, "reset state");

    for (int w = 0; w < int'(W); w++)
      for (int b = 0; b < int'(B); b++) begin
        v = 1'($urandom); model[w][b] = v; op(NWR, w, b, v);
      end
    for (int k = 0; k < 100; k++) begin
      int w = $urandom_range(W-1), b = $urandom_range(B-1);
      op(NRD, w, b, 1'b0);
      check(dout == model[w][b], "normal read");
      check(err == 1'b0, "normal mode keeps the latch clear");
    end

    // test-mode reads of random (usually non-uniform) rows
    for (int k = 0; k < 100; k++) begin
      int w = $urandom_range(W-1), g = $urandom_range(1);
      if (k % 2 == 0) begin
        v = 1'($urandom);
        op(tg(g[0], 1'b1), w, 0, v);
        for (int b = g; b < int'(B); b += 2) model[w][b] = v;
        if (k % 4 == 0) begin                       // spoil one cell
          int b = 2 * $urandom_range(B/2-1) + g;
          model[w][b] = !v;
          op(NWR, w, b, !v);
        end
      end
      op(tg(g[0], 1'b0), w, 0, 1'b0);
      o = 1'b0; u = 1'b1;
      for (int b = g; b < int'(B); b += 2) begin
        o |= model[w][b];
        u &= (model[w][b] == model[w][g]);
      end
      check(dout == o, "test read data (OR of the group)");
      check(err == !u, $sformatf("error flag, uniform=%0d", u));
      op(tg(g[0], 1'b1), w, 0, model[w][g]);        // write clamps the latch
      for (int b = g; b < int'(B); b += 2) model[w][b] = model[w][g];
      check(err == 1'b0, "write clamps the latch");
    end

    // chip select low: no write
    op(NRD, 2, 3, 1'b0);
    v = dout;
    op(NWR, 2, 3, !v, 1'b0);
    op(NRD, 2, 3, 1'b0);
    check(dout == v, "deselected write ignored");

    // latency: result not visible after one cycle, visible after two
    op(NWR, 1, 1, 1'b1); op(NWR, 1, 2, 1'b0);
    op(NRD, 1, 1, 1'b0);
    check(dout == 1'b1, "read 1");
    @(negedge clk); ctrl = NRD; wl = 3'd1; bl = 4'd2;
    @(negedge clk); ctrl = CTRL_IDLE;
    check(dout == 1'b1, "data out unchanged one cycle after issue");
    @(negedge clk);
    check(dout == 1'b0, "data out updated two cycles after issue");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
