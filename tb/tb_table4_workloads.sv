// Built-in test of the RAM sizes of the 1M-bit, 4M-bit and 16M-bit
// configurations (8, 8 and 16 partitions).  Partitions are 512 x 256,
// 1024 x 512 and 1024 x 1024 cells (power-of-two shapes; the evaluated
// eccentricity 1.2 has none).
// Each run must pass and issue 194*W + 4*B + 1 operations; the test time at
// a 200 ns cycle is printed.  The 256K-bit configuration is the default
// size and runs in the full-size testbench.
module tb_table4_workloads;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        start = 1'b0;
  logic [2:0]  done, fail;
  logic [31:0] ops [3];
  int checks = 0, failures = 0;

  bist_workload #(.B(512),  .W(256), .P(8)) u_1m (.clk, .rst_n, .start, .done(done[0]), .fail(fail[0]), .ops(ops[0]));
  bist_workload #(.B(1024), .W(512), .P(8)) u_4m (.clk, .rst_n, .start, .done(done[1]), .fail(fail[1]), .ops(ops[1]));
  bist_workload #(.B(1024), .W(1024), .P(16)) u_16m (.clk, .rst_n, .start, .done(done[2]), .fail(fail[2]), .ops(ops[2]));

  localparam int EXP [3] = '{194 * 256 + 4 * 512 + 1, 194 * 512 + 4 * 1024 + 1, 194 * 1024 + 4 * 1024 + 1};
  localparam string NAME [3] = '{"1M-bit, 8 x 512 x 256", "4M-bit, 8 x 1024 x 512", "16M-bit, 16 x 1024 x 1024"};

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (&done);
    for (int k = 0; k < 3; k++) begin
      checks += 2;
      if (fail[k]) begin failures++; $display("FAIL: %s built-in test failed", NAME[k]); end
      if (int'(ops[k]) != EXP[k]) begin
        failures++; $display("FAIL: %s issued %0d operations, expected %0d", NAME[k], ops[k], EXP[k]);
      end
      $display("%s: %0d operations, %0.2f ms at 200 ns", NAME[k], ops[k], real'(ops[k]) * 200.0e-6);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
