// Testbench of the error latch: random sequences of test / normal mode,
// reads, writes and comparator results, checked against the latch rule
// (clear on a write or in normal mode, set on a test-mode read that
// mismatches, otherwise hold) evaluated here.
module tb_error_detector;
  logic clk = 1'b0, rst_n = 1'b0;
  logic test, rd, wr, same, err, model;
  int checks = 0, failures = 0, sets = 0;

  error_detector dut (.clk, .rst_n, .test_i(test), .rd_i(rd), .wr_i(wr), .same_i(same), .error_o(err));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    test = 1'b0; rd = 1'b0; wr = 1'b0; same = 1'b1;
    @(negedge clk); rst_n = 1'b1; model = 1'b0;
    checks++; if (err != 1'b0) failures++;
    for (int k = 0; k < 3000; k++) begin
      test = ($urandom_range(9) != 0);
      r = $urandom_range(3);
      case (r)
        0: begin rd = 1'b0; wr = 1'b0; end
        1: begin rd = 1'b0; wr = 1'b1; end
        default: begin rd = 1'b1; wr = 1'b0; end
      endcase
      same = ($urandom_range(3) != 0);
      @(negedge clk);
      if (!test || wr) model = 1'b0;
      else if (rd && !same) model = 1'b1;
      if (model) sets++;
      checks++;
      if (err != model) begin failures++; $display("FAIL k=%0d err=%0d exp=%0d", k, err, model); end
    end
    checks++; if (sets == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
