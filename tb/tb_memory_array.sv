// Testbench of the memory array: random writes of random bit line subsets
// on random word lines, each followed by a read of a random word line,
// compared with a behavioural copy of the cells.  A read with two word lines
// raised must return the OR of the rows.
module tb_memory_array;
  localparam int unsigned B = 16, W = 8;
  logic clk = 1'b0;
  logic [W-1:0] wl;
  logic [B-1:0] we, rd;
  logic d;
  logic [B-1:0] model [W];
  int checks = 0, failures = 0;

  memory_array #(.B(B), .W(W)) dut (.clk, .wl_i(wl), .bl_we_i(we), .wdata_i(d), .rdata_o(rd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r;
    // fill every row
    for (int j = 0; j < int'(W); j++) begin
      @(negedge clk); wl = W'(1) << j; we = '1; d = 1'b0; model[j] = '0;
    end
    for (int k = 0; k < 600; k++) begin
      @(negedge clk);
      r = $urandom_range(W-1);
      wl = W'(1) << r; we = B'($urandom); d = 1'($urandom);
      model[r] = (model[r] & ~we) | ({B{d}} & we);
      @(negedge clk);
      r = $urandom_range(W-1);
      wl = W'(1) << r; we = '0;
      #1;
      checks++;
      if (rd != model[r]) begin failures++; $display("FAIL row %0d rd=%h exp=%h", r, rd, model[r]); end
    end
    @(negedge clk);
    wl = 8'b0000_0101; we = '0; #1;
    checks++;
    if (rd != (model[0] | model[2])) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
