// Testbench of the address buffer: random addresses with random load
// strobes; the buffer must capture on load, hold otherwise, and clear on
// reset.  The expected value is a shadow register kept here.
module tb_address_buffer;
  localparam int unsigned WIDTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, load;
  logic [WIDTH-1:0] a, q, shadow;
  int checks = 0, failures = 0;

  address_buffer #(.WIDTH(WIDTH)) dut (.clk, .rst_n, .load_i(load), .addr_i(a), .addr_o(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; a = '0;
    @(negedge clk);
    checks++; if (q != '0) failures++;
    rst_n = 1'b1; shadow = '0;
    for (int k = 0; k < 500; k++) begin
      load = 1'($urandom); a = WIDTH'($urandom);
      @(negedge clk);
      if (load) shadow = a;
      checks++;
      if (q != shadow) begin failures++; $display("FAIL k=%0d q=%h exp=%h", k, q, shadow); end
    end
    TB_END: begin
      rst_n = 1'b0; #1;
      checks++; if (q != '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
