// Testbench of the data-in / data-out buffers: random load and read strobes
// with random data; the data-in side must capture on load and the data-out
// side on a read, each holding otherwise.
module tb_data_buffer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic load, din, wd, rd, mux, dout, e_wd, e_dout;
  int checks = 0, failures = 0;

  data_buffer dut (.clk, .rst_n, .load_i(load), .din_i(din), .wdata_o(wd), .rd_i(rd), .mux_i(mux), .dout_o(dout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; rd = 1'b0; din = 1'b0; mux = 1'b0;
    @(negedge clk); rst_n = 1'b1; e_wd = 1'b0; e_dout = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      load = 1'($urandom); rd = 1'($urandom); din = 1'($urandom); mux = 1'($urandom);
      @(negedge clk);
      if (load) e_wd = din;
      if (rd) e_dout = mux;
      checks += 2;
      if (wd != e_wd) failures++;
      if (dout != e_dout) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
