// Testbench of the modified bit line decoder.  Normal mode (TEST = 0,
// L1 = L2 = 1) must select exactly the addressed bit line; test mode must
// ignore the address and select the even bit lines for L1 = 0, the odd ones
// for L2 = 0, all for both low and none for both high; a disabled decoder
// selects nothing.
module tb_bitline_decoder;
  localparam int unsigned B = 16;
  localparam logic [B-1:0] EVEN = 16'h5555, ODD = 16'hAAAA;
  logic en, test, l1, l2;
  logic [3:0] a;
  logic [B-1:0] bl, exp_bl;
  int checks = 0, failures = 0;

  bitline_decoder #(.B(B)) dut (.en_i(en), .test_i(test), .l1_n_i(l1), .l2_n_i(l2), .addr_i(a), .bl_o(bl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what);
    #1;
    checks++;
    if (bl != exp_bl) begin failures++; $display("FAIL %s: bl=%h exp=%h", what, bl, exp_bl); end
  endtask

  initial begin
    en = 1'b1;
    // normal mode
    test = 1'b0; l1 = 1'b1; l2 = 1'b1;
    for (int k = 0; k < int'(B); k++) begin
      a = 4'(k); exp_bl = B'(1) << k; chk("normal");
    end
    // test mode, address ignored
    test = 1'b1;
    for (int k = 0; k < 8; k++) begin
      a = 4'($urandom);
      l1 = 1'b0; l2 = 1'b1; exp_bl = EVEN; chk("even group");
      l1 = 1'b1; l2 = 1'b0; exp_bl = ODD;  chk("odd group");
      l1 = 1'b0; l2 = 1'b0; exp_bl = '1;   chk("both groups");
      l1 = 1'b1; l2 = 1'b1; exp_bl = '0;   chk("no group");
    end
    // disabled
    en = 1'b0; test = 1'b0; l1 = 1'b0; l2 = 1'b0; a = 4'd3; exp_bl = '0; chk("disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
