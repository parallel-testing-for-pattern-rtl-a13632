// Testbench of the word line decoder: every address with the decoder
// enabled must raise exactly that word line; disabled, none.
module tb_wordline_decoder;
  localparam int unsigned W = 32;
  logic en;
  logic [4:0] a;
  logic [W-1:0] wl;
  int checks = 0, failures = 0;

  wordline_decoder #(.W(W)) dut (.en_i(en), .addr_i(a), .wl_o(wl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int k = 0; k < int'(W); k++) begin
        en = e[0]; a = 5'(k);
        #1;
        checks++;
        if (wl != (e ? (W'(1) << k) : '0)) begin
          failures++; $display("FAIL en=%0d a=%0d wl=%h", e, k, wl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
