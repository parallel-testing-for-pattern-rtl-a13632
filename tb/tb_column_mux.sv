// Testbench of the column multiplexer, in its wired-OR and wired-AND forms:
// random row values and random select sets, compared with the OR / AND of
// the selected bits worked out bit by bit here.
module tb_column_mux;
  localparam int unsigned B = 16;
  logic [B-1:0] s, sel;
  logic o_or, o_and;
  int checks = 0, failures = 0;

  column_mux #(.B(B), .WIRED_AND(1'b0)) dut_or  (.sense_i(s), .sel_i(sel), .dout_o(o_or));
  column_mux #(.B(B), .WIRED_AND(1'b1)) dut_and (.sense_i(s), .sel_i(sel), .dout_o(o_and));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_or, e_and, any;
    for (int k = 0; k < 1000; k++) begin
      s = B'($urandom);
      unique case (k % 3)
        0: sel = B'(1) << $urandom_range(B-1);
        1: sel = (k % 2) ? 16'hAAAA : 16'h5555;
        default: sel = B'($urandom);
      endcase
      e_or = 1'b0; e_and = 1'b1; any = 1'b0;
      for (int i = 0; i < int'(B); i++)
        if (sel[i]) begin e_or |= s[i]; e_and &= s[i]; any = 1'b1; end
      if (!any) e_and = 1'b0;
      #1;
      checks += 2;
      if (o_or  != e_or)  begin failures++; $display("FAIL or  s=%h sel=%h", s, sel); end
      if (o_and != e_and) begin failures++; $display("FAIL and s=%h sel=%h", s, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
