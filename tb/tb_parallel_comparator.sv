// Testbench of the parallel comparator: rows where the selected group is all
// ones, all zeros, or has one bit flipped (with the other group random), and
// fully random rows; L2 chooses the group.  Expectations are computed here
// from the group's bits.
module tb_parallel_comparator;
  localparam int unsigned B = 16;
  logic [B-1:0] s;
  logic l2, one, zero, same;
  int checks = 0, failures = 0;

  parallel_comparator #(.B(B)) dut (.sense_i(s), .l2_n_i(l2), .all_one_o(one), .all_zero_o(zero), .same_o(same));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones, n;
    for (int k = 0; k < 2000; k++) begin
      l2 = 1'($urandom);
      s = B'($urandom);
      if (k % 4 != 3) begin
        // make the selected group uniform, maybe with one bit flipped
        for (int i = (l2 ? 0 : 1); i < int'(B); i += 2) s[i] = k[0];
        if (k % 4 == 2) s[2*$urandom_range(B/2-1) + (l2 ? 0 : 1)] ^= 1'b1;
      end
      ones = 0; n = 0;
      for (int i = (l2 ? 0 : 1); i < int'(B); i += 2) begin ones += s[i]; n++; end
      #1;
      checks += 3;
      if (one  != (ones == n)) failures++;
      if (zero != (ones == 0)) failures++;
      if (same != (ones == n || ones == 0)) begin failures++; $display("FAIL s=%h l2=%0d", s, l2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
