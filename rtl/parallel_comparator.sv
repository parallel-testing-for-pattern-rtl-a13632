// Parallel comparator: reports whether every bit line of the selected group
// reads the same value.
//
// Each sense amplifier output reaches the comparator through a pass gate
// pair steered by L2: L2 = 0 connects the odd bit lines, L2 = 1 the even
// ones, so Q = B/2 inputs are compared.  A series chain detects "all ones",
// a parallel pull-down bank detects "all zeros", and a coincidence detector
// gives same_o = 1 when either holds.  The dynamic precharge / discharge of
// the transistor circuit is replaced here by its static logic function.
//
// Interface: sense_i (B bits), l2_n_i (group select, as for the bit line
// decoder), all_one_o, all_zero_o, same_o.  Purely combinational.
module parallel_comparator #(
  parameter int unsigned B = 256,
  parameter int unsigned Q = B / 2
) (
  input  logic [B-1:0] sense_i,
  input  logic         l2_n_i,
  output logic         all_one_o,
  output logic         all_zero_o,
  output logic         same_o
);

  logic [Q-1:0] grp;

  always_comb begin
    for (int unsigned k = 0; k < Q; k++)
      grp[k] = l2_n_i ? sense_i[2*k] : sense_i[2*k+1];
    all_one_o  = &grp;   // series chain T1..T(l-1) conducts
    all_zero_o = ~|grp;  // no device of the parallel bank P1..P(l-1) conducts
    same_o     = all_one_o || all_zero_o;
  end

endmodule
