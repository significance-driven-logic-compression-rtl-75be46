// fa_approx3: approximate full adder 3 (14 transistors).
//
// The exact full adder's sum is the complement of its carry in six of the
// eight input patterns, so this cell keeps the exact mirror carry stage and
// takes the sum as the inverted carry: co = ab + b.ci + a.ci, sum = ~co.
// The sum is wrong for 000 (gives 1) and 111 (gives 0). Combinational.
module fa_approx3 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  always_comb begin
    co  = (a & b) | (b & ci) | (a & ci);
    sum = ~co;
  end
endmodule
