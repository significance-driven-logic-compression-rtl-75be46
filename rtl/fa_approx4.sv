// fa_approx4: approximate full adder 4 (11 transistors).
//
// The reduced carry stage of approximate adder 2 (co = b + a.ci) combined
// with the sum-as-inverted-carry idea of approximate adder 3 (sum = ~co).
// Against the exact adder the carry is wrong for 010 and the sum for 000,
// 010 and 111. Combinational.
module fa_approx4 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  always_comb begin
    co  = b | (a & ci);
    sum = ~co;
  end
endmodule
