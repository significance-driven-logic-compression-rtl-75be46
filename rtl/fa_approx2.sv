// fa_approx2: approximate full adder 2 (16 transistors).
//
// Three transistors are removed from the carry stage, which reduces the carry
// to co = b + a.ci; the sum stage is the one of approximate adder 1,
// sum = a'b'ci + ab.ci. Against the exact full adder the carry is wrong for
// one input pattern (010) and the sum for two (010, 100). Combinational.
module fa_approx2 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  always_comb begin
    co  = b | (a & ci);
    sum = (~a & ~b & ci) | (a & b & ci);
  end
endmodule
