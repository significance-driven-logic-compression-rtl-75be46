// fa_approx1: approximate full adder 1 (19 transistors).
//
// The carry stage of the mirror adder is kept whole; five transistors are
// taken out of the sum stage, which leaves sum = a'b'ci + ab.ci. The carry
// is exact (majority of a, b, ci); the sum is wrong for two of the eight
// input patterns (a,b,ci = 010 and 100 give 0 instead of 1). Combinational.
module fa_approx1 (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  always_comb begin
    co  = (a & b) | (b & ci) | (a & ci);
    sum = (~a & ~b & ci) | (a & b & ci);
  end
endmodule
