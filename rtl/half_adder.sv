// half_adder: exact two-input adder used in the columns of the accumulation
// tree that hold only two bits. sum = a ^ b, co = a & b. Combinational.
// The approximate cells are full adders; using exact half adders wherever a
// column holds two bits is this design's own choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic co
);
  always_comb begin
    sum = a ^ b;
    co  = a & b;
  end
endmodule
