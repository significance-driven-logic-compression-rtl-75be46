// tb_fa_approx2: exhaustive check of fa_approx2 against its truth table.
//
// All eight input patterns (a, b, ci) are applied; the expected sum and
// carry come from the full-adder truth table of the approximate adder 2 (sum = a'b'ci + ab.ci, co = b + a.ci), held
// here as two 8-bit constants indexed by {a, b, ci}.
module tb_fa_approx2;
  localparam logic [7:0] EXP_SUM = 8'h82;
  localparam logic [7:0] EXP_CO  = 8'hEC;

  logic a, b, ci, sum, co;
  int checks = 0, failures = 0;

  fa_approx2 dut (.a(a), .b(b), .ci(ci), .sum(sum), .co(co));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      checks += 2;
      if (sum !== EXP_SUM[v]) begin
        failures++;
        $display("FAIL abc=%03b sum=%0b expected %0b", v[2:0], sum, EXP_SUM[v]);
      end
      if (co !== EXP_CO[v]) begin
        failures++;
        $display("FAIL abc=%03b co=%0b expected %0b", v[2:0], co, EXP_CO[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
