// tb_sdlc_mult: exhaustive check of the 8 x 8 SDLC multiplier in all five
// adder configurations.
//
// With exact adder cells the product must equal the value of the
// OR-compressed matrix (exact product less the OR-collision losses); with
// approximate adders 1-4 (default: 3) it must match the bit-level reference
// model. A few products computed offline for operand pairs of interest
// (100 x 100 among them) are checked as fixed numbers. The mean relative
// error of each configuration over operands 1..100 is printed.
module tb_sdlc_mult;
  import sdlc_pkg::*;
  import tb_sdlc_ref_pkg::*;

  logic [7:0] a, b;
  logic [15:0] p [5];
  int checks = 0, failures = 0;

  sdlc_mult #(.KIND(ADD_EXACT))   dut0 (.a(a), .b(b), .p(p[0]));
  sdlc_mult #(.KIND(ADD_APPROX1)) dut1 (.a(a), .b(b), .p(p[1]));
  sdlc_mult #(.KIND(ADD_APPROX2)) dut2 (.a(a), .b(b), .p(p[2]));
  sdlc_mult                       dut3 (.a(a), .b(b), .p(p[3]));
  sdlc_mult #(.KIND(ADD_APPROX4)) dut4 (.a(a), .b(b), .p(p[4]));

  typedef struct { int x; int y; int e[5]; } spot_t;
  spot_t spots [6] = '{
    '{100, 100, '{10000,  9984, 10048, 10224, 10336}},
    '{255, 255, '{61355, 61323, 61323, 61179, 61147}},
    '{203,  77, '{15623, 15383, 15447, 15495, 15575}},
    '{125, 200, '{23464, 23048, 23560, 23544, 23800}},
    '{ 78, 129, '{10062,  9998,  9998, 10238, 10462}},
    '{170,  85, '{14450, 14354, 14418, 14434, 14434}}
  };

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL a=%0d b=%0d: %s", a, b, what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real err [5];
    int  nerr;
    foreach (err[k]) err[k] = 0.0;
    nerr = 0;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        check(int'(p[0]) == ref_sdlc_value(a, b), $sformatf("exact cells: %0d", p[0]));
        for (int k = 1; k < 5; k++)
          check(p[k] == ref_mult(a, b, k, 8), $sformatf("adder %0d: %0d expected %0d", k, p[k], ref_mult(a, b, k, 8)));
        if (x >= 1 && x <= 100 && y >= 1 && y <= 100) begin
          nerr++;
          for (int k = 0; k < 5; k++)
            err[k] += ((int'(p[k]) > x*y) ? real'(int'(p[k]) - x*y) : real'(x*y - int'(p[k]))) / real'(x*y);
        end
      end
    end
    foreach (spots[s]) begin
      a = 8'(spots[s].x); b = 8'(spots[s].y);
      #1;
      for (int k = 0; k < 5; k++)
        check(int'(p[k]) == spots[s].e[k], $sformatf("spot kind %0d: %0d expected %0d", k, p[k], spots[s].e[k]));
    end
    for (int k = 0; k < 5; k++)
      $display("kind %0d: mean relative error over 1..100 x 1..100 = %0.2f %%", k, 100.0 * err[k] / nerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
