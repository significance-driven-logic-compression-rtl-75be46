// tb_sdlc_ppm: exhaustive check of the SDLC partial-product compressor
// (all 65536 operand pairs, N = 8).
//
// For each pair it checks that (1) every compressed row holds bits only at
// the weights of the remapped matrix (row 1: 0-14, row 2: 2-13, row 3: 4-12,
// row 4: 6-11); (2) the weighted sum of the four rows equals the exact
// product less one unit for every OR-merged pair whose two products are
// both 1; (3) a few individual bits: row 1 weight 7 = a7b0 | a6b1, row 2
// weight 9 = a6b3, row 4 weight 11 = a4b7, row 3 weight 4 = a0b4.
module tb_sdlc_ppm;
  import tb_sdlc_ref_pkg::*;

  localparam logic [3:0][15:0] MASK = {16'h0FC0, 16'h1FF0, 16'h3FFC, 16'h7FFF};

  logic [7:0] a, b;
  logic [3:0][15:0] rows;
  int checks = 0, failures = 0, collisions = 0;

  sdlc_ppm dut (.a(a), .b(b), .rows(rows));

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
    int unsigned sum, expv;
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a = 8'(x); b = 8'(y);
        #1;
        sum = 0;
        for (int r = 0; r < 4; r++) begin
          check((rows[r] & ~MASK[r]) == '0, $sformatf("row %0d has a bit outside its span", r + 1));
          sum += int'(rows[r]);
        end
        expv = ref_sdlc_value(a, b);
        if (expv != int'(a) * int'(b)) collisions++;
        check(sum == expv, $sformatf("row sum %0d expected %0d", sum, expv));
        check(rows[0][7]  == (a[7] & b[0] | a[6] & b[1]), "row1 w7");
        check(rows[1][9]  == (a[6] & b[3]), "row2 w9");
        check(rows[3][11] == (a[4] & b[7]), "row4 w11");
        check(rows[2][4]  == (a[0] & b[4]), "row3 w4");
      end
    end
    check(collisions > 0, "no OR collision seen");
    $display("pairs with an OR collision: %0d of 65536", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
