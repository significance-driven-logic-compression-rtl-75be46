// tb_sdlc_wallace: checks the two Wallace stages on random compressed
// matrices.
//
// Random bits are placed at every weight each row can hold (rows 1-4 span
// weights 0-14, 2-13, 4-12 and 6-11). An instance built from exact cells
// must leave two rows whose sum equals the arithmetic sum of the four input
// rows, with carry_row[3:0] and sum_row[15] zero. A second instance with
// the default parameters (approximate adder 3 below column 8) is checked on
// matrices produced from real operands against the reference model: its
// two rows, added exactly by the reference ripple adder, must match.
module tb_sdlc_wallace;
  import sdlc_pkg::*;
  import tb_sdlc_ref_pkg::*;

  localparam logic [3:0][15:0] MASK = {16'h0FC0, 16'h1FF0, 16'h3FFC, 16'h7FFF};

  logic [3:0][15:0] rows_rand, rows_op;
  logic [15:0] s_ex, c_ex, s_ax, c_ax, p_ax;
  logic [7:0] a, b;
  int checks = 0, failures = 0;

  sdlc_wallace #(.KIND(ADD_EXACT)) dut_exact (.rows(rows_rand), .sum_row(s_ex), .carry_row(c_ex));
  sdlc_ppm     #(.N(8))            u_ppm     (.a(a), .b(b), .rows(rows_op));
  sdlc_wallace                     dut_dflt  (.rows(rows_op), .sum_row(s_ax), .carry_row(c_ax));
  sdlc_rca     #(.KIND(ADD_APPROX3), .APPROX_COLS(8)) u_rca (.sum_row(s_ax), .carry_row(c_ax), .p(p_ax));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
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
    int unsigned tot;
    for (int n = 0; n < 20000; n++) begin
      for (int r = 0; r < 4; r++) rows_rand[r] = 16'($urandom) & MASK[r];
      a = 8'($urandom); b = 8'($urandom);
      #1;
      tot = 0;
      for (int r = 0; r < 4; r++) tot += int'(rows_rand[r]);
      check(int'(s_ex) + int'(c_ex) == tot,
            $sformatf("exact rows add to %0d, expected %0d", int'(s_ex) + int'(c_ex), tot));
      check(c_ex[3:0] == '0 && s_ex[15] == 1'b0, "reserved bits of the output rows");
      check(p_ax == ref_mult(a, b, 3, 8),
            $sformatf("a=%0d b=%0d: approx product %0d expected %0d", a, b, p_ax, ref_mult(a, b, 3, 8)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
