// tb_sdlc_rca: checks the final ripple-carry adder.
//
// Random pairs of rows in the form the Wallace stages leave them (bits
// 0-14 of sum_row, bits 4-15 of carry_row). The exact instance must give
// (sum_row + carry_row) mod 2**16. The default instance (approximate adder 3
// in columns 5-7) is compared with a ripple model written here from the
// cell's truth table: half adder in column 4, cells in columns 5-14, sum
// only in column 15.
module tb_sdlc_rca;
  import sdlc_pkg::*;
  import tb_sdlc_ref_pkg::*;

  logic [15:0] s, c, p_ex, p_ax;
  int checks = 0, failures = 0;

  sdlc_rca #(.KIND(ADD_EXACT)) dut_exact (.sum_row(s), .carry_row(c), .p(p_ex));
  sdlc_rca                     dut_dflt  (.sum_row(s), .carry_row(c), .p(p_ax));

  function automatic logic [15:0] model(input logic [15:0] x, y, input int kind);
    logic [15:0] p;
    logic cy;
    logic [1:0] r;
    p[3:0] = x[3:0] | y[3:0];
    r = ref_ha(x[4], y[4]); p[4] = r[0]; cy = r[1];
    for (int w = 5; w <= 14; w++) begin
      r = ref_fa((w < 8) ? kind : 0, y[w], x[w], cy);
      p[w] = r[0]; cy = r[1];
    end
    p[15] = x[15] ^ y[15] ^ cy;
    return p;
  endfunction

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
    for (int n = 0; n < 20000; n++) begin
      s = 16'($urandom) & 16'h7FFF;
      c = 16'($urandom) & 16'hFFF0;
      #1;
      check(p_ex == 16'(s + c), $sformatf("exact %h+%h gave %h", s, c, p_ex));
      check(p_ax == model(s, c, 3), $sformatf("approx %h+%h gave %h expected %h", s, c, p_ax, model(s, c, 3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
