// tb_sdlc_gauss_filter: end-to-end test of the Gaussian blur filter at its
// default parameters (approximate adder 3 below product column 8).
//
// A 64 x 64 grayscale test image is generated (a diagonal gradient with a
// bright square and pseudo-random noise). Every interior pixel's 3x3
// window is streamed through the filter, one per clock, with idle cycles
// inserted at random. Each output is compared with the reference: nine
// products from the bit-level multiplier model, summed, shifted right by 10
// and saturated at 255. The latency (one clock from in_valid to out_valid)
// and the count of outputs are checked. The test also counts how often the
// two error mechanisms of the multiplier acted on a product (an OR merge of
// two 1s; an approximate adder changing the result) and fails if either
// never did. Finally it reports the PSNR of the filtered image against the
// same filter with exact multiplications.
module tb_sdlc_gauss_filter;
  import sdlc_pkg::*;
  import tb_sdlc_ref_pkg::*;

  localparam int IMG = 64;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [8:0][7:0] window;
  logic out_valid;
  logic [7:0] pixel;

  int checks = 0, failures = 0;
  int cycles = 0;

  sdlc_gauss_filter dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .window(window),
                         .out_valid(out_valid), .pixel(pixel));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  logic [7:0] img [IMG][IMG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected outputs, in order, and the exact-multiplication outputs
  int exp_q [$];
  int exact_q [$];
  int n_in = 0, n_out = 0;
  int or_merges = 0, approx_hits = 0;
  real sq_err = 0.0;
  bit  prev_valid = 1'b0;

  // output monitor: one-cycle latency and value
  always @(posedge clk) begin
    if (rst_n) begin
      check(out_valid == prev_valid, "out_valid is not in_valid delayed by one clock");
      if (out_valid) begin
        int e, x;
        e = exp_q.pop_front();
        x = exact_q.pop_front();
        n_out++;
        check(int'(pixel) == e, $sformatf("output %0d: pixel %0d expected %0d", n_out, pixel, e));
        sq_err += real'((int'(pixel) - x) * (int'(pixel) - x));
      end
    end
    prev_valid = in_valid && rst_n;
  end

  initial begin
    int acc, acc_ex;
    rst_n = 1'b0;
    in_valid = 1'b0;
    window = '0;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        int v;
        v = (r + c) * 2 + int'($urandom_range(0, 24));
        if (r >= 20 && r < 44 && c >= 20 && c < 44) v = 230 + int'($urandom_range(0, 25));
        img[r][c] = (v > 255) ? 8'd255 : 8'(v);
      end
    repeat (3) @(posedge clk);
    check(out_valid == 1'b0, "out_valid high during reset");
    #1 rst_n = 1'b1;
    for (int r = 1; r < IMG - 1; r++) begin
      for (int c = 1; c < IMG - 1; c++) begin
        while ($urandom_range(0, 7) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
        end
        @(negedge clk);
        acc = 0;
        acc_ex = 0;
        for (int t = 0; t < 9; t++) begin
          logic [7:0] pv, cv;
          int unsigned sv;
          pv = img[r - 1 + t / 3][c - 1 + t % 3];
          cv = gauss_coeff(t);
          window[t] = pv;
          sv = ref_sdlc_value(pv, cv);
          if (sv != int'(pv) * int'(cv)) or_merges++;
          if (int'(ref_mult(pv, cv, 3, 8)) != sv) approx_hits++;
          acc += int'(ref_mult(pv, cv, 3, 8));
          acc_ex += int'(pv) * int'(cv);
        end
        exp_q.push_back(((acc >> 10) > 255) ? 255 : (acc >> 10));
        exact_q.push_back(acc_ex >> 10);
        in_valid = 1'b1;
        n_in++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (4) @(posedge clk);
    check(n_out == n_in, $sformatf("%0d outputs for %0d windows", n_out, n_in));
    check(or_merges > 0, "no product had an OR merge of two ones");
    check(approx_hits > 0, "no product was changed by an approximate adder");
    $display("windows %0d, products with OR-merge loss %0d, products changed by approximate adders %0d",
             n_in, or_merges, approx_hits);
    $display("PSNR against exact filter: %0.2f dB", 10.0 * $log10(255.0 * 255.0 / (sq_err / n_out)));
    $display("clock cycles: %0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
