// tb_gauss_adder_sweep: the Gaussian-blur workload run with all five
// multiplier configurations side by side.
//
// Five sdlc_gauss_filter instances, built with the exact adder cell and with
// approximate adders 1-4, filter the same generated 96 x 96 grayscale image
// (smooth shading, two bright shapes and pseudo-random noise). Every output
// of every instance is compared with the bit-level reference model. For
// each configuration the test reports the PSNR of the blurred image against
// (a) the same blur computed with exact multiplications and (b) the input
// image, which is the figure of merit used to compare the five multipliers.
module tb_gauss_adder_sweep;
  import sdlc_pkg::*;
  import tb_sdlc_ref_pkg::*;

  localparam int IMG = 96;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic [8:0][7:0] window;
  logic [4:0] out_valid;
  logic [7:0] pixel [5];

  int checks = 0, failures = 0;

  sdlc_gauss_filter #(.KIND(ADD_EXACT))   f0 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .window(window), .out_valid(out_valid[0]), .pixel(pixel[0]));
  sdlc_gauss_filter #(.KIND(ADD_APPROX1)) f1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .window(window), .out_valid(out_valid[1]), .pixel(pixel[1]));
  sdlc_gauss_filter #(.KIND(ADD_APPROX2)) f2 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .window(window), .out_valid(out_valid[2]), .pixel(pixel[2]));
  sdlc_gauss_filter #(.KIND(ADD_APPROX3)) f3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .window(window), .out_valid(out_valid[3]), .pixel(pixel[3]));
  sdlc_gauss_filter #(.KIND(ADD_APPROX4)) f4 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .window(window), .out_valid(out_valid[4]), .pixel(pixel[4]));

  always #5 clk = ~clk;

  logic [7:0] img [IMG][IMG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real se_exact [5];
    real se_orig [5];
    int  n;
    foreach (se_exact[k]) begin se_exact[k] = 0.0; se_orig[k] = 0.0; end
    n = 0;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        int v;
        v = 40 + r + c / 2 + int'($urandom_range(0, 30));
        if ((r - 30) * (r - 30) + (c - 30) * (c - 30) < 300) v = 220 + int'($urandom_range(0, 35));
        if (r > 55 && r < 85 && c > 50 && c < 90) v = 180 + int'($urandom_range(0, 20));
        img[r][c] = (v > 255) ? 8'd255 : 8'(v);
      end
    rst_n = 1'b0;
    in_valid = 1'b0;
    window = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 1; r < IMG - 1; r++) begin
      for (int c = 1; c < IMG - 1; c++) begin
        int acc [5];
        int acc_ex;
        int e;
        acc_ex = 0;
        foreach (acc[k]) acc[k] = 0;
        for (int t = 0; t < 9; t++) begin
          logic [7:0] pv;
          pv = img[r - 1 + t / 3][c - 1 + t % 3];
          window[t] = pv;
          acc_ex += int'(pv) * int'(gauss_coeff(t));
          for (int k = 0; k < 5; k++) acc[k] += int'(ref_mult(pv, gauss_coeff(t), k, 8));
        end
        in_valid = 1'b1;
        @(posedge clk);
        #1;
        n++;
        for (int k = 0; k < 5; k++) begin
          e = ((acc[k] >> 10) > 255) ? 255 : (acc[k] >> 10);
          check(out_valid[k] && int'(pixel[k]) == e,
                $sformatf("kind %0d at (%0d,%0d): pixel %0d expected %0d", k, r, c, pixel[k], e));
          se_exact[k] += real'((int'(pixel[k]) - (acc_ex >> 10)) ** 2);
          se_orig[k]  += real'((int'(pixel[k]) - int'(img[r][c])) ** 2);
        end
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    for (int k = 0; k < 5; k++)
      $display("adder %s: PSNR vs exact blur %6.2f dB, vs input image %6.2f dB",
               (k == 0) ? "exact" : $sformatf("%0d    ", k),
               (se_exact[k] == 0.0) ? 99.99 : 10.0 * $log10(255.0 * 255.0 * n / se_exact[k]),
               10.0 * $log10(255.0 * 255.0 * n / se_orig[k]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
