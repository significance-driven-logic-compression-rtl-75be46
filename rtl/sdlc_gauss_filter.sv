// sdlc_gauss_filter: one output pixel of a 3x3 Gaussian blur per clock,
// computed with nine SDLC approximate multipliers.
//
// The caller presents a 3x3 window of 8-bit grayscale pixels (window[3*r+c],
// r = row, c = column) with in_valid. Each pixel is multiplied by its tap of
// the sigma = 1 Gaussian mask
//      78 125  78
//     125 203 125
//      78 125  78
// in an sdlc_mult, the nine 16-bit products are summed exactly, and the sum
// is scaled back to a pixel by a right shift of GAUSS_SHIFT (10) bits,
// saturating at 255 should the approximate products overshoot. The window
// handling (no line buffers: the caller forms the windows), the shift and
// the saturation are this design's own choices; the mask and the use of the
// approximate multiplier for every tap follow the filter's definition.
//
// Timing: one register stage. pixel and out_valid appear on the clock edge
// after the window is applied; one window can be accepted every cycle.
// Reset (rst_n low, synchronous) clears out_valid and pixel.
module sdlc_gauss_filter #(
  parameter sdlc_pkg::adder_kind_e KIND        = sdlc_pkg::ADD_APPROX3,
  parameter int unsigned           APPROX_COLS = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [8:0][7:0] window,
  output logic           out_valid,
  output logic [7:0]     pixel
);
  import sdlc_pkg::*;

  logic [8:0][15:0] prod;
  logic [19:0]      acc;
  logic [19:0]      scaled;
  logic [7:0]       pixel_d;

  for (genvar t = 0; t < GAUSS_TAPS; t++) begin : g_tap
    sdlc_mult #(.KIND(KIND), .APPROX_COLS(APPROX_COLS)) u_mult (
      .a(window[t]), .b(gauss_coeff(t)), .p(prod[t]));
  end

  always_comb begin
    acc = '0;
    for (int t = 0; t < GAUSS_TAPS; t++)
      acc = acc + 20'(prod[t]);
    scaled  = acc >> GAUSS_SHIFT;
    pixel_d = (scaled > 20'd255) ? 8'd255 : scaled[7:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      pixel     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) pixel <= pixel_d;
    end
  end
endmodule
