// sdlc_mult: 8 x 8 unsigned approximate multiplier built with
// significance-driven logic compression (SDLC).
//
// Three steps, all combinational:
//   1. sdlc_ppm forms the 64 partial products and compresses the eight rows
//      to four: pairs of vertically aligned products inside a 2-row logic
//      cluster are merged by OR gates, and the bits are regrouped by weight.
//   2. sdlc_wallace reduces the four rows to two in two Wallace stages.
//   3. sdlc_rca adds the two rows with a ripple-carry adder into P[15:0].
// The only error sources are the OR merges (an OR of two 1s counts one
// instead of two) and the approximate adder cells.
//
// Parameters: KIND selects the full-adder cell (exact mirror adder or
// approximate adder 1-4; default approximate adder 3, the most
// energy-efficient of the four); full adders in product columns below
// APPROX_COLS use that cell, those above use the exact cell. Which columns
// count as "least significant" is this design's choice (default: the lower
// half of the product, columns 0-7).
//
// Timing: no clock; p follows a and b after the combinational delay.
module sdlc_mult #(
  parameter sdlc_pkg::adder_kind_e KIND        = sdlc_pkg::ADD_APPROX3,
  parameter int unsigned           APPROX_COLS = 8
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [3:0][15:0] rows;
  logic [15:0]      sum_row, carry_row;

  sdlc_ppm #(.N(8)) u_ppm (.a(a), .b(b), .rows(rows));

  sdlc_wallace #(.KIND(KIND), .APPROX_COLS(APPROX_COLS)) u_wallace (
    .rows(rows), .sum_row(sum_row), .carry_row(carry_row));

  sdlc_rca #(.KIND(KIND), .APPROX_COLS(APPROX_COLS), .W(16), .START(4)) u_rca (
    .sum_row(sum_row), .carry_row(carry_row), .p(p));
endmodule
