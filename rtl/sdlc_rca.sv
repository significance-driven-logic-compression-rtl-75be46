// sdlc_rca: final ripple-carry adder of the SDLC multiplier, adding the two
// rows left by the Wallace stages into the 16-bit product.
//
// Columns below START hold at most one bit (carry_row is zero there) and
// pass straight to the product. Column START is a half adder, columns
// START+1 .. W-2 are full-adder cells whose carry ripples upwards, and the
// top column adds its two bits without producing a carry-out (the product
// is W bits). Full adders in columns below APPROX_COLS use the cell KIND,
// the others the exact mirror adder. The cells' a input is the carry row
// and b the sum row, the order in which the rows are drawn (this matters for
// approximate adders 2 and 4, whose carry is not symmetric in a and b).
// Purely combinational.
module sdlc_rca #(
  parameter sdlc_pkg::adder_kind_e KIND        = sdlc_pkg::ADD_APPROX3,
  parameter int unsigned           APPROX_COLS = 8,
  parameter int unsigned           W           = 16,
  parameter int unsigned           START       = 4
) (
  input  logic [W-1:0] sum_row,
  input  logic [W-1:0] carry_row,
  output logic [W-1:0] p
);
  import sdlc_pkg::*;

  // cy[w]: ripple carry into column w.
  logic [W:0] cy;

  assign cy[START:0] = '0;
  assign p[START-1:0] = sum_row[START-1:0] | carry_row[START-1:0];

  half_adder u_ha_lo (.a(carry_row[START]), .b(sum_row[START]),
                      .sum(p[START]), .co(cy[START+1]));

  for (genvar w = START + 1; w <= W - 2; w++) begin : g_col
    fa_cell #(.KIND((w < APPROX_COLS) ? KIND : ADD_EXACT)) u_fa (
      .a(carry_row[w]), .b(sum_row[w]), .ci(cy[w]), .sum(p[w]), .co(cy[w+1]));
  end

  // top column: sum only, the carry out of the product width is dropped
  assign p[W-1] = sum_row[W-1] ^ carry_row[W-1] ^ cy[W-1];
  assign cy[W]  = 1'b0;

  always_comb begin
    assert ((sum_row[START-1:0] & carry_row[START-1:0]) == '0)
      else $error("sdlc_rca: two bits in a column below START");
  end
endmodule
