// sdlc_wallace: two-stage Wallace accumulation of the 4-row compressed
// partial-product matrix of the 8 x 8 SDLC multiplier.
//
// Stage 1 adds rows 1-3 column by column, all columns at once: half adders
// in columns 2, 3 and 13 (two bits each), full adders in columns 4-12; the
// bits of weight 0, 1 and 14 pass through, and row 4 waits for stage 2.
// Stage 2 adds, in each column, the stage-1 sum, the stage-1 carry coming
// from the column below and (columns 6-11) the row-4 bit: half adders in
// columns 3-5 and 12-14, full adders in columns 6-11. Columns 0-3 are then
// final product bits P0-P3; columns 4-15 are left as two rows, sum_row and
// carry_row, for the final ripple-carry adder (sdlc_rca).
//
// Full adders in columns below APPROX_COLS use the cell KIND (approximate
// adders for the less significant bits), the others the exact mirror adder;
// half adders are always exact. Purely combinational.
//
// Interface: rows[k][w] is bit w of compressed row k+1 (see sdlc_ppm);
// sum_row[3:0] = P3..P0, sum_row[14:4] and carry_row[15:4] are the two
// rows still to be added; sum_row[15] and carry_row[3:0] are always 0.
module sdlc_wallace #(
  parameter sdlc_pkg::adder_kind_e KIND        = sdlc_pkg::ADD_APPROX3,
  parameter int unsigned           APPROX_COLS = 8
) (
  input  logic [3:0][15:0] rows,
  output logic [15:0]      sum_row,
  output logic [15:0]      carry_row
);
  import sdlc_pkg::*;

  logic [15:0] r1, r2, r3, r4;
  assign r1 = rows[0];
  assign r2 = rows[1];
  assign r3 = rows[2];
  assign r4 = rows[3];

  // s1[w]: stage-1 result of weight w; c1[w]: stage-1 carry into column w.
  logic [14:0] s1;
  logic [14:3] c1;
  // s2[w]: stage-2 sum of weight w; c2[w]: stage-2 carry into column w.
  logic [15:0] s2, c2;

  // ---------------- stage 1 ----------------
  assign s1[0]  = r1[0];
  assign s1[1]  = r1[1];
  assign s1[14] = r1[14];

  for (genvar w = 2; w <= 13; w++) begin : g_st1
    if (w == 2 || w == 3 || w == 13) begin : g_ha
      half_adder u_ha (.a(r1[w]), .b(r2[w]), .sum(s1[w]), .co(c1[w+1]));
    end else begin : g_fa
      fa_cell #(.KIND((w < APPROX_COLS) ? KIND : ADD_EXACT)) u_fa (
        .a(r1[w]), .b(r2[w]), .ci(r3[w]), .sum(s1[w]), .co(c1[w+1]));
    end
  end

  // ---------------- stage 2 ----------------
  assign s2[2:0] = s1[2:0];
  assign s2[15]  = 1'b0;
  assign c2[3:0] = '0;

  for (genvar w = 3; w <= 14; w++) begin : g_st2
    if (w >= 6 && w <= 11) begin : g_fa
      fa_cell #(.KIND((w < APPROX_COLS) ? KIND : ADD_EXACT)) u_fa (
        .a(c1[w]), .b(s1[w]), .ci(r4[w]), .sum(s2[w]), .co(c2[w+1]));
    end else begin : g_ha
      // column 3's carry goes straight to the final adder's first column
      half_adder u_ha (.a(c1[w]), .b(s1[w]), .sum(s2[w]), .co(c2[w+1]));
    end
  end

  assign sum_row   = s2;
  assign carry_row = c2;

  // Bits that the compressed matrix never holds must be zero.
  always_comb begin
    assert (r1[15] == 1'b0 && r2[15:14] == '0 && r2[1:0] == '0 &&
            r3[15:13] == '0 && r3[3:0] == '0 && r4[15:12] == '0 && r4[5:0] == '0)
      else $error("sdlc_wallace: bit outside the compressed matrix is set");
  end
endmodule
