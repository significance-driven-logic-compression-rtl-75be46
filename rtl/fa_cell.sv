// fa_cell: one full-adder position of the accumulation tree, built from the
// cell chosen by the KIND parameter (exact mirror adder or approximate adders
// 1 to 4).
//
// All five cells are instantiated and KIND, a constant, selects which one
// drives the outputs; synthesis removes the four unused cells, so the
// netlist holds only the chosen one. Combinational.
module fa_cell #(
  parameter sdlc_pkg::adder_kind_e KIND = sdlc_pkg::ADD_EXACT
) (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic sum,
  output logic co
);
  import sdlc_pkg::*;

  logic [4:0] s, c;

  fa_mirror_exact u_exact (.a(a), .b(b), .ci(ci), .sum(s[0]), .co(c[0]));
  fa_approx1      u_ax1   (.a(a), .b(b), .ci(ci), .sum(s[1]), .co(c[1]));
  fa_approx2      u_ax2   (.a(a), .b(b), .ci(ci), .sum(s[2]), .co(c[2]));
  fa_approx3      u_ax3   (.a(a), .b(b), .ci(ci), .sum(s[3]), .co(c[3]));
  fa_approx4      u_ax4   (.a(a), .b(b), .ci(ci), .sum(s[4]), .co(c[4]));

  always_comb begin
    case (KIND)
      ADD_APPROX1: begin sum = s[1]; co = c[1]; end
      ADD_APPROX2: begin sum = s[2]; co = c[2]; end
      ADD_APPROX3: begin sum = s[3]; co = c[3]; end
      ADD_APPROX4: begin sum = s[4]; co = c[4]; end
      default:     begin sum = s[0]; co = c[0]; end
    endcase
  end
endmodule
