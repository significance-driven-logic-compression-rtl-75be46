// sdlc_pkg: types and constants shared by the SDLC approximate multiplier
// and the Gaussian blur filter built on it.
//
// adder_kind_e names the five full-adder cells the accumulation tree can be
// built from: the exact mirror adder and approximate adders 1 to 4. The
// Gaussian kernel is the 3x3 integer mask for sigma = 1 used by the filter;
// its normalising shift (the kernel sums to 1015, close to 2**10) is this
// design's own choice.
package sdlc_pkg;

  typedef enum logic [2:0] {
    ADD_EXACT   = 3'd0,
    ADD_APPROX1 = 3'd1,
    ADD_APPROX2 = 3'd2,
    ADD_APPROX3 = 3'd3,
    ADD_APPROX4 = 3'd4
  } adder_kind_e;

  // Operand width of the multiplier and depth of a logic cluster.
  localparam int unsigned MULT_N    = 8;
  localparam int unsigned CLUSTER_D = 2;

  // Gaussian mask, sigma = 1, row-major, index = 3*row + col.
  localparam int unsigned GAUSS_TAPS  = 9;
  localparam int unsigned GAUSS_SHIFT = 10;

  function automatic logic [7:0] gauss_coeff(input int unsigned idx);
    case (idx)
      4:             return 8'd203;
      1, 3, 5, 7:    return 8'd125;
      default:       return 8'd78;
    endcase
  endfunction

endpackage
