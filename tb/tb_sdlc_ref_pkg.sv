// tb_sdlc_ref_pkg: bit-level reference model of the SDLC multiplier for the
// testbenches. It is written from the partial-product names of the
// accumulation diagram (O(i,j) = a[i]b[j] | a[i-1]b[j+1], stage-1 sums S0-S10
// and carries C00, C0-C10, stage-2 sums S12-S22 and carries C11-C22) rather
// than from the RTL's column loops, and uses behavioural truth tables for
// the adder cells.
package tb_sdlc_ref_pkg;

  // {co, sum} of a full-adder cell of the given kind (0 exact, 1-4 approx).
  function automatic logic [1:0] ref_fa(input int kind, input logic a, b, c);
    int n;
    n = int'(a) + int'(b) + int'(c);
    case (kind)
      1: return {logic'(n >= 2), logic'(n == 1 && c) | logic'(n == 3)};
      2: return {b | (a & c),    logic'(n == 1 && c) | logic'(n == 3)};
      3: return {logic'(n >= 2), ~logic'(n >= 2)};
      4: return {b | (a & c),    ~(b | (a & c))};
      default: return {logic'(n >= 2), logic'(n[0])};
    endcase
  endfunction

  function automatic logic [1:0] ref_ha(input logic a, b);
    return {a & b, a ^ b};
  endfunction

  // Full multiplier: compressed matrix, two Wallace stages, ripple adder.
  // Full adders in columns below approx_cols use the given kind.
  function automatic logic [15:0] ref_mult(input logic [7:0] a, b,
                                           input int kind, input int approx_cols);
    logic pp [8][8];
    logic [15:0] P;
    logic S [23];
    logic C [23];
    logic C00, cy;
    logic [1:0] r;
    int k;
    for (int i = 0; i < 8; i++) for (int j = 0; j < 8; j++) pp[i][j] = a[i] & b[j];
    `define O(i,j) (pp[i][j] | pp[(i)-1][(j)+1])
    `define FA(w,x,y,z) begin k = ((w) < approx_cols) ? kind : 0; r = ref_fa(k, x, y, z); end
    P = '0;
    P[0] = pp[0][0];
    P[1] = `O(1,0);
    r = ref_ha(`O(2,0), pp[0][2]);            P[2] = r[0]; C00 = r[1];
    r = ref_ha(`O(3,0), `O(1,2));             S[0] = r[0]; C[0] = r[1];
    `FA(4,  `O(4,0), `O(2,2), pp[0][4])       S[1] = r[0]; C[1] = r[1];
    `FA(5,  `O(5,0), `O(3,2), `O(1,4))        S[2] = r[0]; C[2] = r[1];
    `FA(6,  `O(6,0), `O(4,2), `O(2,4))        S[3] = r[0]; C[3] = r[1];
    `FA(7,  `O(7,0), `O(5,2), `O(3,4))        S[4] = r[0]; C[4] = r[1];
    `FA(8,  pp[7][1], `O(6,2), `O(4,4))       S[5] = r[0]; C[5] = r[1];
    `FA(9,  pp[7][2], pp[6][3], `O(5,4))      S[6] = r[0]; C[6] = r[1];
    `FA(10, pp[7][3], pp[6][4], pp[5][5])     S[7] = r[0]; C[7] = r[1];
    `FA(11, pp[7][4], pp[6][5], pp[5][6])     S[8] = r[0]; C[8] = r[1];
    `FA(12, pp[7][5], pp[6][6], pp[5][7])     S[9] = r[0]; C[9] = r[1];
    r = ref_ha(pp[7][6], pp[6][7]);           S[10] = r[0]; C[10] = r[1];
    // stage 2
    r = ref_ha(C00, S[0]);                    P[3] = r[0];  C[11] = r[1];
    r = ref_ha(C[0], S[1]);                   S[12] = r[0]; C[12] = r[1];
    r = ref_ha(C[1], S[2]);                   S[13] = r[0]; C[13] = r[1];
    `FA(6,  C[2], S[3], pp[0][6])             S[14] = r[0]; C[14] = r[1];
    `FA(7,  C[3], S[4], `O(1,6))              S[15] = r[0]; C[15] = r[1];
    `FA(8,  C[4], S[5], `O(2,6))              S[16] = r[0]; C[16] = r[1];
    `FA(9,  C[5], S[6], `O(3,6))              S[17] = r[0]; C[17] = r[1];
    `FA(10, C[6], S[7], `O(4,6))              S[18] = r[0]; C[18] = r[1];
    `FA(11, C[7], S[8], pp[4][7])             S[19] = r[0]; C[19] = r[1];
    r = ref_ha(C[8], S[9]);                   S[20] = r[0]; C[20] = r[1];
    r = ref_ha(C[9], S[10]);                  S[21] = r[0]; C[21] = r[1];
    r = ref_ha(pp[7][7], C[10]);              S[22] = r[0]; C[22] = r[1];
    // ripple-carry adder over columns 4..15 (C11..C22 against S12..S22)
    r = ref_ha(C[11], S[12]);                 P[4] = r[0]; cy = r[1];
    for (int w = 5; w <= 14; w++) begin
      `FA(w, C[w+7], S[w+8], cy)
      P[w] = r[0]; cy = r[1];
    end
    P[15] = C[22] ^ cy;
    `undef O
    `undef FA
    return P;
  endfunction

  // Value of the OR-compressed matrix: the exact product less one unit of
  // weight i+2k for every clustered pair whose two products are both 1.
  function automatic int unsigned ref_sdlc_value(input logic [7:0] a, b);
    int unsigned v;
    v = int'(a) * int'(b);
    for (int k = 0; k < 4; k++)
      for (int i = 1; i <= 7 - k; i++)
        if (a[i] && b[2*k] && a[i-1] && b[2*k+1]) v -= (1 << (i + 2*k));
    return v;
  endfunction

endpackage
