// sdlc_ppm: partial-product generation and significance-driven logic
// compression (SDLC) for an N x N unsigned multiplier with logic clusters
// of depth 2.
//
// The N x N AND array gives partial products a[i]&b[j] of weight i+j.
// Rows b[2k] and b[2k+1] form logic cluster k (row index r = k+1 of the
// compressed matrix). Inside the cluster, the vertically aligned pair
// a[i]b[2k] and a[i-1]b[2k+1] (same weight i+2k) is merged by one OR gate,
// for i = 1 .. L(r), where the cluster length is
//   L(r) = (N + d - 2) - r            for 1 <= r < ceil(N/d)
//   L(r) = (2N - 3) - (d + 1)(r - 1)  for r = ceil(N/d)
// (7, 6, 5, 4 for N = 8). Commutative remapping then places every bit by
// its weight in one of N/2 rows: row r holds a[0]b[2k] at weight 2k, the OR
// outputs at weights 2k+1 .. 2k+L(r), and the leftover products of column
// a[N-1-k], a[N-1-k]b[j] for j = 2k+1 .. N-1, at weights N-1-k+j. The
// matrix height is thus halved; an OR where both inputs are 1 loses one
// unit of that weight, which is the multiplier's compression error.
//
// Interface: rows[k][w] is the bit of weight w in compressed row k+1, zero
// where the row has no bit. Purely combinational. The structure is the one
// of the SDLC method; only depth 2 is built (N must be even).
module sdlc_ppm #(
  parameter int unsigned N = sdlc_pkg::MULT_N
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  output logic [N/2-1:0][2*N-1:0]      rows
);
  localparam int unsigned D = sdlc_pkg::CLUSTER_D;
  localparam int unsigned R = N / D;

  // Cluster length for compressed row r (1-based).
  function automatic int unsigned cluster_len(input int unsigned r);
    if (r < R) return (N + D - 2) - r;
    else       return (2 * N - 3) - (D + 1) * (r - 1);
  endfunction

  // pp[j][i] = a[i] & b[j], weight i + j.
  logic [N-1:0][N-1:0] pp;

  always_comb begin
    for (int unsigned j = 0; j < N; j++)
      for (int unsigned i = 0; i < N; i++)
        pp[j][i] = a[i] & b[j];
  end

  for (genvar k = 0; k < R; k++) begin : g_row
    for (genvar w = 0; w < 2 * N; w++) begin : g_bit
      if (w == 2 * k) begin : g_lsb
        // least significant bit of the cluster, kept uncompressed
        assign rows[k][w] = pp[2*k][0];
      end else if (w > 2 * k && w <= 2 * k + cluster_len(k + 1)) begin : g_or
        // logic compression: one OR gate per aligned pair, i = w - 2k
        assign rows[k][w] = pp[2*k][w-2*k] | pp[2*k+1][w-2*k-1];
      end else if (w >= N + k && w <= 2 * N - 2 - k) begin : g_remap
        // commutative remapping of a[N-1-k]b[j], j = w - (N-1-k)
        assign rows[k][w] = pp[w-(N-1-k)][N-1-k];
      end else begin : g_zero
        assign rows[k][w] = 1'b0;
      end
    end
  end

  initial begin
    assert (N % D == 0 && N >= 4) else $error("sdlc_ppm: N must be even and at least 4");
  end
endmodule
