// mr_scan: the Scan network, closed over the linear array, returns to every
// cell global information about the state of all cells.
//
// Here that information is the activity prefix: earlier[i] is 1 when some cell
// j < i is active (its activity counter is 0). The FIRST instruction uses it to
// leave only the first active cell active. The prefix OR is computed with a
// Sklansky parallel-prefix network of clog2(P) combinational levels, so it is
// available in the same cycle as the activity flags. any_active and first_ix
// (index of the lowest active cell, 0 when none) are brought out for status.
//
// The existence of a scan loop over the array is the source architecture's;
// what it computes and its combinational prefix structure are this
// implementation's choice.
module mr_scan #(
  parameter int unsigned P = 128,
  localparam int unsigned L = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned W = 1 << L
) (
  input  logic          active  [P],
  output logic          earlier [P],
  output logic          any_active,
  output logic [L-1:0]  first_ix
);

  // pre[k][i]: OR of active[j] for j in the block of size 2^k ending at i
  // (Sklansky: after level k, each position holds the OR of its prefix within
  // its aligned block of 2^k).
  logic [W-1:0] lvl [L+1];

  always_comb begin
    for (int i = 0; i < W; i++) lvl[0][i] = (i < P) ? active[i % P] : 1'b0;
    for (int k = 1; k <= L; k++) begin
      for (int i = 0; i < W; i++) begin
        // upper half of each aligned block of 2^k takes the OR of the lower half
        if (((i >> (k - 1)) & 1) == 1)
          lvl[k][i] = lvl[k-1][i] | lvl[k-1][((i >> (k - 1)) << (k - 1)) - 1];
        else
          lvl[k][i] = lvl[k-1][i];
      end
    end
  end

  // inclusive prefix -> exclusive prefix
  for (genvar i = 0; i < P; i++) begin : g_out
    if (i == 0) begin : g_zero
      assign earlier[i] = 1'b0;
    end else begin : g_rest
      assign earlier[i] = lvl[L][i-1];
    end
  end

  assign any_active = lvl[L][W-1];

  always_comb begin
    first_ix = '0;
    for (int i = P - 1; i >= 0; i--) if (active[i]) first_ix = L'(i);
  end

endmodule
