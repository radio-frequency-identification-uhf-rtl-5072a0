// fastsearch: orders the IDs of one read cycle from smallest to largest.
//
// All N(N-1)/2 pairs of IDs are compared at once. From the comparison bits each
// ID gets its rank, the number of IDs that must come before it; equal IDs keep
// their input order (an ID ranks after equal IDs on lower inputs). The rank
// pattern then acts as the selection table: output slot k takes the ID whose
// rank is k. The whole search finishes in one clock whatever the IDs are, so a
// group of four tags is resolved in a single step instead of by repeated
// tree-splitting rounds.
//
// Interface: a[0..N-1] are the unsorted IDs (a, b, c, d of the source design),
// s[0..N-1] the sorted IDs (e, f, g, h), s[0] the smallest.
// Timing: s is registered, one clock after a. rst is synchronous, active high,
// and clears s to zero. An assertion checks that s is always in ascending
// order.
//
// The source design gives the function (four IDs identified smallest first in
// one read cycle, by a fast-search lookup table over a binary tree with at most
// four leaves) but not its insides; the comparator-and-rank structure and the
// tie rule are this design's own.
module fastsearch
  import rceat_pkg::*;
#(
  parameter int unsigned N = NTAG,
  parameter int unsigned W = ID_W
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0][W-1:0]  a,    // unsorted IDs
  output logic [N-1:0][W-1:0]  s     // sorted IDs, s[0] smallest
);

  localparam int unsigned RW = $clog2(N) > 0 ? $clog2(N) : 1;

  logic [N-1:0][RW-1:0] rank;
  logic [N-1:0][W-1:0]  sorted;

  // Rank of every input: how many inputs precede it in ascending order.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      rank[i] = '0;
      for (int j = 0; j < N; j++) begin
        if (j < i && a[j] <= a[i]) rank[i] = rank[i] + 1'b1;
        if (j > i && a[j] <  a[i]) rank[i] = rank[i] + 1'b1;
      end
    end
  end

  // Selection: slot k takes the input ranked k (ranks are all distinct).
  always_comb begin
    for (int k = 0; k < N; k++) begin
      sorted[k] = '0;
      for (int i = 0; i < N; i++)
        if (rank[i] == RW'(k)) sorted[k] = sorted[k] | a[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) s <= '0;
    else     s <= sorted;
  end

  // The registered result is always in ascending order.
  generate
    for (genvar k = 1; k < N; k++) begin : g_order
      a_ascending: assert property (@(posedge clk) disable iff (rst) s[k-1] <= s[k])
        else $error("fastsearch: output slots %0d and %0d out of order", k - 1, k);
    end
  endgenerate

endmodule
