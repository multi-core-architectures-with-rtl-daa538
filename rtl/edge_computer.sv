// Edge computer: the first step of the two-step sorting network.
//
// Every pair of the N input words is compared exactly once, with N(N-1)/2
// less-than comparators working in parallel. Bit E(i,j) of the edge matrix is
// 1 when words[i] < words[j], i.e. when word j sorts above word i. Only the
// upper triangle (i < j) is built, because E(j,i) is the inverse of E(i,j)
// for distinct words; the diagonal is never compared. The upper triangle is
// packed into the binary vector column by column, top to bottom, so that
// E(i,j) sits at bit j(j-1)/2 + i (see sort_pkg::pair_index).
//
// Example, N=4, words = {02, 07, 00, 04}: binary_vector = 6'b101001.
//
// Interface: words (N x W, unsigned), binary_vector (N(N-1)/2 bits).
// Timing: purely combinational; the rank computer registers the result.
//
// The comparator array, the direction of the comparison and the packing order
// follow the source design. Treating the words as unsigned numbers is this
// implementation's choice.
module edge_computer
  import sort_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned W = DEFAULT_W,
  localparam int unsigned P = N * (N - 1) / 2
) (
  input  logic [W-1:0] words [N],
  output logic [P-1:0] binary_vector
);

  for (genvar j = 1; j < N; j++) begin : g_col
    for (genvar i = 0; i < j; i++) begin : g_row
      assign binary_vector[pair_index(i, j)] = (words[i] < words[j]);
    end
  end

endmodule
