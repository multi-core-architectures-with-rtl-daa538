// Two-step sorting network: sorts N words in two clock cycles, whatever N is.
//
// Instead of a network of compare/swap stages, every pair of words is
// compared at once (edge computer), the comparison results of each word are
// counted into its rank, i.e. its place in sorted order (rank computer), and
// the words are then moved to their places (data router).
//
//   cycle 1: edge computer (combinational) + rank computer (registered)
//   cycle 2: data router (registered)
//
// The words input must hold still for the two cycles; in the IP core it is
// the input buffer, which does not change between the end of reception and
// the end of sending. sorted[0] is the largest word, sorted[N-1] the
// smallest. Reset: synchronous, active low.
//
// The three blocks, their connections and the two-cycle timing follow the
// source design.
module two_step_sorting_network
  import sort_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned W = DEFAULT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] words  [N],
  output logic [W-1:0] sorted [N]
);

  localparam int unsigned P  = N * (N - 1) / 2;
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1;

  logic [P-1:0]  binary_vector;
  logic [RW-1:0] ranks [N];

  edge_computer #(.N(N), .W(W)) u_edge (
    .words         (words),
    .binary_vector (binary_vector)
  );

  rank_computer #(.N(N)) u_rank (
    .clk           (clk),
    .rst_n         (rst_n),
    .binary_vector (binary_vector),
    .ranks         (ranks)
  );

  data_router #(.N(N), .W(W)) u_router (
    .clk    (clk),
    .rst_n  (rst_n),
    .words  (words),
    .ranks  (ranks),
    .sorted (sorted)
  );

endmodule
