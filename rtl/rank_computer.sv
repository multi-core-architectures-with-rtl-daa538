// Rank computer: the second half of the first sorting step.
//
// The rank of word i is the number of ones in row i of the full edge matrix,
// which equals the number of words that sort above word i. The row is read
// from the binary vector: for j > i the stored bit E(i,j) is used as it is,
// for j < i the stored bit E(j,i) is inverted. A word equal to an earlier
// word therefore counts that word as above itself, so equal words still get
// distinct ranks and the rank vector is always a permutation of 0..N-1.
// Rank 0 belongs to the largest word.
//
// Example, N=4, binary_vector = 6'b101001: ranks = {2, 0, 3, 1}.
//
// Interface: binary_vector (N(N-1)/2 bits) from the edge computer; ranks
// (N x clog2(N) bits). Timing: the ranks are registered, so the rank vector of
// the words present in one cycle is available after the next rising edge.
// Reset: synchronous, active low, clears the ranks to 0.
//
// The counting rule and the registered output follow the source design; the
// rank width of clog2(N) bits is this implementation's choice.
module rank_computer
  import sort_pkg::DEFAULT_N, sort_pkg::pair_index;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned P = N * (N - 1) / 2,
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [P-1:0]  binary_vector,
  output logic [RW-1:0] ranks [N]
);

  logic [RW-1:0] rank_next [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      rank_next[i] = '0;
      for (int j = 0; j < N; j++) begin
        if (j > i)
          rank_next[i] += RW'(binary_vector[pair_index(i, j)]);
        else if (j < i)
          rank_next[i] += RW'(!binary_vector[pair_index(j, i)]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) ranks[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++) ranks[i] <= rank_next[i];
    end
  end

endmodule
