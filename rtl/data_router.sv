// Data router: the second step of the two-step sorting network.
//
// Each input word is sent to the output place given by its rank, so that
// place 0 holds the largest word and place N-1 the smallest (descending
// order). Because the ranks are a permutation, exactly one input word matches
// each place; each place is built as an N-way selection on "rank == place".
//
// Interface: words (N x W) are the unsorted words, ranks (N x clog2(N)) the
// rank vector computed from the same words one cycle earlier, sorted (N x W)
// the routed words. Timing: the output is registered; it also serves as the
// data output buffer of the IP core. Reset: synchronous, active low, clears
// the output words to 0.
//
// Routing by rank and the descending order follow the source design; the
// selection structure is this implementation's choice.
module data_router
  import sort_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned W = DEFAULT_W,
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  words [N],
  input  logic [RW-1:0] ranks [N],
  output logic [W-1:0]  sorted [N]
);

  logic [W-1:0] routed [N];

  always_comb begin
    for (int p = 0; p < N; p++) begin
      routed[p] = '0;
      for (int i = 0; i < N; i++) begin
        if (ranks[i] == RW'(p)) routed[p] = routed[p] | words[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) sorted[p] <= '0;
    end else begin
      for (int p = 0; p < N; p++) sorted[p] <= routed[p];
    end
  end

endmodule
