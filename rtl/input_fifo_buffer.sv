// Data input buffer of the sorting IP core.
//
// An N-word shift register filled from the slave stream. Each write moves
// every stored word up by one place and puts the new word into place 0, so
// after a full packet words[0] holds the last word received and words[N-1]
// the first. All N words are presented in parallel to the sorting network.
// clear empties the buffer (all words 0, count 0); it is held high by the
// receiver while it waits for a packet, so the places a short packet does not
// fill read as 0.
//
// Interface: clear and wr_en are synchronous controls (clear wins);
// wr_data is the word to write; words is the parallel content; full is high
// when N words have been written since the last clear and last_free when
// exactly one place is left, so that a controller can stop
// accepting in the same edge as it writes the N-th word.
// Timing: one write per clock; the new content is visible after the edge.
// Reset: synchronous, active low, same effect as clear.
//
// The shift-register filling and the clear from the receiver follow the
// source design; the word count and the full and last_free flags are this
// implementation's way of detecting the full buffer.
module input_fifo_buffer
  import sort_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned W = DEFAULT_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          wr_en,
  input  logic [W-1:0]  wr_data,
  output logic [W-1:0]  words [N],
  output logic          full,
  output logic          last_free
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [CW-1:0] count;  // words written since the last clear

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int k = 0; k < N; k++) words[k] <= '0;
      count <= '0;
    end else if (wr_en && !full) begin
      words[0] <= wr_data;
      for (int k = 1; k < N; k++) words[k] <= words[k-1];
      count <= count + CW'(1);
    end
  end

  assign full      = (count == CW'(N));
  assign last_free = (count == CW'(N - 1));

endmodule
