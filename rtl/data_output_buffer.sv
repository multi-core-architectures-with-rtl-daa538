// Read port of the data output buffer of the sorting IP core.
//
// The sorted array is held in the data router's output register, in
// descending order (place 0 largest). The sender walks a read pointer from
// 0 to N-1; this port maps pointer p to place N-1-p, so the packet leaves the
// core smallest word first (ascending order, as the host reads it back).
//
// Interface: sorted (N x W) is the router's register, read_pointer
// (clog2(N) bits) comes from the sender, rd_data is the selected word.
// Timing: combinational; TDATA is valid in the same cycle as the pointer.
//
// Reading the buffer with an incrementing pointer follows the source design;
// keeping the storage in the router register (so that sorting still takes
// two cycles) and the ascending output order are taken from the measured
// behaviour of the source design.
module data_output_buffer
  import sort_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned W = DEFAULT_W,
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [W-1:0]  sorted [N],
  input  logic [RW-1:0] read_pointer,
  output logic [W-1:0]  rd_data
);

  always_comb begin
    rd_data = '0;
    for (int p = 0; p < N; p++) begin
      if (read_pointer == RW'(N - 1 - p)) rd_data = sorted[p];
    end
  end

endmodule
