// Two-step sorting IP core with AXI4-Stream ports.
//
// A host (through a DMA engine) streams a packet of up to N unsigned W-bit
// words into the slave port; the core returns the same words sorted in
// ascending order on the master port, always as a packet of N words with
// TLAST on the last. The sort itself takes two clock cycles, independent of N,
// because every pair of words is compared in parallel and each word's place
// is computed by counting the comparisons it lost (two-step sorting network).
//
//   slave stream -> axis_receiver -> input_fifo_buffer -> two_step_sorting_network
//                        ^  control signals                       |
//                        v                                        v
//   master stream <- axis_sender  <-  data_output_buffer  <-  (router register)
//
// Packet flow: the receiver accepts beats until TLAST or until the buffer
// holds N words, then raises NEW_DATA_READY and refuses further beats. The
// sorting network works on the buffer continuously; two cycles later the
// sender starts streaming the sorted words. When the last word has been
// accepted the sender raises DATA_TRANSMITTED, the receiver clears the buffer
// and takes the next packet. A packet shorter than N words is padded with
// zeros, which then appear first in the sorted output.
//
// Timing (TVALID and TREADY held high by the environment): N+1 cycles to
// receive, 2 cycles to sort, N cycles to send.
// Reset: synchronous, active low (aresetn).
//
// The structure follows the source design; see the block files for what each
// block takes from it and where it makes its own choices.
module two_step_sorting_ip
  import sort_pkg::*;
#(
  parameter int unsigned N = DEFAULT_N,
  parameter int unsigned W = DEFAULT_W
) (
  input  logic         aclk,
  input  logic         aresetn,
  // slave AXI4-Stream port: unsorted words
  input  logic [W-1:0] s_axis_tdata,
  input  logic         s_axis_tvalid,
  output logic         s_axis_tready,
  input  logic         s_axis_tlast,
  // master AXI4-Stream port: sorted words
  output logic [W-1:0] m_axis_tdata,
  output logic         m_axis_tvalid,
  input  logic         m_axis_tready,
  output logic         m_axis_tlast
);

  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1;

  logic          fifo_clear, fifo_write, buffer_full, buffer_last_free;
  logic          new_data_ready, data_transmitted;
  logic [W-1:0]  unsorted [N];
  logic [W-1:0]  sorted   [N];
  logic [RW-1:0] read_pointer;

  axis_receiver u_receiver (
    .clk              (aclk),
    .rst_n            (aresetn),
    .s_axis_tvalid    (s_axis_tvalid),
    .s_axis_tlast     (s_axis_tlast),
    .s_axis_tready    (s_axis_tready),
    .buffer_last_free (buffer_last_free),
    .fifo_clear       (fifo_clear),
    .fifo_write       (fifo_write),
    .data_transmitted (data_transmitted),
    .new_data_ready   (new_data_ready)
  );

  input_fifo_buffer #(.N(N), .W(W)) u_input_buffer (
    .clk       (aclk),
    .rst_n     (aresetn),
    .clear     (fifo_clear),
    .wr_en     (fifo_write),
    .wr_data   (s_axis_tdata),
    .words     (unsorted),
    .full      (buffer_full),
    .last_free (buffer_last_free)
  );

  two_step_sorting_network #(.N(N), .W(W)) u_sorter (
    .clk    (aclk),
    .rst_n  (aresetn),
    .words  (unsorted),
    .sorted (sorted)
  );

  data_output_buffer #(.N(N), .W(W)) u_output_buffer (
    .sorted       (sorted),
    .read_pointer (read_pointer),
    .rd_data      (m_axis_tdata)
  );

  axis_sender #(.N(N)) u_sender (
    .clk              (aclk),
    .rst_n            (aresetn),
    .new_data_ready   (new_data_ready),
    .data_transmitted (data_transmitted),
    .read_pointer     (read_pointer),
    .m_axis_tvalid    (m_axis_tvalid),
    .m_axis_tready    (m_axis_tready),
    .m_axis_tlast     (m_axis_tlast)
  );

  // The input buffer must not change while a packet is sorted and sent, and
  // it is never written beyond N words.
  a_buffer_stable: assert property (@(posedge aclk) disable iff (!aresetn)
    new_data_ready |-> !fifo_write);
  a_no_overflow: assert property (@(posedge aclk) disable iff (!aresetn)
    buffer_full |-> !fifo_write);

endmodule
