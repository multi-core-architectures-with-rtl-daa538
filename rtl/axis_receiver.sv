// AXI4-Stream receiver (slave side controller) of the sorting IP core.
//
// A three-state machine:
//   IDLE       - holds the input buffer clear with TREADY low. When TVALID is
//                high and the sender's DATA_TRANSMITTED is low, it raises
//                TREADY and goes to WRITE_FIFO.
//   WRITE_FIFO - every beat accepted (TVALID and TREADY) is written into the
//                input buffer. The beat that carries TLAST, or that fills the
//                last free place of the buffer, ends the packet: TREADY falls
//                and NEW_DATA_READY rises in the same edge, and the machine
//                goes to PROCESSING.
//   PROCESSING - TREADY stays low, so no new packet is accepted while the
//                current one is sorted and sent. When DATA_TRANSMITTED rises,
//                NEW_DATA_READY falls and the machine returns to IDLE.
//
// TREADY and NEW_DATA_READY are registered. TREADY rises one cycle after the
// condition to start is seen, so a packet of K beats sent back to back takes
// K+1 cycles from the first TVALID. Reset: synchronous, active low.
//
// The states, their transitions and the two control signals exchanged with
// the sender follow the source design. Starting on the TVALID level rather
// than on its rising edge, and stopping in the edge that writes the N-th word,
// are this implementation's choices.
module axis_receiver
  import sort_pkg::rx_state_t, sort_pkg::RX_IDLE, sort_pkg::RX_WRITE_FIFO, sort_pkg::RX_PROCESSING;
(
  input  logic clk,
  input  logic rst_n,
  // slave stream handshake (TDATA goes straight to the buffer)
  input  logic s_axis_tvalid,
  input  logic s_axis_tlast,
  output logic s_axis_tready,
  // input buffer
  input  logic buffer_last_free,
  output logic fifo_clear,
  output logic fifo_write,
  // control signals exchanged with the sender
  input  logic data_transmitted,
  output logic new_data_ready
);

  rx_state_t state;

  assign fifo_clear = (state == RX_IDLE);
  assign fifo_write = (state == RX_WRITE_FIFO) && s_axis_tvalid && s_axis_tready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state          <= RX_IDLE;
      s_axis_tready  <= 1'b0;
      new_data_ready <= 1'b0;
    end else begin
      unique case (state)
        RX_IDLE: begin
          if (s_axis_tvalid && !data_transmitted) begin
            s_axis_tready <= 1'b1;
            state         <= RX_WRITE_FIFO;
          end
        end
        RX_WRITE_FIFO: begin
          if (fifo_write && (s_axis_tlast || buffer_last_free)) begin
            s_axis_tready  <= 1'b0;
            new_data_ready <= 1'b1;
            state          <= RX_PROCESSING;
          end
        end
        RX_PROCESSING: begin
          if (data_transmitted) begin
            new_data_ready <= 1'b0;
            state          <= RX_IDLE;
          end
        end
        default: begin
          s_axis_tready  <= 1'b0;
          new_data_ready <= 1'b0;
          state          <= RX_IDLE;
        end
      endcase
    end
  end

  // TREADY is only ever high while writing into the buffer.
  a_ready_only_writing: assert property (@(posedge clk) disable iff (!rst_n)
    s_axis_tready |-> (state == RX_WRITE_FIFO));
  // NEW_DATA_READY is high exactly while the packet waits in PROCESSING.
  a_ndr_in_processing: assert property (@(posedge clk) disable iff (!rst_n)
    new_data_ready == (state == RX_PROCESSING));

endmodule
