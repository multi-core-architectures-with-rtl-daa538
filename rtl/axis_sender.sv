// AXI4-Stream sender (master side controller) of the sorting IP core.
//
// A four-state machine:
//   IDLE          - waits for NEW_DATA_READY from the receiver.
//   READY_TO_SEND - one cycle of delay. Together with the IDLE cycle this
//                   gives the sorting network the two cycles it needs after
//                   the last word reached the input buffer.
//   SEND_STREAM   - TVALID is high and TDATA is the output buffer word at the
//                   read pointer. The pointer advances on every accepted beat;
//                   the beat at pointer N-1 carries TLAST and ends the packet.
//   DONE          - DATA_TRANSMITTED is high until the receiver drops
//                   NEW_DATA_READY; then the machine returns to IDLE and
//                   DATA_TRANSMITTED falls.
//
// Timing: with TREADY held high, the first beat leaves two cycles after
// NEW_DATA_READY rises and the N beats follow back to back. TVALID, TLAST and
// the pointer are stable while TREADY is low. Reset: synchronous, active low.
//
// The states, the transitions and the handshake with the receiver follow the
// source design; TLAST being driven with the last beat and the exact moment
// DATA_TRANSMITTED changes are this implementation's reading of it.
module axis_sender
  import sort_pkg::DEFAULT_N, sort_pkg::tx_state_t, sort_pkg::TX_IDLE,
         sort_pkg::TX_READY_TO_SEND, sort_pkg::TX_SEND_STREAM, sort_pkg::TX_DONE;
#(
  parameter int unsigned N = DEFAULT_N,
  localparam int unsigned RW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // control signals exchanged with the receiver
  input  logic          new_data_ready,
  output logic          data_transmitted,
  // output buffer
  output logic [RW-1:0] read_pointer,
  // master stream handshake (TDATA comes from the output buffer)
  output logic          m_axis_tvalid,
  input  logic          m_axis_tready,
  output logic          m_axis_tlast
);

  tx_state_t state;
  logic      last_beat;

  assign m_axis_tvalid = (state == TX_SEND_STREAM);
  assign last_beat     = (read_pointer == RW'(N - 1));
  assign m_axis_tlast  = m_axis_tvalid && last_beat;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state            <= TX_IDLE;
      read_pointer     <= '0;
      data_transmitted <= 1'b0;
    end else begin
      unique case (state)
        TX_IDLE: begin
          read_pointer <= '0;
          if (new_data_ready) state <= TX_READY_TO_SEND;
        end
        TX_READY_TO_SEND: begin
          state <= TX_SEND_STREAM;
        end
        TX_SEND_STREAM: begin
          if (m_axis_tready) begin
            if (last_beat) begin
              read_pointer     <= '0;
              data_transmitted <= 1'b1;
              state            <= TX_DONE;
            end else begin
              read_pointer <= read_pointer + RW'(1);
            end
          end
        end
        TX_DONE: begin
          if (!new_data_ready) begin
            data_transmitted <= 1'b0;
            state            <= TX_IDLE;
          end
        end
        default: begin
          data_transmitted <= 1'b0;
          state            <= TX_IDLE;
        end
      endcase
    end
  end

  // AXI4-Stream rule: once TVALID is high it stays high, with the same beat,
  // until the beat is accepted.
  a_valid_held: assert property (@(posedge clk) disable iff (!rst_n)
    (m_axis_tvalid && !m_axis_tready) |=>
      (m_axis_tvalid && read_pointer == $past(read_pointer)));

endmodule
