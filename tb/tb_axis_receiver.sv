// Self-checking testbench of axis_receiver.
//
// The testbench plays the stream master (random TVALID, TLAST after a random
// number of beats or never), the input buffer (a word counter giving
// last_free) and the sender (DATA_TRANSMITTED raised some cycles after
// NEW_DATA_READY, dropped after NEW_DATA_READY falls). A reference machine
// written from the protocol description predicts TREADY, NEW_DATA_READY,
// the buffer clear and the buffer write in every cycle. Directed checks:
// TREADY rises one cycle after TVALID, a packet of K back-to-back beats takes
// K+1 cycles, packets end on TLAST and on a full buffer, and no beat is
// taken while the previous packet is still being sent.
module tb_axis_receiver;
  localparam int N = 8;

  int checks = 0, failures = 0;
  int n_tlast_end = 0, n_full_end = 0, n_blocked = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tvalid, tlast, tready, last_free, fifo_clear, fifo_write, dtx, ndr;

  axis_receiver dut (.clk(clk), .rst_n(rst_n), .s_axis_tvalid(tvalid), .s_axis_tlast(tlast),
                     .s_axis_tready(tready), .buffer_last_free(last_free), .fifo_clear(fifo_clear),
                     .fifo_write(fifo_write), .data_transmitted(dtx), .new_data_ready(ndr));

  // reference
  typedef enum {S_IDLE, S_WRITE, S_PROC} st_t;
  st_t  st;
  bit   r_tready, r_ndr;
  int   count;        // words in the modelled buffer
  int   beats_left;   // beats until TLAST in the current packet (-1: none)
  int   dtx_delay;

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  int count_q;  // count as seen by the receiver, updated away from the clock edge
  assign last_free = (count_q == N - 1);

  initial begin
    tvalid = 0; tlast = 0; dtx = 0;
    st = S_IDLE; r_tready = 0; r_ndr = 0; count = 0; count_q = 0; beats_left = 0; dtx_delay = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      bit write, rand_valid;
      // drive inputs for this cycle
      rand_valid = (t < 40) ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (beats_left == 0) beats_left = ($urandom_range(0, 3) == 0) ? -1 : $urandom_range(1, N);
      tvalid = rand_valid;
      tlast  = tvalid && (beats_left == 1);
      #1;
      // combinational outputs against the reference
      write = (st == S_WRITE) && tvalid && r_tready;
      check(tready == r_tready, $sformatf("t=%0d TREADY %0b expected %0b", t, tready, r_tready));
      check(ndr == r_ndr, $sformatf("t=%0d NEW_DATA_READY %0b expected %0b", t, ndr, r_ndr));
      check(fifo_clear == (st == S_IDLE), $sformatf("t=%0d fifo_clear", t));
      check(fifo_write == write, $sformatf("t=%0d fifo_write", t));
      if (st == S_PROC && tvalid) n_blocked++;
      @(posedge clk);
      // reference update
      case (st)
        S_IDLE: begin
          count = 0;
          if (tvalid && !dtx) begin r_tready = 1; st = S_WRITE; end
        end
        S_WRITE: if (write) begin
          count++;
          if (tlast || count == N) begin
            if (tlast) n_tlast_end++; else n_full_end++;
            r_tready = 0; r_ndr = 1; st = S_PROC; dtx_delay = $urandom_range(1, 12);
            beats_left = 0;
          end
        end
        S_PROC: if (dtx) begin r_ndr = 0; st = S_IDLE; end
        default: ;
      endcase
      if (write && beats_left > 0) beats_left--;
      // modelled sender: raise DATA_TRANSMITTED after a delay, drop it after NDR falls
      #1;
      count_q = count;
      if (ndr && !dtx) begin
        if (dtx_delay > 0) dtx_delay--; else dtx = 1;
      end else if (!ndr && dtx && $urandom_range(0, 1) == 0) dtx = 0;
    end
    // directed timing check: TREADY one cycle after TVALID, K beats in K+1 cycles
    @(negedge clk);
    // finish the packet in flight, let the sender side complete, then go quiet
    for (int k = 0; k < 40; k++) begin
      tvalid = tready; tlast = tready;
      dtx = ndr;
      @(negedge clk);
    end
    tvalid = 0; tlast = 0;
    for (int k = 0; k < 5; k++) begin
      dtx = ndr;
      @(negedge clk);
    end
    dtx = 0;
    @(negedge clk);
    check(!ndr && !tready && fifo_clear, "receiver back in IDLE");
    repeat (3) @(negedge clk);
    begin
      int cycles, k;
      cycles = 0; k = 0;
      tvalid = 1;
      while (k < 5) begin
        tlast = (k == 4);
        @(posedge clk);
        cycles++;
        if (fifo_write) k++;
        #1;
        if (cycles > 20) break;
      end
      check(k == 5 && cycles == 6, $sformatf("5-beat packet took %0d cycles for %0d beats, expected 6", cycles, k));
      check(ndr && !tready, "packet end raises NEW_DATA_READY and drops TREADY");
    end
    check(n_tlast_end > 10, "packets ended by TLAST");
    check(n_full_end > 10, "packets ended by a full buffer");
    check(n_blocked > 10, "beats refused while a packet was processed");
    $display("packets ended by TLAST %0d, by full buffer %0d, refused beats %0d", n_tlast_end, n_full_end, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
