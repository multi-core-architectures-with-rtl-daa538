// Self-checking testbench of axis_sender.
//
// The testbench plays the receiver (NEW_DATA_READY raised at random moments,
// dropped once DATA_TRANSMITTED is seen) and the stream slave (random
// TREADY). Per packet it checks: the first TVALID comes exactly two cycles
// after NEW_DATA_READY rises; exactly N beats are accepted with read
// pointers 0..N-1 in order; TLAST is on the last beat only; TVALID and the
// pointer hold while TREADY is low; DATA_TRANSMITTED rises right after the
// last beat and falls one cycle after NEW_DATA_READY falls.
module tb_axis_sender;
  localparam int N = 8;
  localparam int RW = $clog2(N);

  int checks = 0, failures = 0;
  int packets = 0, stalls = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          ndr, dtx, tvalid, tready, tlast;
  logic [RW-1:0] ptr;

  axis_sender dut (.clk(clk), .rst_n(rst_n), .new_data_ready(ndr), .data_transmitted(dtx),
                   .read_pointer(ptr), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
                   .m_axis_tlast(tlast));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    ndr = 0; tready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int wait_cycles, beat, cycles;
      bit bp;
      bp = (p % 2 == 1);  // every other packet with back-pressure
      repeat ($urandom_range(0, 4)) begin
        @(negedge clk);
        check(!tvalid && !dtx, "idle before NEW_DATA_READY");
      end
      @(negedge clk);
      ndr = 1;
      // first beat must be offered two cycles later
      wait_cycles = 0;
      tready = bp ? ($urandom_range(0, 1) == 1) : 1'b1;
      @(posedge clk); #1;
      check(!tvalid, "TVALID one cycle after NEW_DATA_READY");
      @(posedge clk); #1;
      check(tvalid, $sformatf("packet %0d: TVALID two cycles after NEW_DATA_READY", p));
      beat = 0; cycles = 0;
      while (beat < N && cycles < 10 * N) begin
        logic [RW-1:0] p0;
        bit acc;
        @(negedge clk);
        tready = bp ? ($urandom_range(0, 2) != 0) : 1'b1;
        #1;
        check(tvalid, "TVALID held until the packet is sent");
        check(int'(ptr) == beat, $sformatf("packet %0d beat %0d: pointer %0d", p, beat, ptr));
        check(tlast == (beat == N - 1), $sformatf("packet %0d beat %0d: TLAST %0b", p, beat, tlast));
        acc = tvalid && tready;
        if (!tready) stalls++;
        p0 = ptr;
        @(posedge clk); #1;
        cycles++;
        if (acc) beat++;
        else check(tvalid && ptr == p0, "beat held while TREADY low");
      end
      check(beat == N, $sformatf("packet %0d: %0d beats sent", p, beat));
      check(!tvalid && dtx, "DATA_TRANSMITTED right after the last beat");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(dtx && !tvalid, "DATA_TRANSMITTED held while NEW_DATA_READY high");
      end
      @(negedge clk);
      ndr = 0;
      @(posedge clk); #1;
      check(!dtx, "DATA_TRANSMITTED falls after NEW_DATA_READY");
      packets++;
    end
    check(stalls > 0, "back-pressure exercised");
    $display("packets %0d, stalled cycles %0d", packets, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
