// End-to-end testbench of two_step_sorting_ip at its default size
// (8 words of 32 bits).
//
// A behavioural DMA engine streams packets into the slave port and collects
// the master port. The source follows the AXI4-Stream rules (a beat is held
// until accepted) and inserts random idle cycles; the sink drops TREADY at
// random. Packets are of four kinds: N words ending with TLAST, short packets
// ending with TLAST (the core pads them with zeros), N words without TLAST
// (the core ends the packet on its full buffer), and packets full of repeated
// values. Two fixed data sets are replayed: 8 32-bit words and 8 8-bit words
// from the board tests of the original core.
//
// A monitor on the slave side collects the accepted words of each packet
// (ending on TLAST or on the N-th word) and queues the expected result: the
// words plus zero padding, sorted ascending. A monitor on the master side
// compares every beat and checks TLAST on the N-th beat only.
//
// Timing checks, with no idle cycles and TREADY held high: an N-word packet
// is received in N+1 cycles, the first sorted word is offered two cycles
// after the last input word is accepted, and the N words leave in N cycles.
//
// Every mechanism of the core is counted and must occur at least once.
module tb_two_step_sorting_ip;
  import sort_pkg::DEFAULT_N, sort_pkg::DEFAULT_W;
  localparam int N = DEFAULT_N;
  localparam int W = DEFAULT_W;

  int checks = 0, failures = 0;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  logic [W-1:0] s_tdata, m_tdata;
  logic         s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;

  two_step_sorting_ip dut (
    .aclk(aclk), .aresetn(aresetn),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  // ---------------------------------------------------------------- counters
  int n_tlast_full = 0, n_short = 0, n_full_end = 0, n_ties = 0;
  int n_in_gaps = 0, n_out_stalls = 0, n_blocked = 0, n_packets_out = 0;

  // ------------------------------------------------------------- the source
  typedef struct {
    logic [W-1:0] data [$];
    bit           tlast;  // mark the last word with TLAST
  } packet_t;
  packet_t      tx_q [$];
  int           in_gap_pct = 30;
  int           out_stall_pct = 30;

  // Drives on the falling edge; TREADY is stable from there to the rising
  // edge, so the beat is taken at that rising edge exactly when TREADY is
  // high at the falling edge.
  task automatic send_packet(input packet_t p);
    for (int k = 0; k < p.data.size(); k++) begin
      bit taken;
      while ($urandom_range(0, 99) < in_gap_pct) begin
        s_tvalid = 1'b0;
        n_in_gaps++;
        @(negedge aclk);
      end
      s_tvalid = 1'b1;
      s_tdata  = p.data[k];
      s_tlast  = p.tlast && (k == p.data.size() - 1);
      taken = 1'b0;
      while (!taken) begin
        taken = s_tready;
        if (!taken && dut.new_data_ready) n_blocked++;
        @(negedge aclk);
      end
    end
    s_tvalid = 1'b0;
    s_tlast  = 1'b0;
  endtask

  // --------------------------------------------------------------- monitors
  logic [W-1:0] in_words [$];
  logic [W-1:0] exp_q [$];

  function automatic void push_expected(input logic [W-1:0] w [$]);
    logic [W-1:0] a [$];
    a = w;
    while (a.size() < N) a.push_back('0);
    a.sort();
    foreach (a[k]) exp_q.push_back(a[k]);
  endfunction

  always @(posedge aclk) begin
    if (aresetn && s_tvalid && s_tready) begin
      in_words.push_back(s_tdata);
      if (s_tlast || in_words.size() == N) begin
        if (!s_tlast) n_full_end++;
        else if (in_words.size() < N) n_short++;
        else n_tlast_full++;
        push_expected(in_words);
        in_words.delete();
      end
    end
  end

  int out_beat = 0;
  always @(posedge aclk) begin
    if (aresetn && m_tvalid && !m_tready) n_out_stalls++;
    if (aresetn && m_tvalid && m_tready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL output beat with no packet expected");
      end else begin
        logic [W-1:0] e;
        e = exp_q.pop_front();
        if (m_tdata !== e || m_tlast !== (out_beat == N - 1)) begin
          failures++;
          if (failures < 10)
            $display("FAIL beat %0d: %h last %0b, expected %h last %0b", out_beat, m_tdata, m_tlast, e, out_beat == N - 1);
        end
      end
      out_beat = (out_beat == N - 1) ? 0 : out_beat + 1;
      if (out_beat == 0) n_packets_out++;
    end
  end

  // AXI4-Stream rule on the master port: a beat is held until accepted.
  logic [W-1:0] last_m_tdata;
  logic         last_m_stall = 0;
  always @(posedge aclk) begin
    if (aresetn && last_m_stall) begin
      checks++;
      if (!m_tvalid || m_tdata !== last_m_tdata) begin
        failures++;
        $display("FAIL master beat changed while stalled");
      end
    end
    last_m_stall <= m_tvalid && !m_tready;
    last_m_tdata <= m_tdata;
  end

  // the sink
  always @(negedge aclk) m_tready = ($urandom_range(0, 99) >= out_stall_pct);

  // ---------------------------------------------------------- stimulus
  function automatic packet_t make_packet(input int kind);
    packet_t p;
    int len;
    len = (kind == 1) ? $urandom_range(1, N - 1) : N;
    for (int k = 0; k < len; k++)
      p.data.push_back((kind == 3) ? W'($urandom_range(0, 3)) : W'($urandom()));
    p.tlast = (kind != 2);
    return p;
  endfunction

  task automatic wait_drained();
    int guard = 0;
    while ((exp_q.size() != 0 || in_words.size() != 0) && guard < 10000) begin
      @(negedge aclk);
      guard++;
    end
    check(guard < 10000, "all packets returned");
  endtask

  // Directed timing run: one N-word packet, no gaps, sink always ready.
  task automatic timed_packet(input logic [W-1:0] d [N], input bit use_tlast);
    int c_first, c_last_in, c_first_out, c_last_out, cyc;
    c_first = -1; c_last_in = -1; c_first_out = -1; c_last_out = -1;
    out_stall_pct = 0;
    repeat (3) @(negedge aclk);
    cyc = 0;
    fork
      begin
        packet_t p;
        foreach (d[k]) p.data.push_back(d[k]);
        p.tlast = use_tlast;
        in_gap_pct = 0;
        send_packet(p);
      end
      begin
        while (c_last_out < 0 && cyc < 200) begin
          @(negedge aclk);
          cyc++;
          if (c_first < 0 && s_tvalid) c_first = cyc;
          if (dut.new_data_ready && c_last_in < 0) c_last_in = cyc;
          if (m_tvalid && c_first_out < 0) c_first_out = cyc;
          if (m_tvalid && m_tready && m_tlast) c_last_out = cyc + 1;
        end
      end
    join
    // s_tvalid is first seen high after edge c_first; the last word is taken
    // at edge c_last_in; the first sorted word is offered after c_first_out.
    check(c_last_in - c_first + 1 == N + 1, $sformatf("receive took %0d cycles, expected %0d", c_last_in - c_first + 1, N + 1));
    check(c_first_out - c_last_in == 2, $sformatf("sort took %0d cycles, expected 2", c_first_out - c_last_in));
    check(c_last_out - c_first_out == N, $sformatf("send took %0d cycles, expected %0d", c_last_out - c_first_out, N));
    out_stall_pct = 30;
    in_gap_pct = 30;
    wait_drained();
  endtask

  logic [W-1:0] board32 [N] = '{32'h8d7d9240, 32'h53f272b4, 32'h2a98ed2c, 32'h8175921d,
                                32'hb64e1a6d, 32'h7b81f384, 32'h0b8c70ec, 32'h3ace1d19};
  logic [W-1:0] board8  [N] = '{32'h34, 32'h14, 32'h30, 32'h23, 32'hf6, 32'hf0, 32'h7b, 32'hf8};

  initial begin
    s_tvalid = 0; s_tlast = 0; s_tdata = '0;
    repeat (3) @(negedge aclk);
    aresetn = 1'b1;
    @(negedge aclk);
    timed_packet(board32, 1'b1);
    timed_packet(board8, 1'b0);
    // random traffic: the source keeps the core busy, so beats arrive while a
    // packet is still being sorted and sent
    for (int i = 0; i < 400; i++) begin
      packet_t p;
      int kind;
      kind = $urandom_range(0, 3);
      p = make_packet(kind);
      for (int k = 1; k < p.data.size(); k++)
        if (p.data[k] == p.data[k-1]) n_ties++;
      send_packet(p);
    end
    wait_drained();
    check(n_packets_out == 402, $sformatf("%0d packets returned, expected 402", n_packets_out));
    check(n_tlast_full > 0, "packet of N words ended by TLAST");
    check(n_short > 0,      "short packet padded with zeros");
    check(n_full_end > 0,   "packet ended by a full input buffer");
    check(n_ties > 0,       "repeated values sorted");
    check(n_in_gaps > 0,    "idle cycles on the slave stream");
    check(n_out_stalls > 0, "back-pressure on the master stream");
    check(n_blocked > 0,    "input refused while a packet is processed");
    $display("packets: %0d N-word with TLAST, %0d short, %0d ended by full buffer; repeated values %0d",
             n_tlast_full, n_short, n_full_end, n_ties);
    $display("slave idle cycles %0d, master stalls %0d, refused input cycles %0d",
             n_in_gaps, n_out_stalls, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge aclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
