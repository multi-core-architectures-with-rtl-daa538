// Workload driver used by tb_workloads: sorts PACKETS random packets of N
// words of W bits through one two_step_sorting_ip instance of that size and
// reports its own check and failure counts.
//
// The source sends N-word packets with TLAST, the first with no idle cycles
// and the rest with random idle cycles; the sink applies random back-pressure
// after the first packet. Each returned packet is compared with the input
// sorted ascending in the testbench. For the first packet the cycles from the
// first input word to the last output word are checked against
// (N+1) + 2 + N: receive, sort, send.
module workload_runner #(
  parameter int N       = 8,
  parameter int W       = 32,
  parameter int PACKETS = 20
) (
  input  logic aclk,
  input  logic aresetn,
  output int   checks,
  output int   failures,
  output logic done
);
  logic [W-1:0] s_tdata, m_tdata;
  logic         s_tvalid, s_tready, s_tlast, m_tvalid, m_tready, m_tlast;

  two_step_sorting_ip #(.N(N), .W(W)) dut (
    .aclk(aclk), .aresetn(aresetn),
    .s_axis_tdata(s_tdata), .s_axis_tvalid(s_tvalid), .s_axis_tready(s_tready), .s_axis_tlast(s_tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready), .m_axis_tlast(m_tlast));

  logic [W-1:0] exp_q [$];
  int           beat = 0, packets_out = 0, cycle = 0, t_first_in = -1, t_last_out = -1;
  bit           random_mode = 0;

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] v;
    for (int b = 0; b < W; b += 32) v = (v << 32) | W'($urandom());
    return v;
  endfunction

  // sink: TREADY changes on the falling edge
  always @(negedge aclk) begin
    cycle++;
    m_tready = random_mode ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  // output checker: a beat is taken at a rising edge with TVALID and TREADY
  always @(posedge aclk) begin
    if (aresetn && m_tvalid && m_tready) begin
      logic [W-1:0] e;
      checks++;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : ~m_tdata;
      if (m_tdata !== e || m_tlast !== (beat == N - 1)) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d W=%0d beat %0d: %h expected %h", N, W, beat, m_tdata, e);
      end
      if (beat == N - 1) begin
        beat = 0;
        packets_out++;
        if (packets_out == 1) t_last_out = cycle;
      end else beat++;
    end
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    s_tvalid = 0; s_tlast = 0; s_tdata = '0; m_tready = 1;
    wait (aresetn);
    @(negedge aclk);
    for (int p = 0; p < PACKETS; p++) begin
      automatic logic [W-1:0] d [$];
      automatic logic [W-1:0] srt [$];
      for (int k = 0; k < N; k++) d.push_back((p % 4 == 3) ? W'($urandom_range(0, 5)) : rand_word());
      srt = d;
      srt.sort();
      foreach (srt[k]) exp_q.push_back(srt[k]);
      for (int k = 0; k < N; k++) begin
        bit taken;
        while (random_mode && $urandom_range(0, 3) == 0) begin
          s_tvalid = 0;
          @(negedge aclk);
        end
        s_tvalid = 1; s_tdata = d[k]; s_tlast = (k == N - 1);
        if (p == 0 && k == 0) t_first_in = cycle;
        taken = 0;
        while (!taken) begin
          taken = s_tready;
          @(negedge aclk);
        end
      end
      s_tvalid = 0; s_tlast = 0;
      if (p == 0) begin
        wait (packets_out == 1);
        checks++;
        if (t_last_out - t_first_in != (N + 1) + 2 + N) begin
          failures++;
          $display("FAIL N=%0d W=%0d: first packet took %0d cycles, expected %0d",
                   N, W, t_last_out - t_first_in, (N + 1) + 2 + N);
        end
        random_mode = 1;
      end
    end
    wait (packets_out == PACKETS);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("N=%0d W=%0d: %0d packets sorted, %0d checks, %0d failures", N, W, packets_out, checks, failures);
    done = 1;
  end
endmodule
