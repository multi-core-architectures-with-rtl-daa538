// Self-checking testbench of rank_computer.
//
// Drives binary vectors built from random words (with many repeated values)
// and checks, one clock later, that each rank equals the number of words
// greater than that word plus the number of equal words before it. Also
// checks the 4-word example (101001 -> ranks 2,0,3,1), the one-cycle latency
// and the reset value.
module tb_rank_computer;
  localparam int N = 8;
  localparam int P = N * (N - 1) / 2;
  localparam int RW = $clog2(N);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [P-1:0]  bv;
  logic [RW-1:0] ranks [N];
  logic [5:0]    bv4;
  logic [1:0]    ranks4 [4];
  int unsigned   w [N];
  int            exp_rank [N];

  rank_computer dut (.clk(clk), .rst_n(rst_n), .binary_vector(bv), .ranks(ranks));
  rank_computer #(.N(4)) dut4 (.clk(clk), .rst_n(rst_n), .binary_vector(bv4), .ranks(ranks4));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    bv = '0; bv4 = '0;
    repeat (2) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) check(ranks[i] == 0, "reset value");
    rst_n = 1;
    bv4 = 6'b101001;
    @(posedge clk); #1;
    check(ranks4[0] == 2 && ranks4[1] == 0 && ranks4[2] == 3 && ranks4[3] == 1, "example ranks 2,0,3,1");
    for (int t = 0; t < 1000; t++) begin
      int k;
      for (int i = 0; i < N; i++) w[i] = (t % 2) ? $urandom_range(0, 3) : $urandom();
      k = 0;
      for (int j = 1; j < N; j++)
        for (int i = 0; i < j; i++) begin bv[k] = (w[i] < w[j]); k++; end
      for (int i = 0; i < N; i++) begin
        exp_rank[i] = 0;
        for (int j = 0; j < N; j++)
          if (w[j] > w[i] || (w[j] == w[i] && j < i)) exp_rank[i]++;
      end
      #1;
      // the register still holds the previous vector's ranks until the edge
      @(posedge clk); #1;
      for (int i = 0; i < N; i++)
        check(int'(ranks[i]) == exp_rank[i], $sformatf("t=%0d rank[%0d]=%0d exp %0d", t, i, ranks[i], exp_rank[i]));
    end
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
