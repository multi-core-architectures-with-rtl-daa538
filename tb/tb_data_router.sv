// Self-checking testbench of data_router.
//
// Drives random words with a random permutation as ranks and checks after
// one clock that place rank[i] holds word i, and that the output does not
// change before the clock edge. Also checks the reset value.
module tb_data_router;
  localparam int N = 8;
  localparam int W = 32;
  localparam int RW = $clog2(N);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0]  words [N];
  logic [RW-1:0] ranks [N];
  logic [W-1:0]  sorted [N];
  logic [W-1:0]  prev [N];
  int perm [N];

  data_router dut (.clk(clk), .rst_n(rst_n), .words(words), .ranks(ranks), .sorted(sorted));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin words[i] = $urandom(); ranks[i] = RW'(i); end
    repeat (2) @(posedge clk); #1;
    for (int p = 0; p < N; p++) check(sorted[p] == 0, "reset value");
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i);
        tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      prev = sorted;
      for (int i = 0; i < N; i++) begin words[i] = $urandom(); ranks[i] = RW'(perm[i]); end
      #1;
      check(sorted == prev, "output changed before the clock edge");
      @(posedge clk); #1;
      for (int i = 0; i < N; i++)
        check(sorted[perm[i]] == words[i], $sformatf("t=%0d word %0d not at place %0d", t, i, perm[i]));
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
