// Self-checking testbench of two_step_sorting_network.
//
// Applies random arrays (many with repeated values) and checks that exactly
// two clock edges later the output is the input sorted in descending order,
// computed here with an insertion sort. After one edge the router has paired
// the new words with the previous array's ranks; the testbench predicts that
// intermediate array from its own rank computation and checks it too, which
// shows that the ranks are registered one cycle ahead of the routing.
// Also replays the 4-word 8-bit example (02,07,00,04 -> 07,04,02,00).
module tb_two_step_sorting_network;
  localparam int N = 8;
  localparam int W = 32;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [W-1:0] words [N];
  logic [W-1:0] sorted [N];
  logic [W-1:0] expd [N];
  logic [W-1:0] mid [N];
  int           rk [N], prev_rk [N];
  logic [7:0]   w4 [4];
  logic [7:0]   s4 [4];

  two_step_sorting_network dut (.clk(clk), .rst_n(rst_n), .words(words), .sorted(sorted));
  two_step_sorting_network #(.N(4), .W(8)) dut4 (.clk(clk), .rst_n(rst_n), .words(w4), .sorted(s4));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  function automatic void ref_sort(input logic [W-1:0] w [N], output logic [W-1:0] r [N]);
    r = w;
    for (int i = 1; i < N; i++) begin
      logic [W-1:0] v;
      int j;
      v = r[i];
      j = i - 1;
      while (j >= 0 && r[j] < v) begin r[j+1] = r[j]; j--; end
      r[j+1] = v;
    end
  endfunction

  initial begin
    for (int i = 0; i < N; i++) words[i] = '0;
    w4 = '{8'h02, 8'h07, 8'h00, 8'h04};
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk); #1;
    check(s4 == '{8'h07, 8'h04, 8'h02, 8'h00}, "example 02,07,00,04");
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < N; i++) words[i] = (t % 3 == 1) ? W'($urandom_range(0, 4)) : W'($urandom());
      words[0] = ~W'(t);  // distinct from the previous array
      ref_sort(words, expd);
      prev_rk = rk;
      for (int i = 0; i < N; i++) begin
        rk[i] = 0;
        for (int j = 0; j < N; j++) if (words[j] > words[i] || (words[j] == words[i] && j < i)) rk[i]++;
      end
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) mid[prev_rk[i]] = words[i];
      if (t > 0) check(sorted == mid, $sformatf("t=%0d after one edge: words not routed by the previous ranks", t));
      @(posedge clk); #1;
      check(sorted == expd, $sformatf("t=%0d wrong result after two edges", t));
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
