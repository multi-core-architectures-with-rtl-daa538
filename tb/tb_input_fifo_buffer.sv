// Self-checking testbench of input_fifo_buffer.
//
// Writes random words with random gaps, checking after every edge the shift
// order (newest word in place 0), the zero padding of unwritten places, the
// full and last_free flags, that writes to a full buffer are ignored and that
// clear empties the buffer. A queue in the testbench is the reference.
module tb_input_fifo_buffer;
  localparam int N = 8;
  localparam int W = 32;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         clear, wr_en, full, last_free;
  logic [W-1:0] wr_data;
  logic [W-1:0] words [N];
  logic [W-1:0] model [$];

  input_fifo_buffer dut (.clk(clk), .rst_n(rst_n), .clear(clear), .wr_en(wr_en), .wr_data(wr_data),
                         .words(words), .full(full), .last_free(last_free));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  task automatic compare(input int t);
    for (int k = 0; k < N; k++) begin
      logic [W-1:0] e;
      e = (k < model.size()) ? model[model.size() - 1 - k] : '0;
      check(words[k] == e, $sformatf("t=%0d place %0d = %h expected %h", t, k, words[k], e));
    end
    check(full == (model.size() == N), $sformatf("t=%0d full flag", t));
    check(last_free == (model.size() == N - 1), $sformatf("t=%0d last_free flag", t));
  endtask

  initial begin
    clear = 0; wr_en = 0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    compare(-1);
    for (int t = 0; t < 3000; t++) begin
      clear   = ($urandom_range(0, 29) == 0);
      wr_en   = ($urandom_range(0, 2) != 0);
      wr_data = $urandom();
      @(posedge clk);
      if (clear) model.delete();
      else if (wr_en && model.size() < N) model.push_back(wr_data);
      #1;
      compare(t);
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
