// Self-checking testbench of edge_computer.
//
// Checks the 4-word example (02,07,00,04 -> 101001) and then random words
// at the default size (8 words of 32 bits), including repeated values. The
// reference walks the upper triangle column by column with its own counter
// and sets a bit where the row word is smaller than the column word.
module tb_edge_computer;
  localparam int N = 8;
  localparam int W = 32;
  localparam int P = N * (N - 1) / 2;

  int checks = 0, failures = 0;

  logic [7:0]   w4 [4];
  logic [5:0]   bv4;
  logic [W-1:0] words [N];
  logic [P-1:0] bv;

  edge_computer #(.N(4), .W(8)) dut4 (.words(w4), .binary_vector(bv4));
  edge_computer dut (.words(words), .binary_vector(bv));

  function automatic logic [P-1:0] ref_bv(input logic [W-1:0] w [N]);
    logic [P-1:0] r;
    int k;
    k = 0;
    for (int j = 1; j < N; j++)
      for (int i = 0; i < j; i++) begin
        r[k] = (w[i] < w[j]);
        k++;
      end
    return r;
  endfunction

  initial begin
    w4 = '{8'h02, 8'h07, 8'h00, 8'h04};
    #1;
    checks++;
    if (bv4 !== 6'b101001) begin
      failures++;
      $display("FAIL example: binary vector %b, expected 101001", bv4);
    end
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < N; k++)
        words[k] = (t % 3 == 0) ? W'($urandom_range(0, 5)) : W'($urandom());
      #1;
      checks++;
      if (bv !== ref_bv(words)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d: %h expected %h", t, bv, ref_bv(words));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
