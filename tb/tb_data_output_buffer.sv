// Self-checking testbench of data_output_buffer.
//
// Fills the descending array with random words and checks that read pointer
// p returns place N-1-p, so pointers 0..N-1 walk the array smallest first.
module tb_data_output_buffer;
  localparam int N = 8;
  localparam int W = 32;
  localparam int RW = $clog2(N);

  int checks = 0, failures = 0;
  logic [W-1:0]  sorted [N];
  logic [RW-1:0] ptr;
  logic [W-1:0]  rd;

  data_output_buffer dut (.sorted(sorted), .read_pointer(ptr), .rd_data(rd));

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int p = 0; p < N; p++) sorted[p] = $urandom();
      for (int q = 0; q < N; q++) begin
        ptr = RW'(q);
        #1;
        checks++;
        if (rd !== sorted[N-1-q]) begin
          failures++;
          if (failures < 10) $display("FAIL pointer %0d: %h expected %h", q, rd, sorted[N-1-q]);
        end
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
