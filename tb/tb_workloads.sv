// Workload testbench: the configurations the core was evaluated at.
//
// Resource measurements of the original core used 8 words of 8, 16, 32 and
// 64 bits, and 8, 16, 32 and 64 words of 32 bits; on hardware it sorted
// 8 words of 8 and of 32 bits. Each of the seven distinct sizes is built
// here as its own core and sorts random packets end to end, with the cycle
// count of an undisturbed packet checked against receive (N+1), sort (2) and
// send (N) cycles.
module tb_workloads;
  logic aclk = 0, aresetn = 0;
  always #5 aclk = ~aclk;

  localparam int NCFG = 7;
  localparam int CFG_N [NCFG] = '{8, 8, 8, 8, 16, 32, 64};
  localparam int CFG_W [NCFG] = '{8, 16, 32, 64, 32, 32, 32};

  int   c [NCFG];
  int   f [NCFG];
  logic d [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    workload_runner #(.N(CFG_N[g]), .W(CFG_W[g]), .PACKETS(20)) u_run (
      .aclk(aclk), .aresetn(aresetn), .checks(c[g]), .failures(f[g]), .done(d[g]));
  end

  int checks, failures;
  initial begin
    repeat (3) @(negedge aclk);
    aresetn = 1;
    wait (d.and() == 1'b1);
    checks = 0; failures = 0;
    for (int g = 0; g < NCFG; g++) begin checks += c[g]; failures += f[g]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge aclk);
    checks = 0; failures = 1;
    for (int g = 0; g < NCFG; g++) begin checks += c[g]; failures += f[g]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
