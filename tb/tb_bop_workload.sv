// tb_bop_workload: the option-pricing workload at the largest tree one
// Nanocore can hold, on both fabric sizes evaluated for the architecture.
// AoC-8 (the default fabric) prices 8 European call options of 511 binomial
// steps, one per core; the n+1 = 512 leaf values fill a core's scratch
// memory. AoC-32 prices 32 options of 127 steps, one per core (smaller to
// keep the run short). Both runs are bop_bench instances working side by
// side; this module waits for both, adds up their checks and has the
// watchdog.
module tb_bop_workload;
  logic fin8, fin32;
  int   c8, f8, c32, f32;

  bop_bench #(.N_CORES(8),  .NSTEP(511), .NOPT(8))  aoc8  (.fin(fin8),  .n_checks(c8),  .n_failures(f8));
  bop_bench #(.N_CORES(32), .NSTEP(127), .NOPT(32)) aoc32 (.fin(fin32), .n_checks(c32), .n_failures(f32));

  logic wclk = 0;
  always #5 wclk = ~wclk;
  initial begin
    repeat (40000000) @(posedge wclk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c32, f8 + f32 + 1);
    $finish;
  end

  initial begin
    wait (fin8 && fin32);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c32, f8 + f32);
    $finish;
  end
endmodule
