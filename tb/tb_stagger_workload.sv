// tb_stagger_workload: the staggering experiment run on the monitor at its
// default size, with a synthetic program in place of a benchmark.
//
// Both cores run the same looping program on a platform where load misses
// of both cores are served one at a time by a shared bus. One core first
// executes 0, 100, 1,000 or 10,000 nops; each staggered setting is run
// twice, once with each core delayed, and the start without staggering twice
// as well. For each setting the largest count over its runs of cycles with
// zero committed-instruction distance and of cycles without diversity is
// printed as a table. Every register is compared with the reference model
// after each run. With 10,000 nops of staggering the monitor must report no
// cycle without diversity, and the unstaggered start must show some.
module tb_stagger_workload;
  import safedm_pkg::*;

  localparam int NSET = 4;
  localparam int NOPS [NSET] = '{0, 100, 1000, 10000};
  localparam int CYCLES = 12000;

  logic clk = 1'b0, rst_n;
  int checks, failures;
  int extra_checks = 0, extra_failures = 0;

  safedm_env env (.*);

  always #5 clk = ~clk;

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    extra_failures++;
    $display("watchdog expired");
    finish();
  end

  initial begin
    longint nd, zs;
    longint max_nd [NSET];
    longint max_zs [NSET];
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int k = 0; k < NSET; k++) begin
      max_nd[k] = 0;
      max_zs[k] = 0;
      for (int first = 0; first < 2; first++) begin
        // first = 0: core 1 is delayed; first = 1: core 0 is delayed
        env.phase($sformatf("nops=%0d/%0d", NOPS[k], first),
                  first ? NOPS[k] : 0, first ? 0 : NOPS[k], 64'h0, 64'h0, 0, 0,
                  int'(MODE_POLL), 1, 16, CYCLES, 0, 0, 1, nd, zs);
        if (nd > max_nd[k]) max_nd[k] = nd;
        if (zs > max_zs[k]) max_zs[k] = zs;
      end
    end

    $display("staggering   zero-staggering cycles   cycles without diversity");
    for (int k = 0; k < NSET; k++)
      $display("%5d nops   %22d   %24d", NOPS[k], max_zs[k], max_nd[k]);

    extra_checks += 2;
    if (max_nd[NSET-1] != 0) begin
      extra_failures++;
      $display("10000 nops of staggering still lost diversity");
    end
    if (max_nd[0] == 0) begin
      extra_failures++;
      $display("an unstaggered start never lost diversity");
    end
    need_conflicts: begin
      extra_checks++;
      if (env.bus_conflicts == 0) extra_failures++;
    end
    finish();
  end
endmodule
