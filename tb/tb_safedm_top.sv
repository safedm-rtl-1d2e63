// tb_safedm_top: end-to-end test of the diversity monitor at its default
// size (no parameter overrides), in the safedm_env environment: two
// behavioural dual-issue 7-stage cores running the same looping program,
// a shared bus, an APB master and an independent reference model.
//
// Phases: identical lockstep execution (interrupt on first loss), separate
// address spaces (data diversity only), staggered starts in both directions
// with random stalls (poll and threshold modes), a threshold interrupt after
// 200 cycles, poll mode, a nop prologue with fetch bubbles (instruction
// diversity only) and a simultaneous start with cache misses served over the
// shared bus. Every register is compared with the reference after each
// phase, the interrupt pin every cycle, and each mechanism must occur at
// least once: stall, lack of diversity, data-only and instruction-only
// diversity, both interrupt modes, interrupt clear, a quiet poll mode,
// histogram overflow, positive and negative staggering, counter clear and
// a bus conflict.
module tb_safedm_top;
  import safedm_pkg::*;

  logic clk = 1'b0, rst_n;
  int checks, failures;
  int extra_checks = 0, extra_failures = 0;
  int m_irq_first = 0, m_irq_thresh = 0;

  safedm_env env (.*);

  always #5 clk = ~clk;

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_failures);
    $finish;
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    extra_failures++;
    $display("watchdog expired");
    finish();
  end

  task automatic need(string what, int count);
    extra_checks++;
    if (count == 0) begin
      extra_failures++;
      $display("mechanism never happened: %s", what);
    end
  endtask

  initial begin
    longint nd, zs;
    logic [31:0] d;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    //         name              nop0 nop1 off0     off1     st0 st1 mode                  thr  bin cycles bb0 bb1 bus
    env.phase("lockstep",        0,   0,   0,       0,       0,  0,  int'(MODE_IRQ_FIRST),  1,   4,  1500,  0,  0,  0, nd, zs);
    if (env.irq) m_irq_first++;
    env.phase("address_spaces",  0,   0,   64'h1000, 64'h8000, 0, 0, int'(MODE_IRQ_THRESH), 10,  4,  1500,  0,  0,  0, nd, zs);
    extra_checks++;
    if (nd != 0) extra_failures++;   // different data every cycle: never a loss
    env.phase("stagger_100",     0,   100, 0,       0,       10, 10, int'(MODE_POLL),       1,   2,  4000,  0,  0,  0, nd, zs);
    env.phase("stagger_30_rev",  30,  0,   0,       0,       25, 5,  int'(MODE_IRQ_THRESH), 3,   1,  4000,  0,  0,  0, nd, zs);
    env.phase("threshold_200",   0,   0,   0,       0,       0,  0,  int'(MODE_IRQ_THRESH), 200, 16, 1000,  0,  0,  0, nd, zs);
    if (env.irq) m_irq_thresh++;
    env.phase("poll",            0,   0,   0,       0,       2,  2,  int'(MODE_POLL),       1,   8,  1500,  0,  0,  0, nd, zs);
    env.phase("nop_prologue",    600, 600, 0,       0,       0,  0,  int'(MODE_POLL),       1,   2,  400,   0,  15, 0, nd, zs);
    env.phase("shared_bus",      0,   0,   0,       0,       0,  0,  int'(MODE_POLL),       1,   4,  4000,  0,  0,  1, nd, zs);

    // live status and a final interrupt clear
    env.u_apb.read(REG_STATUS, d);
    env.chk("STATUS irq bit", 32'(d[0]), longint'(env.r_irq));
    env.u_apb.write(REG_STATUS, 32'h1);
    repeat (2) @(negedge clk);
    env.chk("irq cleared", 32'(env.irq), 0);

    $display("mechanisms: hold=%0d nodiv=%0d data_div_only=%0d instr_div_only=%0d",
             env.mech_hold, env.mech_nodiv, env.mech_data_div_only, env.mech_instr_div_only);
    $display("            irq_first=%0d irq_thresh=%0d irq_clear=%0d poll_quiet=%0d",
             m_irq_first, m_irq_thresh, env.mech_irq_clear, env.mech_poll_quiet);
    $display("            hist_last_bin=%0d stagger_pos=%0d stagger_neg=%0d clear=%0d bus_conflicts=%0d",
             env.mech_hist_last, env.mech_stag_pos, env.mech_stag_neg, env.mech_clear, env.bus_conflicts);
    need("stall (hold)", env.mech_hold);
    need("lack of diversity", env.mech_nodiv);
    need("data-only diversity", env.mech_data_div_only);
    need("instruction-only diversity", env.mech_instr_div_only);
    need("interrupt on first loss", m_irq_first);
    need("interrupt at threshold", m_irq_thresh);
    need("interrupt clear", env.mech_irq_clear);
    need("poll mode without interrupt", env.mech_poll_quiet);
    need("histogram overflow bin", env.mech_hist_last);
    need("positive staggering", env.mech_stag_pos);
    need("negative staggering", env.mech_stag_neg);
    need("counter clear", env.mech_clear);
    need("shared-bus conflict", env.bus_conflicts);
    finish();
  end
endmodule
