// tb_diversity_monitor: drives random diversity flags through all three
// reporting modes, with thresholds, clears and interrupt clears, and checks
// every counter, the lack-of-diversity flag and the interrupt against a
// reference model each cycle. Also checks that the threshold interrupt
// fires on exactly the THRESHOLD-th cycle without diversity.
module tb_diversity_monitor;
  import safedm_pkg::*;
  localparam int unsigned CNT_W = 32;

  logic clk = 1'b0, rst_n;
  logic enable, clear, irq_clear, data_div, instr_div;
  dm_mode_e mode;
  logic [CNT_W-1:0] threshold;
  logic no_div, irq;
  logic [CNT_W-1:0] nodiv_cnt, data_eq_cnt, instr_eq_cnt;
  int checks = 0, failures = 0;
  int irq_first_seen = 0, irq_thresh_seen = 0, poll_nodiv = 0;

  diversity_monitor #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [CNT_W-1:0] got, logic [CNT_W-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 15) $display("%0t %s: got %0d want %0d", $time, what, got, want);
    end
  endtask

  initial begin
    int r_nodiv, r_deq, r_ieq;
    bit r_irq, r_ndv;
    int hit_cycle;
    enable = 0; clear = 0; irq_clear = 0; data_div = 1; instr_div = 1;
    mode = MODE_POLL; threshold = 5;
    r_nodiv = 0; r_deq = 0; r_ieq = 0; r_irq = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if (cyc % 1000 == 0) begin
        mode      = dm_mode_e'((cyc / 1000) % 3);
        threshold = CNT_W'($urandom_range(0, 40));
      end
      enable    = ($urandom_range(0, 9) != 0);
      data_div  = ($urandom_range(0, 2) != 0);
      instr_div = ($urandom_range(0, 2) != 0);
      clear     = ($urandom_range(0, 299) == 0);
      irq_clear = ($urandom_range(0, 59) == 0);
      r_ndv = enable && !data_div && !instr_div;
      #1;
      checks++;
      if (no_div !== r_ndv) failures++;
      @(posedge clk);
      // reference update
      if (!irq_clear && r_ndv) begin
        if (mode == MODE_IRQ_FIRST) r_irq = 1;
        if (mode == MODE_IRQ_THRESH && (r_nodiv + 1 >= ((threshold == 0) ? 1 : int'(threshold)))) r_irq = 1;
      end
      if (irq_clear) r_irq = 0;
      if (clear) begin
        r_nodiv = 0; r_deq = 0; r_ieq = 0;
      end else if (enable) begin
        if (r_ndv) r_nodiv++;
        if (!data_div) r_deq++;
        if (!instr_div) r_ieq++;
      end
      #1;
      check("nodiv_cnt", nodiv_cnt, CNT_W'(r_nodiv));
      check("data_eq_cnt", data_eq_cnt, CNT_W'(r_deq));
      check("instr_eq_cnt", instr_eq_cnt, CNT_W'(r_ieq));
      check("irq", CNT_W'(irq), CNT_W'(r_irq));
      if (irq && mode == MODE_IRQ_FIRST) irq_first_seen++;
      if (irq && mode == MODE_IRQ_THRESH) irq_thresh_seen++;
      if (mode == MODE_POLL && r_ndv) begin
        poll_nodiv++;
        check("poll mode raises no irq", CNT_W'(irq), CNT_W'(r_irq));
      end
    end
    // Directed: threshold 10, lack of diversity every cycle from a clean start.
    @(negedge clk);
    clear = 1; irq_clear = 1; enable = 1; data_div = 1; instr_div = 1;
    mode = MODE_IRQ_THRESH; threshold = 10;
    @(negedge clk);
    clear = 0; irq_clear = 0; data_div = 0; instr_div = 0;
    hit_cycle = 0;
    for (int i = 1; i <= 20 && hit_cycle == 0; i++) begin
      @(negedge clk);
      if (irq) hit_cycle = i;
    end
    check("threshold interrupt cycle", CNT_W'(hit_cycle), 10);
    checks++;
    if (irq_first_seen == 0 || irq_thresh_seen == 0 || poll_nodiv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
