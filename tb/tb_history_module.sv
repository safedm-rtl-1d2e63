// tb_history_module: random runs of the event with random lengths (short and
// long, so the last bin overflows), a changing bin size, enable drops and
// clears. The reference measures each run's length and bins it with
// min((L-1)/S, NBINS-1); every bin is compared each cycle.
module tb_history_module;
  localparam int unsigned NBINS = 8, CNT_W = 32, BIN_W = 16;

  logic clk = 1'b0, rst_n;
  logic enable, clear, event_i;
  logic [BIN_W-1:0] bin_size;
  logic [CNT_W-1:0] hist [NBINS];
  int checks = 0, failures = 0;
  int last_bin_hits = 0, runs = 0;

  history_module #(.NBINS(NBINS), .CNT_W(CNT_W), .BIN_W(BIN_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r_hist [NBINS];
    int run_len, s_eff, b, left;
    bit ev;
    enable = 1; clear = 0; event_i = 0; bin_size = 3;
    foreach (r_hist[i]) r_hist[i] = 0;
    run_len = 0; left = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      s_eff = (bin_size == 0) ? 1 : int'(bin_size);  // size the current run was binned with
      if (left == 0) begin
        // alternate gaps and runs; runs sometimes long enough for the last bin
        event_i = ~event_i;
        left = event_i ? (($urandom_range(0, 9) == 0) ? $urandom_range(20, 60)
                                                       : $urandom_range(1, 12))
                       : $urandom_range(1, 4);
      end
      left--;
      enable = ($urandom_range(0, 199) != 0);
      clear  = ($urandom_range(0, 4999) == 0);
      if (cyc % 7500 == 0) begin
        bin_size = BIN_W'(cyc / 7500);  // 0 (acts as 1), 1, 2, 3; changed between runs
        enable   = 1'b0;
      end
      ev = enable && event_i;
      @(posedge clk);
      if (clear) begin
        foreach (r_hist[i]) r_hist[i] = 0;
        run_len = 0;
      end else if (ev) begin
        run_len++;
      end else if (run_len > 0) begin
        b = (run_len - 1) / s_eff;
        if (b > int'(NBINS) - 1) b = NBINS - 1;
        if (b == int'(NBINS) - 1) last_bin_hits++;
        r_hist[b]++;
        runs++;
        run_len = 0;
      end
      #1;
      for (int i = 0; i < int'(NBINS); i++) begin
        checks++;
        if (hist[i] !== CNT_W'(r_hist[i])) begin
          failures++;
          if (failures < 10) $display("cycle %0d bin %0d: %0d want %0d", cyc, i, hist[i], r_hist[i]);
        end
      end
    end
    checks++;
    if (last_bin_hits == 0 || runs < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
