// tb_instruction_diff: random commit counts of two dual-issue cores, with
// phases where one core is held back so the distance goes clearly positive
// and negative, checked each cycle against a reference distance and a
// reference count of zero-distance cycles.
module tb_instruction_diff;
  localparam int unsigned IWIDTH = 2, CNT_W = 32;
  localparam int unsigned CW = $clog2(IWIDTH + 1);

  logic clk = 1'b0, rst_n;
  logic enable, clear;
  logic [CW-1:0] commit0, commit1;
  logic signed [CNT_W-1:0] stagger;
  logic [CNT_W-1:0] zero_cnt;
  int checks = 0, failures = 0;
  int seen_pos = 0, seen_neg = 0, seen_zero = 0;

  instruction_diff #(.IWIDTH(IWIDTH), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r_st, r_zero;
    enable = 0; clear = 0; commit0 = 0; commit1 = 0;
    r_st = 0; r_zero = 0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      enable  = ($urandom_range(0, 19) != 0);
      clear   = ($urandom_range(0, 999) == 0);
      commit0 = CW'($urandom_range(0, IWIDTH));
      commit1 = CW'($urandom_range(0, IWIDTH));
      if (cyc % 800 < 100) commit1 = 0;        // core 0 runs ahead
      else if (cyc % 800 < 300) commit0 = 0;   // core 1 catches up and passes
      @(posedge clk);
      if (clear) begin
        r_st = 0; r_zero = 0;
      end else if (enable) begin
        if (r_st == 0) r_zero++;
        r_st += int'(commit0) - int'(commit1);
      end
      #1;
      checks += 2;
      if (stagger !== CNT_W'(r_st)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: stagger %0d want %0d", cyc, stagger, r_st);
      end
      if (zero_cnt !== CNT_W'(r_zero)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: zero_cnt %0d want %0d", cyc, zero_cnt, r_zero);
      end
      if (r_st > 0) seen_pos++;
      if (r_st < 0) seen_neg++;
      if (r_st == 0) seen_zero++;
    end
    checks++;
    if (seen_pos == 0 || seen_neg == 0 || seen_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
