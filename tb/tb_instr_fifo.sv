// tb_instr_fifo: random fetch groups with random stalls against a reference
// pipeline model. Checks every cycle that each stage holds the group fetched
// the right number of non-held cycles earlier, with empty slots zeroed, and
// that a group leaves after NSTAGES advances.
module tb_instr_fifo;
  localparam int unsigned ILEN = 32, IWIDTH = 2, NSTAGES = 7;
  localparam int unsigned SW = ILEN + 1;

  logic clk = 1'b0, rst_n;
  logic hold;
  logic [IWIDTH-1:0] fetch_valid;
  logic [IWIDTH-1:0][ILEN-1:0] fetch_instr;
  logic [NSTAGES*IWIDTH*SW-1:0] stages;
  int checks = 0, failures = 0;

  logic [IWIDTH*SW-1:0] ref_st [NSTAGES]; // ref_st[0] = stage 1

  instr_fifo #(.ILEN(ILEN), .IWIDTH(IWIDTH), .NSTAGES(NSTAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [IWIDTH*SW-1:0] pack_grp(logic [IWIDTH-1:0] v,
                                                   logic [IWIDTH-1:0][ILEN-1:0] ins);
    logic [IWIDTH*SW-1:0] g;
    for (int s = 0; s < int'(IWIDTH); s++) g[s*SW +: SW] = {v[s], v[s] ? ins[s] : ILEN'(0)};
    return g;
  endfunction

  initial begin
    int marker_age;
    hold = 1'b0; fetch_valid = '0; fetch_instr = '0;
    foreach (ref_st[i]) ref_st[i] = '0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      hold        = ($urandom_range(0, 4) == 0);
      fetch_valid = IWIDTH'($urandom());
      for (int s = 0; s < int'(IWIDTH); s++) fetch_instr[s] = $urandom();
      @(posedge clk);
      if (!hold) begin
        for (int i = NSTAGES - 1; i > 0; i--) ref_st[i] = ref_st[i-1];
        ref_st[0] = pack_grp(fetch_valid, fetch_instr);
      end
      #1;
      for (int i = 0; i < int'(NSTAGES); i++) begin
        checks++;
        if (stages[(NSTAGES-1-i)*IWIDTH*SW +: IWIDTH*SW] !== ref_st[i]) begin
          failures++;
          if (failures < 10) $display("cycle %0d stage %0d mismatch", cyc, i + 1);
        end
      end
    end
    // Latency: drain, then one marker group must stay exactly NSTAGES cycles.
    @(negedge clk);
    hold = 1'b0; fetch_valid = '0;
    repeat (NSTAGES) @(negedge clk);
    checks++;
    if (stages != '0) failures++;
    fetch_valid = '1; fetch_instr = {32'hDEAD_0001, 32'hDEAD_0002};
    @(negedge clk);
    fetch_valid = '0;
    marker_age = 0;
    while (stages != '0 && marker_age < 100) begin
      marker_age++;
      @(negedge clk);
    end
    checks++;
    if (marker_age != int'(NSTAGES)) begin
      failures++;
      $display("marker stayed %0d cycles, want %0d", marker_age, NSTAGES);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
