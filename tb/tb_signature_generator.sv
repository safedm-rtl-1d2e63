// tb_signature_generator: one core's data and instruction signatures under
// random register-port traffic, fetch groups and stalls, checked every cycle
// against a reference built from plain arrays: DS is port 0 newest .. port
// NPORTS-1 oldest, IS is stage 1 .. stage NSTAGES.
module tb_signature_generator;
  localparam int unsigned XLEN = 64, NPORTS = 4, DS_DEPTH = 5;
  localparam int unsigned ILEN = 32, IWIDTH = 2, NSTAGES = 7;
  localparam int unsigned DS_W = NPORTS * DS_DEPTH * (XLEN + 1);
  localparam int unsigned IS_W = NSTAGES * IWIDTH * (ILEN + 1);

  logic clk = 1'b0, rst_n;
  logic hold;
  logic [NPORTS-1:0] rp_en;
  logic [NPORTS-1:0][XLEN-1:0] rp_data;
  logic [IWIDTH-1:0] fetch_valid;
  logic [IWIDTH-1:0][ILEN-1:0] fetch_instr;
  logic [DS_W-1:0] ds;
  logic [IS_W-1:0] is;
  int checks = 0, failures = 0;

  logic [XLEN:0] ref_p [NPORTS][DS_DEPTH];     // [port][age], age 0 newest
  logic [ILEN:0] ref_i [NSTAGES][IWIDTH];      // [stage-1][slot]

  signature_generator #(.XLEN(XLEN), .NPORTS(NPORTS), .DS_DEPTH(DS_DEPTH),
                        .ILEN(ILEN), .IWIDTH(IWIDTH), .NSTAGES(NSTAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DS_W-1:0] exp_ds;
    logic [IS_W-1:0] exp_is;
    int k;
    hold = 1'b0; rp_en = '0; rp_data = '0; fetch_valid = '0; fetch_instr = '0;
    foreach (ref_p[p, a]) ref_p[p][a] = '0;
    foreach (ref_i[s, l]) ref_i[s][l] = '0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      hold  = ($urandom_range(0, 4) == 0);
      rp_en = NPORTS'($urandom());
      for (int p = 0; p < int'(NPORTS); p++) rp_data[p] = {$urandom(), $urandom()};
      fetch_valid = IWIDTH'($urandom());
      for (int s = 0; s < int'(IWIDTH); s++) fetch_instr[s] = $urandom();
      @(posedge clk);
      if (!hold) begin
        for (int p = 0; p < int'(NPORTS); p++) begin
          for (int a = DS_DEPTH - 1; a > 0; a--) ref_p[p][a] = ref_p[p][a-1];
          ref_p[p][0] = {rp_en[p], rp_en[p] ? rp_data[p] : XLEN'(0)};
        end
        for (int st = NSTAGES - 1; st > 0; st--) ref_i[st] = ref_i[st-1];
        for (int s = 0; s < int'(IWIDTH); s++)
          ref_i[0][s] = {fetch_valid[s], fetch_valid[s] ? fetch_instr[s] : ILEN'(0)};
      end
      #1;
      // Build the expected signatures from the most significant end.
      k = DS_W;
      for (int p = 0; p < int'(NPORTS); p++)
        for (int a = 0; a < int'(DS_DEPTH); a++) begin
          k -= XLEN + 1;
          exp_ds[k +: XLEN + 1] = ref_p[p][a];
        end
      k = IS_W;
      for (int st = 0; st < int'(NSTAGES); st++)
        for (int s = IWIDTH - 1; s >= 0; s--) begin
          k -= ILEN + 1;
          exp_is[k +: ILEN + 1] = ref_i[st][s];
        end
      checks += 2;
      if (ds !== exp_ds) begin
        failures++;
        if (failures < 10) $display("cycle %0d: DS mismatch", cyc);
      end
      if (is !== exp_is) begin
        failures++;
        if (failures < 10) $display("cycle %0d: IS mismatch", cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
