// tb_safedm_apb: APB transfers (setup then access phase) to every register.
// Checks reset values, that control writes reach the outputs, that CLEAR and
// the STATUS write-one-to-clear produce one-cycle pulses, that every result
// input and every histogram bin is readable at its address, and that
// unmapped addresses read zero.
module tb_safedm_apb;
  import safedm_pkg::*;
  localparam int unsigned CNT_W = 32, NBINS = 8, BIN_W = 16;

  logic clk = 1'b0, rst_n;
  logic psel, penable, pwrite;
  logic [APB_ADDR_W-1:0] paddr;
  logic [APB_DATA_W-1:0] pwdata, prdata;
  logic enable, clear, irq_clear;
  dm_mode_e mode;
  logic [CNT_W-1:0] threshold;
  logic [BIN_W-1:0] bin_size;
  logic irq, data_div, instr_div, no_div;
  logic [CNT_W-1:0] nodiv_cnt, data_eq_cnt, instr_eq_cnt, zero_cnt;
  logic signed [CNT_W-1:0] stagger;
  logic [CNT_W-1:0] hist_data [NBINS];
  logic [CNT_W-1:0] hist_instr [NBINS];
  int checks = 0, failures = 0;
  int clear_pulses = 0, irqclr_pulses = 0;

  safedm_apb #(.CNT_W(CNT_W), .NBINS(NBINS), .BIN_W(BIN_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (clear) clear_pulses++;
    if (irq_clear) irqclr_pulses++;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %h want %h", what, got, want);
    end
  endtask

  task automatic apb_write(logic [APB_ADDR_W-1:0] a, logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic apb_read(logic [APB_ADDR_W-1:0] a, output logic [31:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    #1 d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] d;
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
    irq = 1; data_div = 0; instr_div = 1; no_div = 1;
    nodiv_cnt = 32'h1111_0001; data_eq_cnt = 32'h2222_0002; instr_eq_cnt = 32'h3333_0003;
    stagger = -32'sd5; zero_cnt = 32'h5555_0005;
    foreach (hist_data[i])  hist_data[i]  = 32'hD000_0000 + i;
    foreach (hist_instr[i]) hist_instr[i] = 32'hE000_0000 + i;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // reset values
    apb_read(REG_CTRL, d);      chk("CTRL reset", d, 32'h0);
    apb_read(REG_THRESHOLD, d); chk("THRESHOLD reset", d, 32'h1);
    apb_read(REG_BIN_SIZE, d);  chk("BIN_SIZE reset", d, 32'h1);
    chk("enable reset", 32'(enable), 0);

    // control writes
    apb_write(REG_CTRL, 32'h5);  // enable, MODE_IRQ_THRESH
    chk("enable", 32'(enable), 1);
    chk("mode", 32'(mode), 32'(MODE_IRQ_THRESH));
    apb_read(REG_CTRL, d);       chk("CTRL readback", d, 32'h5);
    apb_write(REG_THRESHOLD, 32'd1234);
    chk("threshold", threshold, 32'd1234);
    apb_write(REG_BIN_SIZE, 32'h0001_0040);
    chk("bin_size", 32'(bin_size), 32'h40);   // only BIN_W bits kept
    apb_read(REG_THRESHOLD, d);  chk("THRESHOLD readback", d, 32'd1234);

    // pulses
    apb_write(REG_CLEAR, 32'h1);
    apb_write(REG_STATUS, 32'h1);
    apb_write(REG_STATUS, 32'h0);   // writing 0 clears nothing
    apb_write(REG_CLEAR, 32'h0);
    repeat (2) @(negedge clk);
    chk("clear pulses", clear_pulses, 1);
    chk("irq_clear pulses", irqclr_pulses, 1);

    // results
    apb_read(REG_STATUS, d);     chk("STATUS", d, 32'b1101);
    apb_read(REG_NODIV_CNT, d);  chk("NODIV_CNT", d, 32'h1111_0001);
    apb_read(REG_DATA_EQ, d);    chk("DATA_EQ", d, 32'h2222_0002);
    apb_read(REG_INSTR_EQ, d);   chk("INSTR_EQ", d, 32'h3333_0003);
    apb_read(REG_STAGGER, d);    chk("STAGGER", d, 32'hFFFF_FFFB);
    apb_read(REG_ZERO_STAG, d);  chk("ZERO_STAG", d, 32'h5555_0005);
    for (int i = 0; i < 16; i++) begin
      apb_read(REG_HIST_DATA + 8'(4 * i), d);
      chk("HIST_DATA", d, (i < int'(NBINS)) ? 32'hD000_0000 + i : 32'h0);
      apb_read(REG_HIST_INSTR + 8'(4 * i), d);
      chk("HIST_INSTR", d, (i < int'(NBINS)) ? 32'hE000_0000 + i : 32'h0);
    end
    apb_read(8'h3C, d);          chk("unmapped", d, 32'h0);
    apb_read(8'hC0, d);          chk("unmapped high", d, 32'h0);
    // a write to an unmapped address changes nothing
    apb_write(8'h3C, 32'hFFFF_FFFF);
    apb_read(REG_CTRL, d);       chk("CTRL after unmapped write", d, 32'h5);
    // read data only while selected
    @(negedge clk);
    paddr = REG_NODIV_CNT;
    #1 chk("prdata idle", prdata, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
