// tb_reg_port_fifo: random port traffic with random stalls against a
// reference window kept as a plain array in the testbench. Checks every
// cycle that the window holds the last DEPTH non-held samples, newest first,
// with idle samples recorded as {0, 0}.
module tb_reg_port_fifo;
  localparam int unsigned WIDTH = 64;
  localparam int unsigned DEPTH = 5;
  localparam int unsigned EW    = WIDTH + 1;

  logic clk = 1'b0, rst_n;
  logic hold, port_en;
  logic [WIDTH-1:0] port_data;
  logic [DEPTH*EW-1:0] window;
  int checks = 0, failures = 0;
  int holds = 0;

  logic [EW-1:0] ref_q [DEPTH]; // ref_q[0] newest

  reg_port_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hold = 1'b0; port_en = 1'b0; port_data = '0;
    foreach (ref_q[i]) ref_q[i] = '0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      hold      = ($urandom_range(0, 3) == 0);
      port_en   = $urandom_range(0, 1)[0];
      port_data = {$urandom(), $urandom()};
      if (cyc % 100 < 8) port_data = '0;  // reads of zero
      @(posedge clk);
      if (!hold) begin
        for (int i = DEPTH - 1; i > 0; i--) ref_q[i] = ref_q[i-1];
        ref_q[0] = {port_en, port_en ? port_data : WIDTH'(0)};
      end else holds++;
      #1;
      for (int i = 0; i < int'(DEPTH); i++) begin
        checks++;
        if (window[(DEPTH-1-i)*EW +: EW] !== ref_q[i]) begin
          failures++;
          if (failures < 10) $display("cycle %0d entry %0d: got %h want %h", cyc, i,
                                      window[(DEPTH-1-i)*EW +: EW], ref_q[i]);
        end
      end
    end
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
