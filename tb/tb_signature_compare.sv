// tb_signature_compare: equal signatures, signatures differing in a single
// random bit (including the first and last bit) and random pairs. The flag
// must follow a != b with one cycle of latency.
module tb_signature_compare;
  localparam int unsigned WIDTH = 1300;

  logic clk = 1'b0, rst_n;
  logic [WIDTH-1:0] sig_a, sig_b;
  logic diverse;
  int checks = 0, failures = 0;
  int n_eq = 0, n_ne = 0;

  signature_compare #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_div, prev_div;
    int bit_pos;
    sig_a = '0; sig_b = '0;
    rst_n = 1'b1;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      @(negedge clk);
      for (int w = 0; w < int'(WIDTH); w += 32) sig_a[w +: 32] = $urandom();
      sig_b = sig_a;
      unique case (cyc % 4)
        0: ;                                   // equal
        1: begin                               // one bit differs
          bit_pos = (cyc % 40 == 1) ? 0 : (cyc % 40 == 5) ? WIDTH - 1 :
                    $urandom_range(0, WIDTH - 1);
          sig_b[bit_pos] = ~sig_b[bit_pos];
        end
        2: for (int w = 0; w < int'(WIDTH); w += 32) sig_b[w +: 32] = $urandom();
        default: ;
      endcase
      expect_div = 1'b0;
      for (int i = 0; i < int'(WIDTH); i++) if (sig_a[i] != sig_b[i]) expect_div = 1'b1;
      if (expect_div) n_ne++; else n_eq++;
      #1;
      checks++;  // registered: the new pair is not visible before the edge
      if (cyc > 0 && diverse !== prev_div) failures++;
      prev_div = expect_div;
      @(posedge clk);
      #1;
      checks++;
      if (diverse !== expect_div) begin
        failures++;
        if (failures < 10) $display("cycle %0d: diverse=%0b want %0b", cyc, diverse, expect_div);
      end
    end
    checks++;
    if (n_eq == 0 || n_ne == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
