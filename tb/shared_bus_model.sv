// shared_bus_model: behavioural model of the bus both cores use to reach the
// shared L2 cache. It serves one miss at a time, taking LATENCY cycles each;
// when both cores wait, the one that asked first is served first, and a tie
// alternates between the cores. It is this serialisation that pulls two
// cores running the same program apart. Not synthesizable; testbench use.
//
// Timing: req is sampled at the rising edge; done is a one-cycle pulse
// (changed at the falling edge) to the core whose miss was served.
module shared_bus_model #(
  parameter int LATENCY = 12
) (
  input  logic       clk,
  input  logic [1:0] req,
  output logic [1:0] done,
  output int         conflicts   // cycles in which a core waited for the other
);
  int busy_left = 0;
  int owner = -1;
  int last = 1;
  int waited [2] = '{0, 0};

  initial begin
    done = '0;
    conflicts = 0;
  end

  always @(negedge clk) begin
    done = '0;
    if (owner >= 0) begin
      busy_left--;
      if (busy_left == 0) begin
        done[owner] = 1'b1;
        owner = -1;
      end
    end
  end

  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) waited[c] = (req[c] && !done[c]) ? waited[c] + 1 : 0;
    if (owner < 0 && done == '0) begin
      if (req[0] && req[1]) begin
        owner = (waited[0] > waited[1]) ? 0 : (waited[1] > waited[0]) ? 1 : 1 - last;
      end else if (req[0]) owner = 0;
      else if (req[1]) owner = 1;
      if (owner >= 0) begin
        busy_left = LATENCY;
        last = owner;
      end
    end
    if (owner >= 0 && req[1 - owner]) conflicts++;
  end
endmodule
