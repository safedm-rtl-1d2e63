// instruction_diff: committed-instruction distance between the two cores.
//
// A signed counter goes up by the number of instructions core 0 commits in a
// cycle and down by the number core 1 commits, so it holds how far core 0 is
// ahead of core 1 (the staggering) when both run the same instruction
// stream. A second counter counts the enabled cycles in which that distance
// is zero. The up/down counter follows the source; counting zero-distance
// cycles here, the commit-count inputs and the clear are this design's
// choices.
//
// Interface: commit0/commit1 are the number of instructions each core
// retires this cycle (0..IWIDTH). Timing: both counters update at the edge
// that samples the commits; zero_cnt counts the distance held before it.
module instruction_diff #(
  parameter int unsigned IWIDTH = 2,
  parameter int unsigned CNT_W  = 32,
  localparam int unsigned CW    = $clog2(IWIDTH + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    clear,
  input  logic [CW-1:0]           commit0,
  input  logic [CW-1:0]           commit1,
  output logic signed [CNT_W-1:0] stagger,
  output logic [CNT_W-1:0]        zero_cnt
);

  logic signed [CNT_W-1:0] delta;

  assign delta = $signed(CNT_W'(commit0)) - $signed(CNT_W'(commit1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stagger  <= '0;
      zero_cnt <= '0;
    end else if (clear) begin
      stagger  <= '0;
      zero_cnt <= '0;
    end else if (enable) begin
      stagger <= stagger + delta;
      if (stagger == '0 && zero_cnt != '1) zero_cnt <= zero_cnt + 1'b1;
    end
  end

endmodule
