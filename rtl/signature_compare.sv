// signature_compare: diversity flag from the signatures of two cores.
//
// The two cores show diversity in a signature whenever the signatures are
// not bit-for-bit equal (DataDiversity = DS0 != DS1, likewise for IS).
// The wide equality is computed as an OR over the XOR of both operands and
// registered, which keeps the long reduction off the path into the counters.
// The register stage is this design's choice.
//
// Interface: sig_a/sig_b are the two signatures; diverse is high when they
// differed in the previous cycle. Timing: one cycle of latency.
module signature_compare #(
  parameter int unsigned WIDTH = 1300
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] sig_a,
  input  logic [WIDTH-1:0] sig_b,
  output logic             diverse
);

  logic diff;

  assign diff = |(sig_a ^ sig_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) diverse <= 1'b0;
    else        diverse <= diff;
  end

endmodule
