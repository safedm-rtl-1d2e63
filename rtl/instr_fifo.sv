// instr_fifo: per-stage record of the instructions a core has in flight.
//
// Models an in-order pipeline of NSTAGES stages in which the IWIDTH slots of
// a stage move to the next stage together (all or none), as in the dual-issue
// 7-stage cores SafeDM was built for. Each cycle that the pipeline is not
// held, the group fetched this cycle enters stage 1, every stage passes its
// group on, and the group in the last stage retires. While hold is high
// nothing moves. Because the position of an instruction in the record is its
// stage, two cores holding the same instructions in different stages give
// different records.
//
// Each slot is {valid, encoding}, with the encoding forced to zero in an
// empty slot. Flushes of wrong-path instructions are not modelled; the
// source does not describe any.
//
// Interface: fetch_valid/fetch_instr give the group fetched this cycle
// (slot 0 first); stages is the concatenation, stage 1 in the most
// significant group. Timing: a fetched group shows up on stages one cycle
// later and leaves it NSTAGES non-held cycles after that.
module instr_fifo #(
  parameter int unsigned ILEN    = 32, // instruction width
  parameter int unsigned IWIDTH  = 2,  // instructions per stage (p)
  parameter int unsigned NSTAGES = 7   // pipeline stages (o)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   hold,
  input  logic [IWIDTH-1:0]                      fetch_valid,
  input  logic [IWIDTH-1:0][ILEN-1:0]            fetch_instr,
  output logic [NSTAGES*IWIDTH*(ILEN+1)-1:0]     stages
);

  localparam int unsigned SW = ILEN + 1;

  logic [IWIDTH-1:0][SW-1:0]                  fetch_grp;
  logic [NSTAGES-1:0][IWIDTH-1:0][SW-1:0]     stage_q;

  always_comb begin
    for (int s = 0; s < int'(IWIDTH); s++) begin
      fetch_grp[s] = {fetch_valid[s], fetch_valid[s] ? fetch_instr[s] : '0};
    end
  end

  // stage_q[NSTAGES-1] is pipeline stage 1, stage_q[0] the last stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage_q <= '0;
    end else if (!hold) begin
      stage_q[NSTAGES-1] <= fetch_grp;
      for (int i = 0; i < int'(NSTAGES) - 1; i++) begin
        stage_q[i] <= stage_q[i+1];
      end
    end
  end

  assign stages = stage_q;

endmodule
