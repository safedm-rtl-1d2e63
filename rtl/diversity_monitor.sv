// diversity_monitor: decides and reports lack of diversity.
//
// The two cores lack diversity in a cycle only when both their data and
// their instruction signatures are equal; if either differs, a fault hitting
// both cores alike would still produce different errors. While enabled, the
// monitor counts such cycles, and also the cycles with equal data signatures
// and with equal instruction signatures alone. Software chooses how it
// learns of a loss of diversity (mode):
//   MODE_IRQ_FIRST  - the interrupt is raised on the first such cycle;
//   MODE_IRQ_THRESH - the interrupt is raised once the count of such cycles
//                     reaches THRESHOLD (a threshold of 0 acts as 1);
//   MODE_POLL       - no interrupt, software reads the count when it wants.
// The interrupt is a level that stays high until irq_clear; counters
// saturate and are zeroed by clear. The three modes follow the source; the
// saturation, the sticky interrupt and its clear are this design's choices.
//
// Timing: an input pair seen at a rising edge updates the counters and the
// interrupt at that edge (visible the next cycle).
module diversity_monitor
  import safedm_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  dm_mode_e         mode,
  input  logic [CNT_W-1:0] threshold,
  input  logic             clear,      // zero all counters (one-cycle pulse)
  input  logic             irq_clear,  // drop the interrupt (one-cycle pulse)
  input  logic             data_div,   // data signatures differ
  input  logic             instr_div,  // instruction signatures differ
  output logic             no_div,     // this cycle lacks diversity (and enabled)
  output logic [CNT_W-1:0] nodiv_cnt,
  output logic [CNT_W-1:0] data_eq_cnt,
  output logic [CNT_W-1:0] instr_eq_cnt,
  output logic             irq
);

  localparam logic [CNT_W-1:0] CNT_MAX = '1;

  logic             nodiv_next_hits;
  logic [CNT_W-1:0] thr_eff;

  assign no_div  = enable && !data_div && !instr_div;
  assign thr_eff = (threshold == '0) ? CNT_W'(1) : threshold;
  // The count after this cycle's event reaches the threshold.
  assign nodiv_next_hits = (nodiv_cnt == CNT_MAX) || ((nodiv_cnt + CNT_W'(1)) >= thr_eff);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nodiv_cnt    <= '0;
      data_eq_cnt  <= '0;
      instr_eq_cnt <= '0;
    end else if (clear) begin
      nodiv_cnt    <= '0;
      data_eq_cnt  <= '0;
      instr_eq_cnt <= '0;
    end else if (enable) begin
      if (no_div && nodiv_cnt != CNT_MAX)                  nodiv_cnt    <= nodiv_cnt + 1'b1;
      if (!data_div && data_eq_cnt != CNT_MAX)             data_eq_cnt  <= data_eq_cnt + 1'b1;
      if (!instr_div && instr_eq_cnt != CNT_MAX)           instr_eq_cnt <= instr_eq_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq <= 1'b0;
    end else if (irq_clear) begin
      irq <= 1'b0;
    end else if (no_div) begin
      unique case (mode)
        MODE_IRQ_FIRST:  irq <= 1'b1;
        MODE_IRQ_THRESH: if (nodiv_next_hits) irq <= 1'b1;
        default:         ;
      endcase
    end
  end

endmodule
