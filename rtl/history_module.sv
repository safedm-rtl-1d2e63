// history_module: histogram of lack-of-diversity episodes.
//
// Used to study how often, and for how long, a signature stays equal across
// the two cores. An episode is a run of consecutive enabled cycles with the
// event input high. When the run ends, the bin matching its length L is
// incremented: bin k holds runs with (k*S) < L <= ((k+1)*S), S being the
// programmable bin size, and the last bin also takes every longer run. The
// bin index is tracked during the run with a small cycle counter, so no
// divider is needed. A bin size of 0 acts as 1. Bins saturate.
// The histogram idea and the programmable bin size follow the source; the
// episode definition, one common bin width and the bin count are this
// design's choices.
//
// Interface: event is the per-cycle condition (e.g. equal data signatures);
// a falling enable or a clear also ends a run; clear drops it unrecorded and
// zeroes all bins. Timing: a run ending at cycle t (event low at t) is in
// hist one cycle later.
module history_module #(
  parameter int unsigned NBINS = 8,
  parameter int unsigned CNT_W = 32,
  parameter int unsigned BIN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             clear,
  input  logic [BIN_W-1:0] bin_size,
  input  logic             event_i,
  output logic [CNT_W-1:0] hist [NBINS]
);

  localparam int unsigned IDX_W = (NBINS > 1) ? $clog2(NBINS) : 1;

  logic             in_run_q;
  logic [BIN_W-1:0] in_bin_q;   // cycles of the run counted in the current bin
  logic [IDX_W-1:0] idx_q;      // bin the run falls in so far
  logic [BIN_W-1:0] size_eff;
  logic             ev;

  assign size_eff = (bin_size == '0) ? BIN_W'(1) : bin_size;
  assign ev       = enable && event_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_run_q <= 1'b0;
      in_bin_q <= '0;
      idx_q    <= '0;
      for (int b = 0; b < int'(NBINS); b++) hist[b] <= '0;
    end else if (clear) begin
      in_run_q <= 1'b0;
      in_bin_q <= '0;
      idx_q    <= '0;
      for (int b = 0; b < int'(NBINS); b++) hist[b] <= '0;
    end else if (ev) begin
      if (!in_run_q) begin
        in_run_q <= 1'b1;
        in_bin_q <= BIN_W'(1);
        idx_q    <= '0;
      end else if (in_bin_q >= size_eff) begin
        // run grows past the upper edge of its bin
        in_bin_q <= BIN_W'(1);
        if (idx_q != IDX_W'(NBINS - 1)) idx_q <= idx_q + 1'b1;
      end else begin
        in_bin_q <= in_bin_q + 1'b1;
      end
    end else if (in_run_q) begin
      in_run_q <= 1'b0;
      if (hist[idx_q] != '1) hist[idx_q] <= hist[idx_q] + 1'b1;
    end
  end

endmodule
