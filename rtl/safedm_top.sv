// safedm_top: SafeDM, a diversity monitor for two redundant cores.
//
// Two cores run the same software without lockstep. A fault that hits both
// cores alike (a voltage droop, say) goes unnoticed only if both cores are
// in the same state at that moment. SafeDM summarises each core's state in
// two signatures - the data on its register-file ports over the last cycles
// (DS) and the instructions in each of its pipeline stages (IS) - compares
// them every cycle, and reports the cycles in which both are equal, without
// ever stalling the cores. Software reads the results and configures the
// reporting over APB.
//
// Structure (per the source's block diagram): one signature_generator per
// core, one signature_compare for DS and one for IS, the diversity_monitor
// (counters and interrupt), instruction_diff (committed-instruction
// distance), two history_module instances (episodes of equal DS and of equal
// IS) and the safedm_apb register file. instruction_diff and the histograms
// are measurement aids; they are not needed to detect a loss of diversity.
//
// Core-side inputs, per core c (index 0 or 1), all sampled at the rising edge:
//   hold[c]            the core's pipeline is stalled this cycle
//   rp_en/rp_data[c]   enable and value of each observed register port
//   fetch_valid/instr  the instruction group entering the pipeline
//   commit[c]          number of instructions retired this cycle
// Timing: the signatures lag the core by one cycle, the comparison adds one,
// so a state entered at cycle t is judged at t+2 and counted at that edge.
module safedm_top
  import safedm_pkg::*;
#(
  parameter int unsigned XLEN     = DEF_XLEN,
  parameter int unsigned NPORTS   = DEF_NPORTS,
  parameter int unsigned DS_DEPTH = DEF_DS_DEPTH,
  parameter int unsigned ILEN     = DEF_ILEN,
  parameter int unsigned IWIDTH   = DEF_IWIDTH,
  parameter int unsigned NSTAGES  = DEF_NSTAGES,
  parameter int unsigned CNT_W    = DEF_CNT_W,
  parameter int unsigned NBINS    = DEF_NBINS,
  parameter int unsigned BIN_W    = DEF_BIN_W,
  localparam int unsigned CW      = $clog2(IWIDTH + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // APB slave
  input  logic                              psel,
  input  logic                              penable,
  input  logic                              pwrite,
  input  logic [APB_ADDR_W-1:0]             paddr,
  input  logic [APB_DATA_W-1:0]             pwdata,
  output logic [APB_DATA_W-1:0]             prdata,
  // interrupt to the operating system
  output logic                              irq,
  // observed cores
  input  logic [1:0]                        hold,
  input  logic [1:0][NPORTS-1:0]            rp_en,
  input  logic [1:0][NPORTS-1:0][XLEN-1:0]  rp_data,
  input  logic [1:0][IWIDTH-1:0]            fetch_valid,
  input  logic [1:0][IWIDTH-1:0][ILEN-1:0]  fetch_instr,
  input  logic [1:0][CW-1:0]                commit
);

  localparam int unsigned DS_W = NPORTS * DS_DEPTH * (XLEN + 1);
  localparam int unsigned IS_W = NSTAGES * IWIDTH * (ILEN + 1);

  logic [1:0][DS_W-1:0] ds;
  logic [1:0][IS_W-1:0] is;

  logic                    enable, clear, irq_clear;
  dm_mode_e                mode;
  logic [CNT_W-1:0]        threshold;
  logic [BIN_W-1:0]        bin_size;
  logic                    data_div, instr_div, no_div;
  logic [CNT_W-1:0]        nodiv_cnt, data_eq_cnt, instr_eq_cnt, zero_cnt;
  logic signed [CNT_W-1:0] stagger;
  logic [CNT_W-1:0]        hist_data  [NBINS];
  logic [CNT_W-1:0]        hist_instr [NBINS];

  for (genvar c = 0; c < 2; c++) begin : g_core
    signature_generator #(
      .XLEN     (XLEN),
      .NPORTS   (NPORTS),
      .DS_DEPTH (DS_DEPTH),
      .ILEN     (ILEN),
      .IWIDTH   (IWIDTH),
      .NSTAGES  (NSTAGES)
    ) u_sig (
      .clk         (clk),
      .rst_n       (rst_n),
      .hold        (hold[c]),
      .rp_en       (rp_en[c]),
      .rp_data     (rp_data[c]),
      .fetch_valid (fetch_valid[c]),
      .fetch_instr (fetch_instr[c]),
      .ds          (ds[c]),
      .is          (is[c])
    );
  end

  signature_compare #(.WIDTH(DS_W)) u_cmp_ds (
    .clk (clk), .rst_n (rst_n), .sig_a (ds[0]), .sig_b (ds[1]), .diverse (data_div)
  );

  signature_compare #(.WIDTH(IS_W)) u_cmp_is (
    .clk (clk), .rst_n (rst_n), .sig_a (is[0]), .sig_b (is[1]), .diverse (instr_div)
  );

  diversity_monitor #(.CNT_W(CNT_W)) u_dm (
    .clk          (clk),
    .rst_n        (rst_n),
    .enable       (enable),
    .mode         (mode),
    .threshold    (threshold),
    .clear        (clear),
    .irq_clear    (irq_clear),
    .data_div     (data_div),
    .instr_div    (instr_div),
    .no_div       (no_div),
    .nodiv_cnt    (nodiv_cnt),
    .data_eq_cnt  (data_eq_cnt),
    .instr_eq_cnt (instr_eq_cnt),
    .irq          (irq)
  );

  instruction_diff #(.IWIDTH(IWIDTH), .CNT_W(CNT_W)) u_idiff (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (enable),
    .clear    (clear),
    .commit0  (commit[0]),
    .commit1  (commit[1]),
    .stagger  (stagger),
    .zero_cnt (zero_cnt)
  );

  history_module #(.NBINS(NBINS), .CNT_W(CNT_W), .BIN_W(BIN_W)) u_hist_data (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (enable),
    .clear    (clear),
    .bin_size (bin_size),
    .event_i  (!data_div),
    .hist     (hist_data)
  );

  history_module #(.NBINS(NBINS), .CNT_W(CNT_W), .BIN_W(BIN_W)) u_hist_instr (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (enable),
    .clear    (clear),
    .bin_size (bin_size),
    .event_i  (!instr_div),
    .hist     (hist_instr)
  );

  safedm_apb #(.CNT_W(CNT_W), .NBINS(NBINS), .BIN_W(BIN_W)) u_apb (
    .clk          (clk),
    .rst_n        (rst_n),
    .psel         (psel),
    .penable      (penable),
    .pwrite       (pwrite),
    .paddr        (paddr),
    .pwdata       (pwdata),
    .prdata       (prdata),
    .enable       (enable),
    .mode         (mode),
    .threshold    (threshold),
    .bin_size     (bin_size),
    .clear        (clear),
    .irq_clear    (irq_clear),
    .irq          (irq),
    .data_div     (data_div),
    .instr_div    (instr_div),
    .no_div       (no_div),
    .nodiv_cnt    (nodiv_cnt),
    .data_eq_cnt  (data_eq_cnt),
    .instr_eq_cnt (instr_eq_cnt),
    .stagger      (stagger),
    .zero_cnt     (zero_cnt),
    .hist_data    (hist_data),
    .hist_instr   (hist_instr)
  );

endmodule
