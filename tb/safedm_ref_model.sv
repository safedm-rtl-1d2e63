// safedm_ref_model: cycle-level reference of what the diversity monitor must
// report, written independently of the RTL from the monitor's definition.
// Not synthesizable; testbench use.
//
// It keeps its own per-core histories (the last DS_DEPTH samples of every
// register port, the instruction group in every stage), compares them
// between the cores, and from the comparison derives the counters, the
// staggering, the episode histograms and the interrupt, tracking the
// control registers by watching APB writes. The pipeline of the monitor is
// mirrored: samples of cycle t enter the histories at edge t, are compared
// at edge t+1 and are counted at edge t+2. It also counts how often each
// mechanism occurred (mech_*), so a testbench can require each of them.
module safedm_ref_model
  import safedm_pkg::*;
#(
  parameter int unsigned XLEN     = DEF_XLEN,
  parameter int unsigned NPORTS   = DEF_NPORTS,
  parameter int unsigned DS_DEPTH = DEF_DS_DEPTH,
  parameter int unsigned ILEN     = DEF_ILEN,
  parameter int unsigned IWIDTH   = DEF_IWIDTH,
  parameter int unsigned NSTAGES  = DEF_NSTAGES,
  parameter int unsigned NBINS    = DEF_NBINS,
  parameter int unsigned BIN_W    = DEF_BIN_W,
  localparam int unsigned CW      = $clog2(IWIDTH + 1)
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              psel,
  input  logic                              penable,
  input  logic                              pwrite,
  input  logic [APB_ADDR_W-1:0]             paddr,
  input  logic [APB_DATA_W-1:0]             pwdata,
  input  logic [1:0]                        hold,
  input  logic [1:0][NPORTS-1:0]            rp_en,
  input  logic [1:0][NPORTS-1:0][XLEN-1:0]  rp_data,
  input  logic [1:0][IWIDTH-1:0]            fetch_valid,
  input  logic [1:0][IWIDTH-1:0][ILEN-1:0]  fetch_instr,
  input  logic [1:0][CW-1:0]                commit,
  output bit                                r_irq,
  output bit                                r_en,
  output int                                r_mode,
  output longint                            r_nodiv,
  output longint                            r_deq,
  output longint                            r_ieq,
  output longint                            r_stag,
  output longint                            r_zero,
  output longint                            r_hd [NBINS],
  output longint                            r_hi [NBINS],
  // mechanism counts
  output int                                mech_hold,
  output int                                mech_nodiv,
  output int                                mech_data_div_only,
  output int                                mech_instr_div_only,
  output int                                mech_irq_clear,
  output int                                mech_poll_quiet,
  output int                                mech_hist_last,
  output int                                mech_stag_pos,
  output int                                mech_stag_neg,
  output int                                mech_clear
);

  logic [XLEN:0] h_port [2][NPORTS][DS_DEPTH];   // [core][port][age]
  logic [ILEN:0] h_stg  [2][NSTAGES][IWIDTH];    // [core][stage][slot]
  bit     ddiv_q, idiv_q, clear_q, irqclr_q;
  longint thr, bin;
  longint run_d, run_i;

  function automatic int bin_of(longint len, longint size);
    longint s, b;
    s = (size == 0) ? 1 : size;
    b = (len - 1) / s;
    return (b > NBINS - 1) ? NBINS - 1 : int'(b);
  endfunction

  initial begin
    foreach (h_port[c, p, a]) h_port[c][p][a] = '0;
    foreach (h_stg[c, st, s]) h_stg[c][st][s] = '0;
    ddiv_q = 0; idiv_q = 0; clear_q = 0; irqclr_q = 0;
    r_en = 0; r_mode = 0; thr = 1; bin = 1; r_irq = 0;
    r_nodiv = 0; r_deq = 0; r_ieq = 0; r_stag = 0; r_zero = 0; run_d = 0; run_i = 0;
    foreach (r_hd[b]) begin r_hd[b] = 0; r_hi[b] = 0; end
    mech_hold = 0; mech_nodiv = 0; mech_data_div_only = 0; mech_instr_div_only = 0;
    mech_irq_clear = 0; mech_poll_quiet = 0; mech_hist_last = 0;
    mech_stag_pos = 0; mech_stag_neg = 0; mech_clear = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin : step
      bit ddiv, idiv, ndv, ev_d, ev_i;
      // counters, interrupt and histograms act on the registered comparison
      ndv = r_en && !ddiv_q && !idiv_q;
      if (!irqclr_q && ndv) begin
        if (r_mode == 1) r_irq = 1;
        if (r_mode == 2 && r_nodiv + 1 >= ((thr == 0) ? 1 : thr)) r_irq = 1;
      end
      if (irqclr_q) begin
        if (r_irq) mech_irq_clear++;
        r_irq = 0;
      end
      ev_d = r_en && !ddiv_q;
      ev_i = r_en && !idiv_q;
      if (clear_q) begin
        r_nodiv = 0; r_deq = 0; r_ieq = 0; r_stag = 0; r_zero = 0;
        foreach (r_hd[b]) begin r_hd[b] = 0; r_hi[b] = 0; end
        run_d = 0; run_i = 0;
        mech_clear++;
      end else begin
        if (r_en) begin
          if (ndv) r_nodiv++;
          if (!ddiv_q) r_deq++;
          if (!idiv_q) r_ieq++;
          if (r_stag == 0) r_zero++;
          r_stag += longint'(commit[0]) - longint'(commit[1]);
          if (r_stag > 0) mech_stag_pos++;
          if (r_stag < 0) mech_stag_neg++;
        end
        if (ev_d) run_d++;
        else if (run_d > 0) begin
          r_hd[bin_of(run_d, bin)]++;
          if (bin_of(run_d, bin) == NBINS - 1) mech_hist_last++;
          run_d = 0;
        end
        if (ev_i) run_i++;
        else if (run_i > 0) begin
          r_hi[bin_of(run_i, bin)]++;
          if (bin_of(run_i, bin) == NBINS - 1) mech_hist_last++;
          run_i = 0;
        end
      end
      if (ndv) mech_nodiv++;
      if (r_en && ddiv_q && !idiv_q) mech_data_div_only++;
      if (r_en && !ddiv_q && idiv_q) mech_instr_div_only++;
      if (ndv && r_mode == 0 && !r_irq) mech_poll_quiet++;
      // compare the histories as they stand before this edge
      ddiv = 0;
      idiv = 0;
      foreach (h_port[0][p, a]) if (h_port[0][p][a] != h_port[1][p][a]) ddiv = 1;
      foreach (h_stg[0][st, s]) if (h_stg[0][st][s] != h_stg[1][st][s]) idiv = 1;
      ddiv_q = ddiv;
      idiv_q = idiv;
      // histories take this cycle's samples unless the core is held
      for (int c = 0; c < 2; c++) begin
        if (hold[c]) mech_hold++;
        else begin
          for (int p = 0; p < int'(NPORTS); p++) begin
            for (int a = DS_DEPTH - 1; a > 0; a--) h_port[c][p][a] = h_port[c][p][a-1];
            h_port[c][p][0] = {rp_en[c][p], rp_en[c][p] ? rp_data[c][p] : XLEN'(0)};
          end
          for (int st = NSTAGES - 1; st > 0; st--) h_stg[c][st] = h_stg[c][st-1];
          for (int s = 0; s < int'(IWIDTH); s++)
            h_stg[c][0][s] = {fetch_valid[c][s], fetch_valid[c][s] ? fetch_instr[c][s] : ILEN'(0)};
        end
      end
      // control registers as the bus writes them
      clear_q  = 0;
      irqclr_q = 0;
      if (psel && penable && pwrite) begin
        unique case (paddr)
          REG_CTRL:      begin r_en = pwdata[0]; r_mode = int'(pwdata[2:1]); end
          REG_STATUS:    irqclr_q = pwdata[0];
          REG_THRESHOLD: thr = longint'(pwdata);
          REG_BIN_SIZE:  bin = longint'(pwdata[BIN_W-1:0]);
          REG_CLEAR:     clear_q = pwdata[0];
          default: ;
        endcase
      end
    end
  end

endmodule
