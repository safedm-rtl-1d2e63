// safedm_apb: APB slave register file of the diversity monitor.
//
// The only bus-specific part of SafeDM: it turns APB transfers into the
// control signals of the monitor and returns its results, so porting the
// monitor to another bus means replacing only this module. It implements
// the AMBA 2.0 APB slave (PSEL, PENABLE, PWRITE, PADDR, PWDATA, PRDATA, no
// wait states and no error response). Writes take effect at the access
// phase; read data is driven combinationally from PADDR while PSEL is high.
// The register map (see safedm_pkg) is this design's choice:
//   CTRL      [0] enable, [2:1] reporting mode        (reset 0, MODE_POLL)
//   STATUS    [0] interrupt (write 1 to clear), [1] data diversity,
//             [2] instruction diversity, [3] lack of diversity (read only)
//   THRESHOLD interrupt threshold for MODE_IRQ_THRESH (reset 1)
//   NODIV_CNT, DATA_EQ, INSTR_EQ, STAGGER, ZERO_STAG  counters (read only)
//   BIN_SIZE  histogram bin width in cycles           (reset 1)
//   CLEAR     write with bit 0 set: zero every counter and histogram
//   HIST_DATA / HIST_INSTR  one word per bin, up to 16 bins each
// Unmapped addresses read as zero and ignore writes.
// Timing: clear and irq_clear are one-cycle pulses in the cycle after the
// access phase; control registers change at the access-phase edge.
module safedm_apb
  import safedm_pkg::*;
#(
  parameter int unsigned CNT_W = 32,
  parameter int unsigned NBINS = 8,
  parameter int unsigned BIN_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // APB slave
  input  logic                      psel,
  input  logic                      penable,
  input  logic                      pwrite,
  input  logic [APB_ADDR_W-1:0]     paddr,
  input  logic [APB_DATA_W-1:0]     pwdata,
  output logic [APB_DATA_W-1:0]     prdata,
  // control towards the monitor
  output logic                      enable,
  output dm_mode_e                  mode,
  output logic [CNT_W-1:0]          threshold,
  output logic [BIN_W-1:0]          bin_size,
  output logic                      clear,
  output logic                      irq_clear,
  // results from the monitor
  input  logic                      irq,
  input  logic                      data_div,
  input  logic                      instr_div,
  input  logic                      no_div,
  input  logic [CNT_W-1:0]          nodiv_cnt,
  input  logic [CNT_W-1:0]          data_eq_cnt,
  input  logic [CNT_W-1:0]          instr_eq_cnt,
  input  logic signed [CNT_W-1:0]   stagger,
  input  logic [CNT_W-1:0]          zero_cnt,
  input  logic [CNT_W-1:0]          hist_data  [NBINS],
  input  logic [CNT_W-1:0]          hist_instr [NBINS]
);

  localparam int unsigned IDX_W = (NBINS > 1) ? $clog2(NBINS) : 1;

  logic             wr;
  logic [3:0]       bin_sel;   // word within a 16-word histogram window
  logic [IDX_W-1:0] bin_idx;
  logic             bin_ok;

  assign wr      = psel && penable && pwrite;
  assign bin_sel = paddr[5:2];
  assign bin_ok  = 32'(bin_sel) < NBINS;
  assign bin_idx = IDX_W'(bin_sel);

  // ---------------------------------------------------------------- writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable    <= 1'b0;
      mode      <= MODE_POLL;
      threshold <= CNT_W'(1);
      bin_size  <= BIN_W'(1);
      clear     <= 1'b0;
      irq_clear <= 1'b0;
    end else begin
      clear     <= 1'b0;
      irq_clear <= 1'b0;
      if (wr) begin
        unique case (paddr)
          REG_CTRL: begin
            enable <= pwdata[0];
            mode   <= dm_mode_e'(pwdata[2:1]);
          end
          REG_STATUS:    irq_clear <= pwdata[0];
          REG_THRESHOLD: threshold <= CNT_W'(pwdata);
          REG_BIN_SIZE:  bin_size  <= BIN_W'(pwdata);
          REG_CLEAR:     clear     <= pwdata[0];
          default: ;
        endcase
      end
    end
  end

  // ----------------------------------------------------------------- reads
  always_comb begin
    prdata = '0;
    if (psel) begin
      if ((paddr & HIST_WINDOW_MASK) == REG_HIST_DATA) begin
        if (bin_ok) prdata = APB_DATA_W'(hist_data[bin_idx]);
      end else if ((paddr & HIST_WINDOW_MASK) == REG_HIST_INSTR) begin
        if (bin_ok) prdata = APB_DATA_W'(hist_instr[bin_idx]);
      end else begin
        unique case (paddr)
          REG_CTRL:      prdata = APB_DATA_W'({mode, enable});
          REG_STATUS:    prdata = APB_DATA_W'({no_div, instr_div, data_div, irq});
          REG_THRESHOLD: prdata = APB_DATA_W'(threshold);
          REG_NODIV_CNT: prdata = APB_DATA_W'(nodiv_cnt);
          REG_DATA_EQ:   prdata = APB_DATA_W'(data_eq_cnt);
          REG_INSTR_EQ:  prdata = APB_DATA_W'(instr_eq_cnt);
          REG_STAGGER:   prdata = APB_DATA_W'(stagger);
          REG_ZERO_STAG: prdata = APB_DATA_W'(zero_cnt);
          REG_BIN_SIZE:  prdata = APB_DATA_W'(bin_size);
          default:       prdata = '0;
        endcase
      end
    end
  end

  // ------------------------------------------------------- protocol rules
  // An access phase is always preceded by a setup phase to the same slave.
  property p_setup_then_access;
    @(posedge clk) disable iff (!rst_n) (psel && !penable) |=> (psel && penable);
  endproperty
  property p_enable_needs_select;
    @(posedge clk) disable iff (!rst_n) penable |-> psel;
  endproperty
  property p_addr_stable;
    @(posedge clk) disable iff (!rst_n)
      (psel && !penable) |=> ($stable(paddr) && $stable(pwrite));
  endproperty
  a_setup_then_access:   assert property (p_setup_then_access);
  a_enable_needs_select: assert property (p_enable_needs_select);
  a_addr_stable:         assert property (p_addr_stable);

endmodule
