// safedm_env: test environment around the diversity monitor at its default
// size: two core_pipe_model cores sharing one shared_bus_model, the APB
// master, the monitor itself and the safedm_ref_model reference, with tasks
// to run a phase and compare every register with the reference. Not
// synthesizable; the top-level testbenches instantiate it once and call
// its tasks.
//
// phase() restarts both cores with the given start, offset and stall
// settings, clears and configures the monitor, runs, stops the monitor and
// reads everything back. The interrupt pin is compared with the reference
// on every cycle.
module safedm_env
  import safedm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures
);
  localparam int unsigned NBINS = DEF_NBINS;
  localparam int unsigned CW = $clog2(DEF_IWIDTH + 1);

  logic psel, penable, pwrite;
  logic [APB_ADDR_W-1:0] paddr;
  logic [APB_DATA_W-1:0] pwdata, prdata;
  logic irq;
  logic [1:0]                                   hold;
  logic [1:0][DEF_NPORTS-1:0]                   rp_en;
  logic [1:0][DEF_NPORTS-1:0][DEF_XLEN-1:0]     rp_data;
  logic [1:0][DEF_IWIDTH-1:0]                   fetch_valid;
  logic [1:0][DEF_IWIDTH-1:0][DEF_ILEN-1:0]     fetch_instr;
  logic [1:0][CW-1:0]                           commit;
  logic [1:0] bus_req, bus_done;
  int bus_conflicts;
  int pc [2];

  // core configuration, set by phase()
  logic   restart = 1'b0;
  int     nops_cfg [2]  = '{0, 0};
  longint off_cfg [2]   = '{0, 0};
  int     stall_cfg [2] = '{0, 0};
  int     bubble_cfg [2] = '{0, 0};
  bit     use_bus = 0;

  // reference outputs
  bit r_irq, r_en;
  int r_mode;
  longint r_nodiv, r_deq, r_ieq, r_stag, r_zero;
  longint r_hd [NBINS];
  longint r_hi [NBINS];
  int mech_hold, mech_nodiv, mech_data_div_only, mech_instr_div_only, mech_irq_clear;
  int mech_poll_quiet, mech_hist_last, mech_stag_pos, mech_stag_neg, mech_clear;

  initial begin
    checks = 0;
    failures = 0;
  end

  safedm_top dut (.*);

  for (genvar c = 0; c < 2; c++) begin : g_core
    core_pipe_model u_core (
      .clk         (clk),
      .restart     (restart),
      .nops_cfg    (nops_cfg[c]),
      .offset_cfg  (off_cfg[c]),
      .stall_pct   (stall_cfg[c]),
      .bubble_pct  (bubble_cfg[c]),
      .use_bus     (use_bus),
      .hold        (hold[c]),
      .rp_en       (rp_en[c]),
      .rp_data     (rp_data[c]),
      .fetch_valid (fetch_valid[c]),
      .fetch_instr (fetch_instr[c]),
      .commit      (commit[c]),
      .bus_req     (bus_req[c]),
      .bus_done    (bus_done[c]),
      .pc_out      (pc[c])
    );
  end

  shared_bus_model u_bus (.clk(clk), .req(bus_req), .done(bus_done), .conflicts(bus_conflicts));

  apb_master_bfm u_apb (.*);

  safedm_ref_model u_ref (.*);

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (irq !== r_irq) begin
        failures++;
        if (failures < 10) $display("%0t irq=%0b want %0b", $time, irq, r_irq);
      end
    end
  end

  task automatic chk(string what, logic [31:0] got, longint want);
    checks++;
    if (got !== 32'(want)) begin
      failures++;
      $display("%s: got %0d want %0d", what, $signed(got), want);
    end
  endtask

  task automatic readback(string name, output longint nodiv, output longint zero_stag);
    logic [31:0] d;
    u_apb.read(REG_NODIV_CNT, d); chk({name, " NODIV_CNT"}, d, r_nodiv);
    u_apb.read(REG_DATA_EQ, d);   chk({name, " DATA_EQ"}, d, r_deq);
    u_apb.read(REG_INSTR_EQ, d);  chk({name, " INSTR_EQ"}, d, r_ieq);
    u_apb.read(REG_STAGGER, d);   chk({name, " STAGGER"}, d, r_stag);
    u_apb.read(REG_ZERO_STAG, d); chk({name, " ZERO_STAG"}, d, r_zero);
    for (int b = 0; b < int'(NBINS); b++) begin
      u_apb.read(REG_HIST_DATA + 8'(4 * b), d);  chk({name, " HIST_DATA"}, d, r_hd[b]);
      u_apb.read(REG_HIST_INSTR + 8'(4 * b), d); chk({name, " HIST_INSTR"}, d, r_hi[b]);
    end
    nodiv = r_nodiv;
    zero_stag = r_zero;
    $display("%-16s zero_stag=%0d nodiv=%0d data_eq=%0d instr_eq=%0d stagger=%0d irq=%0b bus_conflicts=%0d",
             name, r_zero, r_nodiv, r_deq, r_ieq, r_stag, irq, bus_conflicts);
  endtask

  // Run one experiment; returns the cycles without diversity and with zero
  // staggering as read from the monitor's reference.
  task automatic phase(string name, int nop0, int nop1, longint off0, longint off1,
                       int st0, int st1, int mode, int thr, int bin, int cycles,
                       int bb0, int bb1, bit bus, output longint nodiv, output longint zero_stag);
    u_apb.write(REG_CTRL, 32'({mode[1:0], 1'b0}));
    @(negedge clk);
    nops_cfg   = '{nop0, nop1};
    off_cfg    = '{off0, off1};
    stall_cfg  = '{st0, st1};
    bubble_cfg = '{bb0, bb1};
    use_bus    = bus;
    restart    = 1'b1;
    @(negedge clk);
    restart    = 1'b0;
    u_apb.write(REG_STATUS, 32'h1);                 // drop a pending interrupt
    u_apb.write(REG_CLEAR, 32'h1);
    u_apb.write(REG_THRESHOLD, 32'(thr));
    u_apb.write(REG_BIN_SIZE, 32'(bin));
    u_apb.write(REG_CTRL, 32'({mode[1:0], 1'b1}));  // enable
    repeat (cycles) @(negedge clk);
    u_apb.write(REG_CTRL, 32'({mode[1:0], 1'b0}));  // stop counting
    repeat (3) @(negedge clk);
    readback(name, nodiv, zero_stag);
  endtask

endmodule
