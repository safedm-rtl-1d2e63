// safedm_pkg: constants and types shared by the SafeDM diversity monitor.
//
// SafeDM watches two redundant cores that run the same program without
// lockstep and reports the cycles in which both cores hold identical state,
// i.e. lack diversity and so are exposed to a common-cause fault. The
// defaults below describe the dual-issue, 7-stage, 64-bit RISC-V cores the
// monitor was built for, with four observed register-file ports. The FIFO
// depth of the data signature (DEF_DS_DEPTH), the register map, the
// interrupt mode encoding and the histogram size are this design's own
// choices; the source gives no numbers for them.
package safedm_pkg;

  // Observed core (RV64, dual issue, 7 pipeline stages, 4 register ports)
  localparam int unsigned DEF_XLEN     = 64; // register width
  localparam int unsigned DEF_NPORTS   = 4;  // register-file ports observed (m)
  localparam int unsigned DEF_DS_DEPTH = 5;  // cycles kept per port (n), own choice
  localparam int unsigned DEF_ILEN     = 32; // instruction encoding width
  localparam int unsigned DEF_IWIDTH   = 2;  // instructions per stage (p)
  localparam int unsigned DEF_NSTAGES  = 7;  // pipeline stages (o)

  // Monitor bookkeeping
  localparam int unsigned DEF_CNT_W    = 32; // width of every event counter
  localparam int unsigned DEF_NBINS    = 8;  // bins per lack-of-diversity histogram
  localparam int unsigned DEF_BIN_W    = 16; // width of the bin-size register
  localparam int unsigned APB_ADDR_W   = 8;  // byte address bits decoded by the slave
  localparam int unsigned APB_DATA_W   = 32;

  // How a lack of diversity is reported to software.
  typedef enum logic [1:0] {
    MODE_POLL       = 2'd0, // no interrupt: software reads the counter
    MODE_IRQ_FIRST  = 2'd1, // interrupt on the first cycle without diversity
    MODE_IRQ_THRESH = 2'd2, // interrupt once the count reaches THRESHOLD
    MODE_RSVD       = 2'd3  // behaves as MODE_POLL
  } dm_mode_e;

  // Register map (byte offsets into the slave's address window)
  localparam logic [APB_ADDR_W-1:0] REG_CTRL       = 8'h00; // [0] enable, [2:1] mode
  localparam logic [APB_ADDR_W-1:0] REG_STATUS     = 8'h04; // [0] irq (W1C), [1] data div, [2] instr div
  localparam logic [APB_ADDR_W-1:0] REG_THRESHOLD  = 8'h08; // interrupt threshold (MODE_IRQ_THRESH)
  localparam logic [APB_ADDR_W-1:0] REG_NODIV_CNT  = 8'h0C; // cycles with neither data nor instr diversity
  localparam logic [APB_ADDR_W-1:0] REG_DATA_EQ    = 8'h10; // cycles with equal data signatures
  localparam logic [APB_ADDR_W-1:0] REG_INSTR_EQ   = 8'h14; // cycles with equal instruction signatures
  localparam logic [APB_ADDR_W-1:0] REG_STAGGER    = 8'h18; // signed committed-instruction distance
  localparam logic [APB_ADDR_W-1:0] REG_ZERO_STAG  = 8'h1C; // cycles with zero distance
  localparam logic [APB_ADDR_W-1:0] REG_BIN_SIZE   = 8'h20; // histogram bin width in cycles
  localparam logic [APB_ADDR_W-1:0] REG_CLEAR      = 8'h24; // write: [0] clear all counters
  localparam logic [APB_ADDR_W-1:0] REG_HIST_DATA  = 8'h40; // 16 words: data histogram bins
  localparam logic [APB_ADDR_W-1:0] REG_HIST_INSTR = 8'h80; // 16 words: instruction histogram bins

  localparam logic [APB_ADDR_W-1:0] HIST_WINDOW_MASK = 8'hC0; // selects a histogram window

endpackage
