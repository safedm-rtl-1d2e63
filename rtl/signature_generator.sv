// signature_generator: data and instruction signature of one core.
//
// The data signature (DS) is the concatenation of one reg_port_fifo per
// observed register-file port: the values each port carried over the last
// DS_DEPTH cycles. Every value used in the pipeline is read from or written
// to the register file (bypassed values are written back too), so this
// window covers all data in flight. The instruction signature (IS) is the
// instr_fifo record of which instructions sit in which pipeline stage.
// Both record nothing new while the core's hold (stall) signal is high.
//
// Interface: rp_en/rp_data are the per-port enables and values, port 0 in
// the most significant part of ds; fetch_valid/fetch_instr the fetched
// group. Timing: ds and is are registered; a sample appears one cycle after
// it is presented.
module signature_generator #(
  parameter int unsigned XLEN     = 64,
  parameter int unsigned NPORTS   = 4,
  parameter int unsigned DS_DEPTH = 5,
  parameter int unsigned ILEN     = 32,
  parameter int unsigned IWIDTH   = 2,
  parameter int unsigned NSTAGES  = 7,
  localparam int unsigned DS_W    = NPORTS * DS_DEPTH * (XLEN + 1),
  localparam int unsigned IS_W    = NSTAGES * IWIDTH * (ILEN + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          hold,
  input  logic [NPORTS-1:0]             rp_en,
  input  logic [NPORTS-1:0][XLEN-1:0]   rp_data,
  input  logic [IWIDTH-1:0]             fetch_valid,
  input  logic [IWIDTH-1:0][ILEN-1:0]   fetch_instr,
  output logic [DS_W-1:0]               ds,
  output logic [IS_W-1:0]               is
);

  localparam int unsigned WIN_W = DS_DEPTH * (XLEN + 1);

  logic [NPORTS-1:0][WIN_W-1:0] win;

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
    reg_port_fifo #(
      .WIDTH (XLEN),
      .DEPTH (DS_DEPTH)
    ) u_fifo (
      .clk       (clk),
      .rst_n     (rst_n),
      .hold      (hold),
      .port_en   (rp_en[p]),
      .port_data (rp_data[p]),
      .window    (win[NPORTS-1-p])
    );
  end

  assign ds = win;

  instr_fifo #(
    .ILEN    (ILEN),
    .IWIDTH  (IWIDTH),
    .NSTAGES (NSTAGES)
  ) u_ififo (
    .clk         (clk),
    .rst_n       (rst_n),
    .hold        (hold),
    .fetch_valid (fetch_valid),
    .fetch_instr (fetch_instr),
    .stages      (is)
  );

endmodule
