// reg_port_fifo: time window of one register-file port.
//
// Keeps what one read or write port of the register file carried in each of
// the last DEPTH cycles. Every cycle in which the pipeline is not held, the
// oldest entry drops out and the current port sample enters; on a held
// cycle the window is frozen, so stalls do not push data out. Sampling every
// cycle (rather than only on accesses) makes the window sensitive to timing:
// two cores that touch the same registers in the same order but at different
// cycles produce different windows.
//
// Each entry is {en, value}, with value forced to zero when the port is idle,
// so an idle cycle and a read of zero are told apart. Storing the enable bit
// and zeroing idle values is this design's choice; the source only says the
// enable and the value are used.
//
// Interface: port_en/port_data are the port's enable and value in the current
// cycle; window is the concatenation, newest entry in the most significant
// slot (entry 1 of the signature), oldest in the least significant.
// Timing: a sample taken at a rising edge is visible on window one cycle later.
module reg_port_fifo #(
  parameter int unsigned WIDTH = 64, // port width
  parameter int unsigned DEPTH = 5   // cycles kept (n)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           hold,      // pipeline stalled: keep contents
  input  logic                           port_en,
  input  logic [WIDTH-1:0]               port_data,
  output logic [DEPTH*(WIDTH+1)-1:0]     window
);

  localparam int unsigned EW = WIDTH + 1;

  logic [DEPTH-1:0][EW-1:0] entry_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      entry_q <= '0;
    end else if (!hold) begin
      entry_q[DEPTH-1] <= {port_en, port_en ? port_data : '0};
      for (int i = 0; i < int'(DEPTH) - 1; i++) begin
        entry_q[i] <= entry_q[i+1];
      end
    end
  end

  assign window = entry_q;

endmodule
