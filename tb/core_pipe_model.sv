// core_pipe_model: behavioural model of the signals a dual-issue, 7-stage,
// in-order core presents to the diversity monitor. Not synthesizable; used
// only by the testbenches.
//
// The core runs a looping program: a 64-instruction body whose instruction
// words are a hash of the loop position. It may first execute nops_cfg nops
// (staggered start). Register read ports carry operands of the two slots in
// stage 3, write ports the results of the slots in stage 7. Values depend on
// the instruction, the loop iteration and an address-space offset, so two
// replicated processes with different offsets operate on different data.
//
// Stalls (hold) come from three sources: random stalls (stall_pct per cent
// of cycles), fetch bubbles (bubble_pct, e.g. instruction-cache misses; the
// group entering stage 1 is empty) and, when use_bus is set, load misses.
// Every 8th instruction is a load, and loads of every 4th loop iteration
// miss in the private cache. A missing load waits in stage 5 (hold high,
// bus_req high) until the shared bus model pulses bus_done.
//
// Timing: outputs change at the falling edge; state advances at the rising
// edge. restart, sampled at a rising edge, empties the pipeline and loads
// the configuration.
module core_pipe_model
  import safedm_pkg::*;
#(
  parameter int unsigned XLEN    = DEF_XLEN,
  parameter int unsigned NPORTS  = DEF_NPORTS,
  parameter int unsigned ILEN    = DEF_ILEN,
  parameter int unsigned IWIDTH  = DEF_IWIDTH,
  parameter int unsigned NSTAGES = DEF_NSTAGES,
  localparam int unsigned CW     = $clog2(IWIDTH + 1)
) (
  input  logic                          clk,
  input  logic                          restart,
  input  int                            nops_cfg,
  input  longint                        offset_cfg,
  input  int                            stall_pct,
  input  int                            bubble_pct,
  input  bit                            use_bus,
  output logic                          hold,
  output logic [NPORTS-1:0]             rp_en,
  output logic [NPORTS-1:0][XLEN-1:0]   rp_data,
  output logic [IWIDTH-1:0]             fetch_valid,
  output logic [IWIDTH-1:0][ILEN-1:0]   fetch_instr,
  output logic [CW-1:0]                 commit,
  output logic                          bus_req,
  input  logic                          bus_done,
  output int                            pc_out   // program position reached
);

  localparam logic [ILEN-1:0] NOP = 32'h0000_0013;
  localparam int RA_STAGE  = 2;            // stage 3
  localparam int MEM_STAGE = 4;            // stage 5
  localparam int WB_STAGE  = NSTAGES - 1;  // stage 7

  typedef struct {
    logic valid;
    logic [ILEN-1:0] instr;
    int pc;      // program position, -1 for a nop
    bit served;  // a missing load has been served by the bus
  } slot_t;

  slot_t pipe [NSTAGES][IWIDTH];
  int  pc;
  int  nops;
  bit  bubble;
  bit  wait_miss;

  assign pc_out = pc;

  function automatic logic [ILEN-1:0] prog(int p);
    logic [31:0] h;
    h = 32'(p % 64) * 32'h9E37_79B9 + 32'h1234_5677;
    return {h[31:7], 7'h33};
  endfunction

  function automatic logic [XLEN-1:0] value(slot_t s, int which, longint off);
    logic [XLEN-1:0] v;
    v = {32'(s.instr), 32'(s.pc / 64)} * 64'h0000_0001_0000_0193 + 64'(which);
    return v + 64'(off);
  endfunction

  function automatic bit misses(slot_t s);
    return s.valid && s.pc >= 0 && (s.pc % 8 == 3) && ((s.pc / 64) % 4 == 0) && !s.served;
  endfunction

  initial begin
    foreach (pipe[st, s]) begin
      pipe[st][s].valid = 1'b0; pipe[st][s].instr = '0; pipe[st][s].pc = -1; pipe[st][s].served = 0;
    end
    pc = 0; nops = 0; bubble = 0; wait_miss = 0;
    hold = 0; rp_en = '0; rp_data = '0; fetch_valid = '0; fetch_instr = '0; commit = '0;
    bus_req = 0;
  end

  // outputs for the coming cycle
  always @(negedge clk) begin
    wait_miss = 0;
    if (use_bus)
      for (int s = 0; s < int'(IWIDTH); s++) if (misses(pipe[MEM_STAGE][s])) wait_miss = 1;
    bus_req = wait_miss;
    hold    = wait_miss || ($urandom_range(0, 99) < stall_pct);
    bubble  = ($urandom_range(0, 99) < bubble_pct);
    for (int s = 0; s < int'(IWIDTH); s++) begin
      slot_t r, w;
      r = pipe[RA_STAGE][s];
      w = pipe[WB_STAGE][s];
      rp_en[s]            = r.valid && r.pc >= 0;
      rp_data[s]          = rp_en[s] ? value(r, s, offset_cfg) : XLEN'($urandom());
      rp_en[IWIDTH + s]   = w.valid && w.pc >= 0;
      rp_data[IWIDTH + s] = rp_en[IWIDTH + s] ? value(w, 7 + s, offset_cfg) : XLEN'($urandom());
      if (bubble) begin
        fetch_valid[s] = 1'b0;
        fetch_instr[s] = ILEN'($urandom());
      end else begin
        fetch_valid[s] = 1'b1;
        fetch_instr[s] = (nops > 0) ? NOP : prog(pc + s);
      end
    end
    commit = '0;
    if (!hold)
      for (int s = 0; s < int'(IWIDTH); s++) commit += CW'(pipe[NSTAGES-1][s].valid);
  end

  // state
  always @(posedge clk) begin
    if (restart) begin
      foreach (pipe[st, s]) begin
        pipe[st][s].valid = 1'b0; pipe[st][s].instr = '0; pipe[st][s].pc = -1; pipe[st][s].served = 0;
      end
      pc = 0;
      nops = nops_cfg;
    end else begin
      if (bus_done)
        for (int s = 0; s < int'(IWIDTH); s++)
          if (misses(pipe[MEM_STAGE][s])) pipe[MEM_STAGE][s].served = 1;
      if (!hold) begin
        for (int st = NSTAGES - 1; st > 0; st--) pipe[st] = pipe[st-1];
        for (int s = 0; s < int'(IWIDTH); s++) begin
          pipe[0][s].valid  = fetch_valid[s];
          pipe[0][s].instr  = fetch_instr[s];
          pipe[0][s].pc     = (bubble || nops > 0) ? -1 : pc + s;
          pipe[0][s].served = 0;
        end
        if (bubble) ;
        else if (nops > 0) nops = (nops > int'(IWIDTH)) ? nops - int'(IWIDTH) : 0;
        else pc += IWIDTH;
      end
    end
  end

endmodule
