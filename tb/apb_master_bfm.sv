// apb_master_bfm: AMBA 2.0 APB master for the testbenches. write() and
// read() each perform one transfer: a setup phase, then an access phase, one
// clock cycle each; bus signals change at the falling edge. Not
// synthesizable; testbench use.
module apb_master_bfm
  import safedm_pkg::*;
(
  input  logic                  clk,
  output logic                  psel,
  output logic                  penable,
  output logic                  pwrite,
  output logic [APB_ADDR_W-1:0] paddr,
  output logic [APB_DATA_W-1:0] pwdata,
  input  logic [APB_DATA_W-1:0] prdata
);
  initial begin
    psel = 0; penable = 0; pwrite = 0; paddr = '0; pwdata = '0;
  end

  task automatic write(logic [APB_ADDR_W-1:0] a, logic [APB_DATA_W-1:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    @(negedge clk);
    psel = 0; penable = 0; pwrite = 0;
  endtask

  task automatic read(logic [APB_ADDR_W-1:0] a, output logic [APB_DATA_W-1:0] d);
    @(negedge clk);
    psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk);
    penable = 1;
    #1 d = prdata;
    @(negedge clk);
    psel = 0; penable = 0;
  endtask
endmodule
