// local_ram: the private 1K x 8 RAM of an 8008 board (eight 1K x 1 static RAM chips).
//
// Reads are asynchronous while the block is selected (0 otherwise, so that outputs can be ORed
// onto the board's data lines).  A write happens at the clock edge on which sel, we and the
// end-of-state strobe coincide, i.e. at the end of T3 of a PCW cycle, the write pulse the board
// makes from R/W-bar.  Contents are undefined after power-up, as in the real RAM.
module local_ram
  import mpcs_pkg::*;
#(
  parameter int DEPTH = RAM_BYTES
) (
  input  logic                     clk,
  input  logic                     state_en,
  input  logic                     sel,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [7:0]               wdata,
  output logic [7:0]               rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (state_en && sel && we) mem[addr] <= wdata;

  assign rdata = sel ? mem[addr] : 8'h00;
endmodule
