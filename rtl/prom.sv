// prom: the 2K x 8 program memory of an 8008 board, eight 256 x 8 EPROM chips.
//
// Each chip is enabled by one line of prom_cs and reads asynchronously, as an EPROM does; with
// no chip enabled the output is 0 so that the board's data lines can be ORed.  The chips were
// programmed off the board; the prog_* port stands in for that programmer and writes one byte
// per clock (it is this design's addition).  Contents are undefined until programmed.
module prom
  import mpcs_pkg::*;
#(
  parameter int CHIPS      = PROM_CHIPS,
  parameter int CHIP_BYTES = 256
) (
  input  logic                             clk,
  input  logic [CHIPS-1:0]                 cs,       // one-hot chip enable
  input  logic [$clog2(CHIP_BYTES)-1:0]    addr,     // A7..A0
  output logic [7:0]                       rdata,
  input  logic                             prog_we,
  input  logic [$clog2(CHIPS*CHIP_BYTES)-1:0] prog_addr,
  input  logic [7:0]                       prog_data
);
  localparam int CW = $clog2(CHIPS);

  logic [7:0]    mem [CHIPS*CHIP_BYTES];
  logic [CW-1:0] chip;

  always_comb begin
    chip = '0;
    for (int i = 0; i < CHIPS; i++)
      if (cs[i]) chip = CW'(i);
  end

  always_ff @(posedge clk)
    if (prog_we) mem[prog_addr] <= prog_data;

  assign rdata = (|cs) ? mem[{chip, addr}] : 8'h00;
endmodule
