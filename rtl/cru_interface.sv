// cru_interface: link between the 16-bit TMS 9900 computer and the 8008 system.
//
// The 9900 does bit-serial I/O through its Communications Register Unit (CRU): an LDCR or
// STCR instruction walks a run of CRU bit addresses (address lines A3..A14, software base in
// R12 equal to twice the bit address), and for each output bit puts the bit on CRUOUT with a
// CRUCLK pulse, for each input bit samples CRUIN.  This interface holds:
//   - two 8-bit addressable latches (LS259 type) at software bases LATCH0_BASE (>1000) and
//     LATCH1_BASE (>1010); the latch whose bit range is addressed stores CRUOUT into the bit
//     named by the three low address lines when CRUCLK pulses;
//   - an 8-to-1 data selector (LS251 type) at base LATCH0_BASE that returns, on CRUIN, the bit
//     of the 8008 output byte sel_in named by the three low address lines.
// In the gun-laying task latch 0 carries the distance into 8008 input port 3 and the selector
// reads 8008 output port 8 (RANGE, then ELEVATION).  Latch 1 is brought out as a second byte
// for the 8008 system.  The 9900 RESET line clears both latches.  cru_clk is taken as a
// one-cycle strobe synchronous to clk (this design's choice); cru_in is combinational.
module cru_interface #(
  parameter logic [15:0] LATCH0_BASE = 16'h1000,
  parameter logic [15:0] LATCH1_BASE = 16'h1010
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cru_reset,   // 9900 RESET, active high
  input  logic [11:0] cru_addr,    // CRU bit address on A3..A14
  input  logic        cru_out,
  input  logic        cru_clk,
  output logic        cru_in,
  output logic [7:0]  latch0,
  output logic [7:0]  latch1,
  input  logic [7:0]  sel_in
);
  localparam logic [11:0] BIT0 = LATCH0_BASE[12:1];
  localparam logic [11:0] BIT1 = LATCH1_BASE[12:1];

  logic en0, en1;
  logic [2:0] bitsel;

  // the LS138 decoding of the upper address lines
  assign en0    = (cru_addr[11:3] == BIT0[11:3]);
  assign en1    = (cru_addr[11:3] == BIT1[11:3]);
  assign bitsel = cru_addr[2:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch0 <= '0;
      latch1 <= '0;
    end else if (cru_reset) begin
      latch0 <= '0;
      latch1 <= '0;
    end else if (cru_clk) begin
      if (en0) latch0[bitsel] <= cru_out;
      if (en1) latch1[bitsel] <= cru_out;
    end
  end

  assign cru_in = en0 & sel_in[bitsel];
endmodule
