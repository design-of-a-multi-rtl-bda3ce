// mpcs_pkg: types and constants shared by the two-processor 8008 control system.
//
// The 8008 reports its internal state on three lines S2..S0 and, during T2, puts two cycle-type
// bits on D7..D6 next to the six high address bits.  The encodings below are the ones of the
// Intel 8008 data sheet; the design itself only names the decoded signals (T1, T1I, T2, T3, T4,
// T5, WAIT, STOP and PCI, PCR, PCC, PCW).  The memory map follows the board design: 2K of PROM
// from address 0, 1K of private RAM from 0x0800 (octal page 10) and the 1K shared memory from
// 0x0C00 (octal page 14), each 1K block being one output of the high-address decoder.
package mpcs_pkg;

  // 8008 state lines, packed {S2,S1,S0}
  typedef enum logic [2:0] {
    ST_WAIT = 3'b000,
    ST_T3   = 3'b001,
    ST_T1   = 3'b010,
    ST_STOP = 3'b011,
    ST_T2   = 3'b100,
    ST_T5   = 3'b101,
    ST_T1I  = 3'b110,
    ST_T4   = 3'b111
  } cpu_state_e;

  // cycle-type bits carried on {D7,D6} during T2
  typedef enum logic [1:0] {
    CYC_PCI = 2'b00,  // instruction fetch
    CYC_PCC = 2'b01,  // I/O command
    CYC_PCR = 2'b10,  // memory read
    CYC_PCW = 2'b11   // memory write
  } cycle_e;

  // decoded state lines (active high here; the boards use the active-low 8205 outputs)
  typedef struct packed {
    logic t1;
    logic t1i;
    logic t2;
    logic wt;
    logic t3;
    logic stop;
    logic t4;
    logic t5;
  } state_dec_t;

  localparam int ADDR_W      = 14;     // 8008 address width
  localparam int PROM_CHIPS  = 8;
  localparam int RAM_BYTES   = 1024;   // eight 1K x 1 static RAMs
  localparam int SHARED_BYTES = 1024;  // shared memory board

  // 1K block numbers of the high-address decoder (address bits 12..10)
  localparam logic [2:0] BLK_PROM0  = 3'd0;
  localparam logic [2:0] BLK_PROM1  = 3'd1;
  localparam logic [2:0] BLK_RAM    = 3'd2;
  localparam logic [2:0] BLK_SHARED = 3'd3;

  // I/O: ports 0..7 are inputs, 8..31 outputs
  localparam logic [4:0] PORT_IN_DIST = 5'd3;   // INP 3B
  localparam logic [4:0] PORT_OUT_A   = 5'd8;   // OUT 10B
  localparam logic [4:0] PORT_OUT_B   = 5'd9;   // OUT 11B

endpackage
