// mem_decoder: address decoding of an 8008 board (the "address control" of its memory).
//
// The 14-bit address is split into 1K blocks by a one-of-eight decoder on A12..A10, enabled
// while A13 is low and a memory cycle (PCI, PCR or PCW) is in progress:
//   block 0-1  (0x0000-0x07FF, octal pages 00-07)  PROM; a second decoder on A10..A8 picks one
//              of the eight 256-byte EPROM chips
//   block 2    (0x0800-0x0BFF, octal pages 10-13)  private 1K RAM
//   block 3    (0x0C00-0x0FFF, octal pages 14-17)  the shared memory board (line PO3)
// Blocks 4-7 and A13 = 1 select nothing; what the CPU then reads is 0.  The use of A13 as the
// decoder enable is this design's choice.  Purely combinational.
module mem_decoder
  import mpcs_pkg::*;
(
  input  logic [ADDR_W-1:0]     addr,
  input  logic                  mem_cycle,
  output logic [PROM_CHIPS-1:0] prom_cs,
  output logic                  ram_sel,
  output logic                  shared_sel
);
  logic       en;
  logic [2:0] blk;

  assign en  = mem_cycle & ~addr[13];
  assign blk = addr[12:10];

  always_comb begin
    prom_cs    = '0;
    ram_sel    = 1'b0;
    shared_sel = 1'b0;
    if (en) begin
      unique case (blk)
        BLK_PROM0, BLK_PROM1: prom_cs[addr[10:8]] = 1'b1;
        BLK_RAM:              ram_sel    = 1'b1;
        BLK_SHARED:           shared_sel = 1'b1;
        default: ;
      endcase
    end
  end
endmodule
