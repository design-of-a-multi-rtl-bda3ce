// cycle_decoder: turns the two cycle bits of the 8008 into the four cycle lines.
//
// During T2 the 8008 puts the cycle type on D7..D6; the high address latch holds it for the
// rest of the machine cycle and this decoder gives PCI (instruction fetch), PCR (memory read),
// PCC (I/O command) and PCW (memory write), one of them high at a time.  The bit encoding is
// that of the 8008 data sheet (see mpcs_pkg).  Purely combinational.
module cycle_decoder
  import mpcs_pkg::*;
(
  input  logic [1:0] cyc,   // {D7,D6} from the high address latch
  output logic       pci,
  output logic       pcr,
  output logic       pcc,
  output logic       pcw
);
  always_comb begin
    {pci, pcr, pcc, pcw} = 4'b0000;
    unique case (cycle_e'(cyc))
      CYC_PCI: pci = 1'b1;
      CYC_PCR: pcr = 1'b1;
      CYC_PCC: pcc = 1'b1;
      CYC_PCW: pcw = 1'b1;
      default: pci = 1'b1;
    endcase
  end
endmodule
