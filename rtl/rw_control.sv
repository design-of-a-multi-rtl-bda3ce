// rw_control: read/write control of an 8008 board.
//
// From the decoded state and cycle lines it makes the two commands the memories and buffers
// need.  R/W-bar goes low only in T3 of a PCW (memory write) cycle, which is the write pulse of
// the RAMs (the document's PCW.T3 line).  DBIN, "data bus in", is high in T3 whenever the CPU
// takes a byte from the board: instruction fetch (PCI), memory read (PCR) and an I/O command
// that addresses an input port.  Purely combinational.
module rw_control
  import mpcs_pkg::*;
(
  input  state_dec_t st,
  input  logic       pci,
  input  logic       pcr,
  input  logic       pcc,
  input  logic       pcw,
  input  logic       io_input,   // the PCC cycle addresses one of ports 0..7
  output logic       rw_n,
  output logic       dbin
);
  assign rw_n = ~(pcw & st.t3);
  assign dbin = st.t3 & (pci | pcr | (pcc & io_input));
endmodule
