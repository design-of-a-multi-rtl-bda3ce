// bus_logic: the memory buffer / bus driver path back to the 8008 data bus.
//
// On the board the outputs of the PROMs, the private RAM and the shared-memory buffer are wired
// onto one set of data lines and an 8212 buffer drives them onto the CPU bus when DBIN is high.
// Here the selected source is multiplexed (PROM, private RAM, shared memory, input port, in
// that order) and the result is passed to the CPU only while DBIN is high; otherwise the CPU
// bus reads 0.  Purely combinational.
module bus_logic (
  input  logic       dbin,
  input  logic       prom_sel,
  input  logic [7:0] prom_data,
  input  logic       ram_sel,
  input  logic [7:0] ram_data,
  input  logic       shared_sel,
  input  logic [7:0] shared_data,
  input  logic       io_sel,
  input  logic [7:0] io_data,
  output logic [7:0] din
);
  always_comb begin
    din = 8'h00;
    if (dbin) begin
      if      (prom_sel)   din = prom_data;
      else if (ram_sel)    din = ram_data;
      else if (shared_sel) din = shared_data;
      else if (io_sel)     din = io_data;
    end
  end
endmodule
