// shared_memory: the 1K x 8 memory board shared by two 8008 processors.
//
// Each processor reaches the board through its own set of latches and three-state buffers:
// the address (A0..A7 from its low address latch, A8..A9 from its high latch), its bus driver
// for write data, and a memory buffer for read data.  Only the buffers of the processor that
// the arbiter grants are enabled; here that is a multiplexer on the address and write data and
// a gate on each read-data port (0 when not granted).  A write (the processor's PCW.T3 line)
// takes effect at the end of its T3.  Reads are asynchronous.  READY to each processor comes
// from shared_arbiter.  Contents are undefined after power-up.
module shared_memory
  import mpcs_pkg::*;
#(
  parameter int DEPTH = SHARED_BYTES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     state_en,
  input  logic [1:0]               req,
  input  logic [1:0]               waiting,
  input  logic [1:0]               done,
  input  logic [1:0]               we,
  input  logic [$clog2(DEPTH)-1:0] addr  [2],
  input  logic [7:0]               wdata [2],
  output logic [7:0]               rdata [2],
  output logic [1:0]               ready,
  output logic [1:0]               grant,
  output logic                     tie,
  output logic                     denied
);
  localparam int AW = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [AW-1:0] a;
  logic [7:0]    wd;
  logic          wr;

  shared_arbiter u_arb (
    .clk, .rst_n, .state_en, .req, .waiting, .done,
    .grant, .ready, .tie, .denied
  );

  always_comb begin
    a  = grant[1] ? addr[1]  : addr[0];
    wd = grant[1] ? wdata[1] : wdata[0];
    wr = |(grant & we);
  end

  always_ff @(posedge clk)
    if (state_en && wr) mem[a] <= wd;

  always_comb
    for (int i = 0; i < 2; i++)
      rdata[i] = grant[i] ? mem[addr[i]] : 8'h00;
endmodule
