// cpu8008_bus_model: bus-cycle model of an Intel 8008 for simulation only.
//
// It does not execute 8008 code; it performs the machine cycles an 8008 performs, state by
// state on the board's end-of-state strobe: T1 (low address byte, or the accumulator for an
// I/O command), T2 (cycle bits and high address, or the I/O instruction), WAIT for as long as
// READY was low at the end of the previous state, T3 (byte read from din or written on dout),
// and a number of T4/T5 execution states.  Outputs change with non-blocking assignments just
// after a strobe edge; inputs are sampled on the falling clock edge inside the last crystal
// cycle of the state, so that sampling never races the design's own registers.
// Test code calls the tasks fetch, mem_read, mem_write, io_in and io_out.  total_waits counts
// every WAIT state taken.
module cpu8008_bus_model
  import mpcs_pkg::*;
(
  input  logic       clk,
  input  logic       state_en,
  output logic [2:0] s,
  output logic [7:0] dout,
  input  logic [7:0] din,
  input  logic       ready
);
  int total_waits = 0;
  int total_cycles = 0;
  int last_waits = 0;

  initial begin
    s    = ST_T4;
    dout = 8'h00;
  end

  logic       rdy_s;
  logic [7:0] din_s;

  // wait for the end of the current state, sampling READY and the data bus just before it
  task automatic end_state();
    @(negedge clk iff state_en);
    rdy_s = ready;
    din_s = din;
    @(posedge clk);
  endtask

  task automatic run_cycle(input logic [7:0] b1, input logic [7:0] b2, input logic [7:0] wd,
                           input int extra, output logic [7:0] rd);
    s <= ST_T1;  dout <= b1;
    end_state();
    s <= ST_T2;  dout <= b2;
    end_state();
    last_waits = 0;
    while (!rdy_s) begin
      s <= ST_WAIT;
      last_waits++;
      total_waits++;
      end_state();
    end
    s <= ST_T3;  dout <= wd;
    end_state();
    rd = din_s;
    for (int i = 0; i < extra; i++) begin
      s <= (i == 0) ? ST_T4 : ST_T5;
      dout <= 8'h00;
      end_state();
    end
    total_cycles++;
    #1;
  endtask

  task automatic fetch(input logic [13:0] a, output logic [7:0] rd);
    run_cycle(a[7:0], {CYC_PCI, a[13:8]}, 8'h00, 0, rd);
  endtask

  task automatic mem_read(input logic [13:0] a, output logic [7:0] rd);
    run_cycle(a[7:0], {CYC_PCR, a[13:8]}, 8'h00, 0, rd);
  endtask

  task automatic mem_write(input logic [13:0] a, input logic [7:0] d);
    logic [7:0] unused;
    run_cycle(a[7:0], {CYC_PCW, a[13:8]}, d, 0, unused);
  endtask

  task automatic io_out(input logic [4:0] port, input logic [7:0] acc);
    logic [7:0] unused;
    run_cycle(acc, {CYC_PCC, port, 1'b1}, 8'h00, 1, unused);
  endtask

  task automatic io_in(input logic [4:0] port, output logic [7:0] rd);
    run_cycle(8'h00, {CYC_PCC, port, 1'b1}, 8'h00, 1, rd);
  endtask

  task automatic idle(input int n);
    for (int i = 0; i < n; i++) begin
      s <= ST_T4;
      end_state();
    end
    #1;
  endtask
endmodule
