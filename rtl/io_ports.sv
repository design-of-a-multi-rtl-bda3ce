// io_ports: I/O decoding and port latches of an 8008 board.
//
// An 8008 I/O instruction is a PCC cycle: in T1 the CPU sends the accumulator (held by the low
// address latch), in T2 the instruction, whose bits 5..1 name one of 32 ports; ports 0..7 are
// inputs and 8..31 outputs.  A decoder on the port number strobes the output latches in T3 of
// the cycle: OUT_A (port 8, OUT 10B in the programs) and OUT_B (port 9, OUT 11B).  For an input
// instruction addressing IN_PORT (port 3, INP 3B) the byte on in_port is returned to the CPU in
// T3; other input ports read 0.  The output latches clear on reset (this design's choice).
module io_ports
  import mpcs_pkg::*;
#(
  parameter logic [4:0] OUT_A   = PORT_OUT_A,
  parameter logic [4:0] OUT_B   = PORT_OUT_B,
  parameter logic [4:0] IN_PORT = PORT_IN_DIST
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       state_en,
  input  logic       pcc,
  input  logic       t3,
  input  logic [4:0] port,       // bits 5..1 of the T2 byte
  input  logic [7:0] out_data,   // accumulator, from the T1 byte
  input  logic [7:0] in_port,
  output logic [7:0] port_a,
  output logic [7:0] port_b,
  output logic       io_input,   // this PCC cycle is an input instruction
  output logic [7:0] in_data,
  output logic       out_a_stb,
  output logic       out_b_stb
);
  assign io_input  = pcc & (port < 5'd8);
  assign out_a_stb = pcc & t3 & (port == OUT_A);
  assign out_b_stb = pcc & t3 & (port == OUT_B);
  assign in_data   = (io_input && port == IN_PORT) ? in_port : 8'h00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      port_a <= '0;
      port_b <= '0;
    end else if (state_en) begin
      if (out_a_stb) port_a <= out_data;
      if (out_b_stb) port_b <= out_data;
    end
  end
endmodule
