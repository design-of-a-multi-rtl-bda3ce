// address_latch: one 8-bit strobed latch in the manner of the Intel 8212.
//
// While the strobe is high the output follows the input (so a decoder behind it sees the new
// address in the same state); the value is captured on the state strobe at the end of that
// state and held until the next strobe.  The CPU board uses one for the low address byte
// (strobed in T1) and one for the high address byte and cycle bits (strobed in T2); the shared
// memory board uses the same part for its per-processor address and data latches.  Storage is a
// clocked register, not a level-sensitive latch, which is this design's choice.
module address_latch #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         state_en,
  input  logic         stb,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] held;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                held <= '0;
    else if (state_en && stb)  held <= d;
  end

  assign q = stb ? d : held;
endmodule
