// timing_generator: two-phase clock and state strobe for an 8008 board.
//
// The board derives the 8008's two non-overlapping 500 kHz clock phases from a 3 MHz crystal,
// and a flip-flop clocked by phi2 turns the chip's SYNC output (half the phase rate) into SYNCA,
// from which the rest of the timing is made.  Here a divide-by-2*DIV counter on the crystal
// clock produces all of it with registered outputs, so nothing downstream is clocked by a
// derived signal:
//   phi1     high for the first 2 crystal cycles of each DIV-cycle period
//   phi2     high for cycles 3 and 4 of the period (a one-cycle gap on either side)
//   synca    high during the first of the two phase periods of every 8008 state
//   state_en one-cycle strobe in the last crystal cycle of each state; every other block
//            advances only on it, so it stands for the phi12 state clock
// With DIV = 6 (the document's 3 MHz / 500 kHz) one state lasts 12 crystal cycles = 4 us.
// Taking SYNCA from the counter rather than from the chip's SYNC pin is this design's choice.
module timing_generator #(
  parameter int DIV = 6                 // crystal cycles per phase period
) (
  input  logic clk,                     // crystal clock
  input  logic rst_n,
  output logic phi1,
  output logic phi2,
  output logic synca,
  output logic state_en
);
  localparam int CW = $clog2(2 * DIV);
  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_nxt;
  logic [CW-1:0] in_period;

  always_comb begin
    cnt_nxt   = (cnt == CW'(2 * DIV - 1)) ? '0 : cnt + 1'b1;
    in_period = (cnt_nxt >= CW'(DIV)) ? cnt_nxt - CW'(DIV) : cnt_nxt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      phi1     <= 1'b1;
      phi2     <= 1'b0;
      synca    <= 1'b1;
      state_en <= 1'b0;
    end else begin
      cnt      <= cnt_nxt;
      phi1     <= (in_period < CW'(2));
      phi2     <= (in_period == CW'(3)) || (in_period == CW'(4));
      synca    <= (cnt_nxt < CW'(DIV));
      state_en <= (cnt_nxt == CW'(2 * DIV - 1));
    end
  end
endmodule
