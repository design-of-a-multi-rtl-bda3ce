// state_decoder: decodes the 8008 state lines for one CPU board.
//
// The board feeds S2..S0 to an 8205 one-of-eight decoder whose outputs are T1, T1I, T2, WAIT,
// T3, STOP, T4 and T5; this module gives the same eight lines, active high, as a state_dec_t.
// A flip-flop loaded on the state strobe records that the previous state was T2 (the board's
// T2L), and T3A is T3 qualified by it, i.e. the T3 that follows T2 directly without a WAIT.
// The I/O port strobes use T3A on the board; here the full T3 is used for I/O and T3A is
// brought out for observation.  Interface: s (state lines), state_en (end-of-state strobe);
// outputs are combinational from s except t2l, which is registered.
module state_decoder
  import mpcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        state_en,
  input  logic [2:0]  s,
  output state_dec_t  st,
  output logic        t2l,
  output logic        t3a
);
  always_comb begin
    st = '0;
    unique case (cpu_state_e'(s))
      ST_T1:   st.t1   = 1'b1;
      ST_T1I:  st.t1i  = 1'b1;
      ST_T2:   st.t2   = 1'b1;
      ST_WAIT: st.wt   = 1'b1;
      ST_T3:   st.t3   = 1'b1;
      ST_STOP: st.stop = 1'b1;
      ST_T4:   st.t4   = 1'b1;
      ST_T5:   st.t5   = 1'b1;
      default: st      = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        t2l <= 1'b0;
    else if (state_en) t2l <= st.t2;
  end

  assign t3a = st.t3 & t2l;
endmodule
