// tb_state_decoder: all eight state codes decode to the right single line, and T3A is high
// only in a T3 that directly follows T2.
// The testbench drives the end-of-state strobe itself, one per state.  The sequence T2,
// T3 and a T3 reached through WAIT are both tried, to check the T2L flip-flop behind T3A.  The
// state codes are those of the 8008 data sheet.  T3A as "T3 straight after T2" is this design's
// reading of the T2L/T3A logic.
module tb_state_decoder;
  import mpcs_pkg::*;
  logic clk = 0, rst_n = 0, state_en = 0;
  logic [2:0] s;
  state_dec_t st;
  logic t2l, t3a;
  int checks = 0, failures = 0;

  state_decoder dut (.clk, .rst_n, .state_en, .s, .st, .t2l, .t3a);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(input cpu_state_e v);
    s = v;
    state_en = 1;
    @(posedge clk); #1;
    state_en = 0;
  endtask

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_dec_t exp;
    s = ST_T1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 8; v++) begin
      s = 3'(v); #1;
      exp = '0;
      // {S2,S1,S0}: 010 T1, 110 T1I, 100 T2, 000 WAIT, 001 T3, 011 STOP, 111 T4, 101 T5
      case (v)
        2: exp.t1 = 1;  6: exp.t1i = 1; 4: exp.t2 = 1; 0: exp.wt = 1;
        1: exp.t3 = 1;  3: exp.stop = 1; 7: exp.t4 = 1; 5: exp.t5 = 1;
        default: ;
      endcase
      check(st == exp, $sformatf("code %03b decoded as %b", v, st));
    end
    step(ST_T1); step(ST_T2); s = ST_T3; #1;
    check(t3a == 1, "T3A after T2");
    step(ST_T3); step(ST_T1); step(ST_T2); step(ST_WAIT); s = ST_T3; #1;
    check(t3a == 0, "no T3A after WAIT");
    check(t2l == 0, "T2L low after WAIT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
