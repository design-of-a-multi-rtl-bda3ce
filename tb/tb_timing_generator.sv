// tb_timing_generator: checks the two-phase clock and state strobe of timing_generator.
// With DIV = 6 one phase period is 6 crystal cycles and one 8008 state 12: the test checks
// that phi1 and phi2 never overlap, that each has one rising edge per 6 cycles, that state_en
// pulses exactly every 12 cycles, and that synca is high for the first 6 cycles of a state.
// The 3 MHz crystal divided to 500 kHz phases follows the board description.  The position of
// each phase inside the period and the single-cycle state_en strobe are this design's choices.
// They are checked cycle by cycle over many states after reset.
module tb_timing_generator;
  logic clk = 0, rst_n = 0;
  logic phi1, phi2, synca, state_en;
  int checks = 0, failures = 0;

  timing_generator dut (.clk, .rst_n, .phi1, .phi2, .synca, .state_en);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0, last_se = -1, p1_rise = 0, p2_rise = 0, synca_hi = 0, states = 0;
    logic p1_d = 0, p2_d = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (240) begin
      @(posedge clk); #1;
      cyc++;
      check(!(phi1 && phi2), "phases overlap");
      if (phi1 && !p1_d) p1_rise++;
      if (phi2 && !p2_d) p2_rise++;
      p1_d = phi1; p2_d = phi2;
      if (synca) synca_hi++;
      if (state_en) begin
        states++;
        check(!synca, "synca low in the last cycle of a state");
        if (last_se >= 0) check(cyc - last_se == 12, $sformatf("state length %0d", cyc - last_se));
        last_se = cyc;
      end
    end
    check(p1_rise >= 39 && p1_rise <= 41, $sformatf("phi1 rises %0d in 240 cycles", p1_rise));
    check(p2_rise == 40, $sformatf("phi2 rises %0d in 240 cycles", p2_rise));
    check(states == 20, $sformatf("%0d states in 240 cycles", states));
    check(synca_hi == 120, $sformatf("synca high %0d cycles", synca_hi));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
