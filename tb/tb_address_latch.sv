// tb_address_latch: transparent while strobed, holds the value captured at the end of the
// strobed state, ignores the input otherwise.
// Stimulus: random bytes on d with the strobe high in random states.  The testbench drives the
// end-of-state strobe state_en itself, one crystal cycle per state, to keep the run short.  The expected output is worked out
// from a reference copy of the held byte.  Width 8 is the 8212's.  Whether the output follows
// the input while strobed (the 8212 in strobed mode) is part of this design's timing, because
// the decoders need the high address during T2.
module tb_address_latch;
  logic clk = 0, rst_n = 0, state_en = 0, stb = 0;
  logic [7:0] d, q;
  int checks = 0, failures = 0;

  address_latch dut (.clk, .rst_n, .state_en, .stb, .d, .q);

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
    logic [7:0] v;
    d = 8'h00;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(q == 8'h00, "reset value");
    for (int i = 0; i < 50; i++) begin
      v = 8'($urandom);
      stb = 1; d = v; #1;
      check(q == v, "transparent while strobed");
      state_en = 1; @(posedge clk); #1; state_en = 0;
      stb = 0; d = ~v; #1;
      check(q == v, "holds after strobe");
      @(posedge clk); #1;
      state_en = 1; @(posedge clk); #1; state_en = 0;
      check(q == v, "no capture without strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
