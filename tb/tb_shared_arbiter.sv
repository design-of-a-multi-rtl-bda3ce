// tb_shared_arbiter: arbitration scenarios state by state.
//   single request: granted at once, READY high
//   tie with the memory free: processor 0 served, processor 1 held (READY low)
//   ownership: the owner keeps the memory through its T3, the other is held meanwhile and is
//              served in the state after the owner's T3
//   first come first served: a processor already waiting beats a new request
// Each scenario applies request and waiting flags for one state at a time and checks grant,
// READY, tie and denied before the state strobe.  The one-processor-at-a-time rule and the
// first-come order are the board's.  Releasing at the end of T3 and the tie order are this
// design's.  The arbiter's own assertion (at most one grant) runs throughout.
module tb_shared_arbiter;
  logic clk = 0, rst_n = 0, state_en = 0;
  logic [1:0] req, waiting, done, grant, ready;
  logic tie, denied;
  int checks = 0, failures = 0;

  shared_arbiter dut (.clk, .rst_n, .state_en, .req, .waiting, .done, .grant, .ready, .tie,
                      .denied);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (grant %b ready %b)", what, grant, ready); end
  endtask

  // present inputs for one state, check, then end the state
  task automatic state(input logic [1:0] r, input logic [1:0] w, input logic [1:0] d,
                       input logic [1:0] exp_grant, input string what);
    req = r; waiting = w; done = d; #1;
    check(grant == exp_grant, what);
    check(ready == (~r | exp_grant), {what, " ready"});
    state_en = 1; @(posedge clk); #1; state_en = 0;
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; waiting = 0; done = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // single request from processor 1: T2, T3
    state(2'b10, 2'b00, 2'b00, 2'b10, "P1 alone in T2");
    state(2'b10, 2'b00, 2'b10, 2'b10, "P1 alone in T3");
    state(2'b00, 2'b00, 2'b00, 2'b00, "idle");
    // tie: both in T2
    req = 2'b11; waiting = 0; done = 0; #1;
    check(tie == 1 && denied == 1, "tie and denial flagged");
    state(2'b11, 2'b00, 2'b00, 2'b01, "tie goes to P0");
    state(2'b11, 2'b10, 2'b01, 2'b01, "P0 in T3 keeps it, P1 waits");
    state(2'b10, 2'b10, 2'b00, 2'b10, "P1 served after P0's T3");
    // P0 now asks while P1 owns (P1 in T3)
    state(2'b11, 2'b00, 2'b10, 2'b10, "owner P1 keeps it in T3");
    state(2'b01, 2'b01, 2'b00, 2'b01, "P0 served next");
    state(2'b01, 2'b00, 2'b01, 2'b01, "P0 T3");
    // P1 waiting, P0 new request in the same state with the memory free
    state(2'b11, 2'b10, 2'b00, 2'b10, "waiting P1 beats new P0");
    state(2'b11, 2'b01, 2'b10, 2'b10, "P1 T3, P0 waits");
    state(2'b01, 2'b01, 2'b00, 2'b01, "then P0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
