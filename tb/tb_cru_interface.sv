// tb_cru_interface: a 9900 CRU model shifts bytes into the two addressable latches (LDCR of
// 8 bits at software base >1000 and >1010, least significant bit first) and reads the 8008
// output byte back bit by bit through the data selector (STCR at >1000).  Addresses outside
// the two latches must change nothing and read 0; RESET clears the latches.
// Timing: one CRUCLK pulse of one crystal cycle per bit, as the 9900 model here issues it; the
// selector output is sampled combinationally.  The latch bases >1000 and >1010 are the ones
// given for the link; the bit order inside a byte follows the 9900's LDCR and STCR
// (least significant bit at the base address).
module tb_cru_interface;
  logic clk = 0, rst_n = 0, cru_reset = 0, cru_out = 0, cru_clk = 0, cru_in;
  logic [11:0] cru_addr = 0;
  logic [7:0] latch0, latch1, sel_in;
  int checks = 0, failures = 0;

  cru_interface dut (.clk, .rst_n, .cru_reset, .cru_addr, .cru_out, .cru_clk, .cru_in,
                     .latch0, .latch1, .sel_in);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // LDCR: R12 holds twice the bit address
  task automatic ldcr(input logic [15:0] r12, input logic [7:0] v);
    for (int b = 0; b < 8; b++) begin
      cru_addr = 12'((r12 >> 1) + b); cru_out = v[b]; cru_clk = 1;
      @(posedge clk); #1;
      cru_clk = 0;
      @(posedge clk); #1;
    end
  endtask

  task automatic stcr(input logic [15:0] r12, output logic [7:0] v);
    for (int b = 0; b < 8; b++) begin
      cru_addr = 12'((r12 >> 1) + b); #1;
      v[b] = cru_in;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e0, e1, v, r;
    sel_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    e0 = 0; e1 = 0;
    for (int k = 0; k < 40; k++) begin
      v = 8'($urandom);
      case ($urandom_range(0, 2))
        0: begin ldcr(16'h1000, v); e0 = v; end
        1: begin ldcr(16'h1010, v); e1 = v; end
        default: ldcr(16'h1020 + 16'($urandom_range(0, 100)) * 16, v);
      endcase
      check(latch0 == e0 && latch1 == e1, $sformatf("latches %h %h expected %h %h",
            latch0, latch1, e0, e1));
      sel_in = 8'($urandom);
      stcr(16'h1000, r);
      check(r == sel_in, $sformatf("STCR read %h expected %h", r, sel_in));
      stcr(16'h1040, r);
      check(r == 0, "no CRU input outside the selector");
    end
    cru_reset = 1; @(posedge clk); #1; cru_reset = 0;
    check(latch0 == 0 && latch1 == 0, "RESET clears the latches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
