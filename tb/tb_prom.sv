// tb_prom: programs all 2048 bytes with a known pattern, then reads random locations through
// the chip selects and checks that no selected chip reads 0.
// Pattern: byte i = (i * 37 + (i >> 8) * 11 + 5) mod 256.
// Programming uses one crystal cycle per byte through the programming port, which stands in
// for the EPROM programmer.  Reads are combinational through the eight chip selects, so the
// check also shows that each chip answers only to its own select.  2K as eight 256-byte chips
// follows the board description.
module tb_prom;
  logic clk = 0;
  logic [7:0] cs, addr, rdata, prog_data;
  logic prog_we = 0;
  logic [10:0] prog_addr;
  int checks = 0, failures = 0;

  prom dut (.clk, .cs, .addr, .rdata, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(input int i);
    return 8'((i * 37 + (i >> 8) * 11 + 5) % 256);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a;
    cs = 0; addr = 0;
    for (int i = 0; i < 2048; i++) begin
      prog_we = 1; prog_addr = 11'(i); prog_data = pat(i);
      @(posedge clk); #1;
    end
    prog_we = 0;
    for (int k = 0; k < 400; k++) begin
      a = $urandom_range(0, 2047);
      cs = 8'd1 << (a / 256); addr = 8'(a); #1;
      checks++;
      if (rdata != pat(a)) begin failures++; $display("FAIL: %0d read %h", a, rdata); end
    end
    cs = 0; #1;
    checks++;
    if (rdata != 0) begin failures++; $display("FAIL: idle output %h", rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
