// tb_cycle_decoder: the four cycle codes {D7,D6} = 00, 10, 01, 11 give PCI, PCR, PCC, PCW.
// Purely combinational: all four codes are applied and exactly one output line must be high.
// The code assignment is that of the 8008 data sheet (there written D6 D7: 00 PCI, 01 PCR,
// 10 PCC, 11 PCW).
module tb_cycle_decoder;
  logic [1:0] cyc;
  logic pci, pcr, pcc, pcw;
  int checks = 0, failures = 0;

  cycle_decoder dut (.cyc, .pci, .pcr, .pcc, .pcw);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] exp [4];
    exp[0] = 4'b1000; exp[2] = 4'b0100; exp[1] = 4'b0010; exp[3] = 4'b0001;
    for (int v = 0; v < 4; v++) begin
      cyc = 2'(v); #1;
      checks++;
      if ({pci, pcr, pcc, pcw} != exp[v]) begin
        failures++;
        $display("FAIL: cyc %02b gives %04b", v, {pci, pcr, pcc, pcw});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
