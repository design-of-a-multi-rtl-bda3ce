// tb_rw_control: exhaustive over the decoded states, cycle types and the input flag;
// R/W-bar low only in T3 of PCW, DBIN high in T3 of PCI, PCR and input PCC.
// Purely combinational.  The decoded-state struct has exactly one line high, and every
// combination is applied.  R/W-bar from PCW and T3 follows the board description.  DBIN for
// input I/O cycles (the 8008 reads the port in T3) is worked out from the 8008 bus cycle.
module tb_rw_control;
  import mpcs_pkg::*;
  state_dec_t st;
  logic pci, pcr, pcc, pcw, io_input, rw_n, dbin;
  int checks = 0, failures = 0;

  rw_control dut (.st, .pci, .pcr, .pcc, .pcw, .io_input, .rw_n, .dbin);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_rw_n, exp_dbin;
    for (int sv = 0; sv < 8; sv++)
      for (int c = 0; c < 4; c++)
        for (int io = 0; io < 2; io++) begin
          st = state_dec_t'(8'b1000_0000 >> sv);
          {pci, pcr, pcc, pcw} = 4'b1000 >> c;
          io_input = io[0];
          #1;
          exp_rw_n = !(sv == 4 && c == 3);               // bit 4 from the top is t3
          exp_dbin = (sv == 4) && (c == 0 || c == 1 || (c == 2 && io == 1));
          checks++;
          if (rw_n != exp_rw_n || dbin != exp_dbin) begin
            failures++;
            $display("FAIL: st=%b cyc=%0d io=%0d rw_n=%b dbin=%b", st, c, io, rw_n, dbin);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
