// tb_bus_logic: random selects and data; the CPU sees the selected source while DBIN is high
// (PROM before RAM before shared memory before input port) and 0 otherwise.
// Each check sets random select lines, random source bytes and a random DBIN, and compares the
// result with a priority worked out in the testbench.  Purely combinational, no clock.  The
// sources and the DBIN gating follow the board description; the fixed priority only matters
// when a wrong decode selects two sources at once, and is this design's choice.
module tb_bus_logic;
  logic dbin, prom_sel, ram_sel, shared_sel, io_sel;
  logic [7:0] prom_data, ram_data, shared_data, io_data, din;
  int checks = 0, failures = 0;

  bus_logic dut (.dbin, .prom_sel, .prom_data, .ram_sel, .ram_data, .shared_sel, .shared_data,
                 .io_sel, .io_data, .din);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e;
    for (int k = 0; k < 500; k++) begin
      {dbin, prom_sel, ram_sel, shared_sel, io_sel} = 5'($urandom);
      prom_data = 8'($urandom); ram_data = 8'($urandom);
      shared_data = 8'($urandom); io_data = 8'($urandom);
      #1;
      e = !dbin ? 8'h00 : prom_sel ? prom_data : ram_sel ? ram_data :
          shared_sel ? shared_data : io_sel ? io_data : 8'h00;
      checks++;
      if (din != e) begin failures++; $display("FAIL: din %h expected %h", din, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
