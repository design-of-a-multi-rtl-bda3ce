// tb_mem_decoder: random 14-bit addresses against the memory map worked out from the board
// description: PROM chips 0..7 at 0x000-0x7FF (256 bytes each), private RAM 0x800-0xBFF,
// shared memory 0xC00-0xFFF, nothing above or outside a memory cycle.
// The expected selects are computed in the testbench from the address ranges, not from the
// decoder's bit fields.  Purely combinational.  The block sizes and base addresses follow the
// board description.  Using A13 = 0 as an enable (so nothing answers above 0x1FFF) is this
// design's choice.
module tb_mem_decoder;
  logic [13:0] addr;
  logic mem_cycle;
  logic [7:0] prom_cs;
  logic ram_sel, shared_sel;
  int checks = 0, failures = 0;

  mem_decoder dut (.addr, .mem_cycle, .prom_cs, .ram_sel, .shared_sel);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input logic [13:0] a, input logic mc);
    logic [7:0] e_cs;
    logic e_ram, e_sh;
    addr = a; mem_cycle = mc; #1;
    e_cs = 0; e_ram = 0; e_sh = 0;
    if (mc) begin
      if (a < 14'h0800)      e_cs = 8'd1 << (a / 256);
      else if (a < 14'h0C00) e_ram = 1;
      else if (a < 14'h1000) e_sh = 1;
    end
    checks++;
    if (prom_cs != e_cs || ram_sel != e_ram || shared_sel != e_sh) begin
      failures++;
      $display("FAIL: addr %h mc %b -> cs %b ram %b sh %b", a, mc, prom_cs, ram_sel, shared_sel);
    end
  endtask

  initial begin
    try(14'h0000, 1); try(14'h07FF, 1); try(14'h0800, 1); try(14'h0BFF, 1);
    try(14'h0C00, 1); try(14'h0FFF, 1); try(14'h1000, 1); try(14'h2C00, 1);
    try(14'h0C40, 0);
    for (int i = 0; i < 500; i++) try(14'($urandom), 1'($urandom));
    for (int i = 0; i < 500; i++) try(14'($urandom_range(0, 14'h0FFF)), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
