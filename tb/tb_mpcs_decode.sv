// tb_mpcs_decode: memory decoding test of the complete two-processor system.
//
// Both processors run the decoding walk: with H:L stepping from 00:000 up to the end of page
// 17B (0x0000 to 0x0FFF), each reads the addressed byte and shows it on its output port 8 (OUT
// 10B).  Before the walk each processor fills its own 1K private RAM, and processor 1 fills
// the 1K shared block, with known patterns:
//   PROM byte i of processor p   = (i * 29 + 3 * p + 1) mod 256  (programmed first)
//   private RAM byte i of proc p = (i * 7 + 5 + 64 * p) mod 256
//   shared byte i                = (i * 13 + 11) mod 256
// Every value seen on port 8 is compared with the pattern of the block that the address falls
// in, so the PROM chip selects, the RAM select and the shared-block select (decoder output O3)
// are all proved for every address.  A few reads above 0x0FFF must return 0: nothing is
// decoded there, which is this design's choice for the unused blocks.
// Each step of the walk also fetches two instruction bytes from a small loop in PROM, which
// are checked too.  The two processors walk in step, so they collide in the shared block: the
// test requires WAIT states and simultaneous requests to have occurred.
// Interface: none (self-checking, prints TB_RESULT).  Timing: 3 MHz crystal clock, 12 crystal
// cycles per 8008 state; about 0.8 million crystal cycles in all.
module tb_mpcs_decode;
  import mpcs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic phi1, phi2, synca, state_en;
  logic [2:0] cpu_s [2];
  logic [7:0] cpu_dout [2], cpu_din [2];
  logic cpu_ready [2];
  logic [1:0] prog_we = 0;
  logic [10:0] prog_addr = 0;
  logic [7:0] prog_data = 0;
  logic cru_reset = 0, cru_out = 0, cru_clk = 0, cru_in;
  logic [11:0] cru_addr = 0;
  logic [7:0] cru_latch1, p1_in_port = 0;
  logic [7:0] port_a [2], port_b [2];
  logic [13:0] cpu_addr [2];
  logic cpu_rw_n [2], cpu_dbin [2], cpu_t3a [2];
  logic [1:0] sh_grant;
  logic sh_tie, sh_denied;

  int checks = 0, failures = 0;
  int n_wait = 0, n_tie = 0;
  int n_blk [2][4];

  mpcs_top dut (.*);

  cpu8008_bus_model m0 (.clk, .state_en, .s(cpu_s[0]), .dout(cpu_dout[0]), .din(cpu_din[0]),
                        .ready(cpu_ready[0]));
  cpu8008_bus_model m1 (.clk, .state_en, .s(cpu_s[1]), .dout(cpu_dout[1]), .din(cpu_din[1]),
                        .ready(cpu_ready[1]));

  always #5 clk = ~clk;
  always @(posedge clk) if (state_en && sh_tie) n_tie++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] prom_pat(input int p, input int i);
    return 8'((i * 29 + 3 * p + 1) % 256);
  endfunction
  function automatic logic [7:0] ram_pat(input int p, input int i);
    return 8'((i * 7 + 5 + 64 * p) % 256);
  endfunction
  function automatic logic [7:0] sh_pat(input int i);
    return 8'((i * 13 + 11) % 256);
  endfunction
  // what a read of address a must return on processor p
  function automatic logic [7:0] expect_at(input int p, input int a);
    if (a < 'h800) return prom_pat(p, a);
    if (a < 'hC00) return ram_pat(p, a - 'h800);
    if (a < 'h1000) return sh_pat(a - 'hC00);
    return 8'h00;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one processor: fill, then walk; the loop body lives at PROM 0x010..0x01F
  task automatic run_proc(input int p);
    logic [7:0] r;
    int pc;
    pc = 'h10;
    // fill private RAM (and, on processor 1, the shared block)
    for (int i = 0; i < 1024; i++) begin
      if (p == 0) m0.mem_write(14'(12'h800 + i), ram_pat(0, i));
      else        m1.mem_write(14'(12'h800 + i), ram_pat(1, i));
    end
    if (p == 1)
      for (int i = 0; i < 1024; i++) m1.mem_write(14'(12'hC00 + i), sh_pat(i));
    else
      m0.idle(1024 * 3);   // processor 0 waits while the shared block is filled
    // decoding walk over the whole decoded space, then three undecoded addresses
    for (int k = 0; k < 4096 + 3; k++) begin
      int a;
      a = (k < 4096) ? k : (k == 4096 ? 'h1000 : (k == 4097 ? 'h2000 : 'h3FFF));
      for (int f = 0; f < 2; f++) begin
        if (p == 0) m0.fetch(14'(pc), r); else m1.fetch(14'(pc), r);
        check(r == prom_pat(p, pc), $sformatf("P%0d loop fetch %h", p, pc));
        pc = (pc == 'h1F) ? 'h10 : pc + 1;
      end
      if (p == 0) begin m0.mem_read(14'(a), r); n_wait += m0.last_waits; end
      else        begin m1.mem_read(14'(a), r); n_wait += m1.last_waits; end
      if (p == 0) m0.io_out(5'd8, r); else m1.io_out(5'd8, r);
      check(port_a[p] == expect_at(p, a),
            $sformatf("P%0d port 8 shows %h for address %h, expected %h", p, port_a[p], a,
                      expect_at(p, a)));
      n_blk[p][a < 'h1000 ? a >> 10 : 3]++;
    end
  endtask

  initial begin
    foreach (n_blk[p, b]) n_blk[p][b] = 0;
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < 2048; i++) begin
        @(posedge clk);
        prog_we <= 2'(1 << p); prog_addr <= 11'(i); prog_data <= prom_pat(p, i);
      end
    @(posedge clk);
    prog_we <= 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    m0.idle(1);
    m1.idle(1);
    fork
      run_proc(0);
      run_proc(1);
    join
    for (int p = 0; p < 2; p++) begin
      check(n_blk[p][0] + n_blk[p][1] == 2048, $sformatf("P%0d PROM addresses walked", p));
      check(n_blk[p][2] == 1024, $sformatf("P%0d private RAM addresses walked", p));
    end
    check(n_wait > 0, "WAIT states on the shared block occurred");
    check(n_tie > 0, "simultaneous shared requests occurred");
    $display("decode walk: waits=%0d ties=%0d", n_wait, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
