// tb_mpcs_top: end-to-end run of the two-processor system at its default configuration.
//
// Two 8008 bus-cycle models play the programs of the two processors and a CRU model plays the
// TMS 9900, all against the complete system (3 MHz crystal clock, 12 crystal cycles per 8008
// state).  The processors' instruction fetches come from their own PROMs, programmed first
// with byte i = (i * 29 + 3 * processor + 1) mod 256, and each fetched byte is checked.
//
// Phase 1, gun laying: the 9900 sends a DISTANCE over the CRU into processor 0's input port 3.
// Processor 0 looks the RANGE up in a table it keeps in private RAM (50, 100, ..., 250: the
// largest entry not above the distance, 50 below that), sends it to the 9900 on port 8, and
// posts it in the shared memory at 14B:100B (0x0C40).  Processor 1 polls that word, clears it,
// looks the ELEVATION up in its own private table (70, 50, 40, 20, 20) and posts it at
// 14B:200B (0x0C80), which processor 0 polls, forwards to the 9900 and clears.  The 9900 checks
// both values against its own calculation.
// Phase 2, fast count: the two processors pass a flag through 14B:200B as fast as they can;
// processor 0 counts the rounds on port 8 and its complement on port 9.
// Phase 3, slow count: processor 0 writes a slowly incrementing count to 14B:100B, processor 1
// copies it to its ports 8 and 9 (complemented).
// Every mechanism is counted and must occur: PROM fetch, private RAM read and write, shared
// read and write, WAIT on a busy shared memory, simultaneous requests, I/O in and out, CRU
// writes and reads.  A fetch must take 36 crystal cycles (3 states of 4 us: one byte per 12 us).
module tb_mpcs_top;
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
  int n_fetch = 0, n_ram_rd = 0, n_ram_wr = 0, n_sh_rd = 0, n_sh_wr = 0, n_io_in = 0;
  int n_io_out = 0, n_cru_wr = 0, n_cru_rd = 0, n_tie = 0, n_wait = 0;
  longint cycles = 0;

  mpcs_top dut (.*);

  cpu8008_bus_model m0 (.clk, .state_en, .s(cpu_s[0]), .dout(cpu_dout[0]), .din(cpu_din[0]),
                        .ready(cpu_ready[0]));
  cpu8008_bus_model m1 (.clk, .state_en, .s(cpu_s[1]), .dout(cpu_dout[1]), .din(cpu_din[1]),
                        .ready(cpu_ready[1]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (state_en && sh_tie) n_tie++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] pat(input int p, input int i);
    return 8'((i * 29 + 3 * p + 1) % 256);
  endfunction

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired: p0_done=%0d pc0=%0d pc1=%0d", p0_done, pc0, pc1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- processor 0 helpers ----------------
  int pc0 = 0, pc1 = 0;
  task automatic exec0(input int n);
    logic [7:0] r;
    for (int i = 0; i < n; i++) begin
      m0.fetch(14'(pc0), r);
      check(r == pat(0, pc0), $sformatf("P0 fetch %h", pc0));
      n_fetch++;
      pc0 = (pc0 + 1) % 2048;
    end
  endtask
  task automatic exec1(input int n);
    logic [7:0] r;
    for (int i = 0; i < n; i++) begin
      m1.fetch(14'(pc1), r);
      check(r == pat(1, pc1), $sformatf("P1 fetch %h", pc1));
      n_fetch++;
      pc1 = (pc1 + 1) % 2048;
    end
  endtask
  task automatic rd0(input logic [13:0] a, output logic [7:0] r);
    exec0(1);
    m0.mem_read(a, r);
    if (a >= 14'h0C00) n_sh_rd++; else n_ram_rd++;
    n_wait += m0.last_waits;
  endtask
  task automatic wr0(input logic [13:0] a, input logic [7:0] v);
    exec0(1);
    m0.mem_write(a, v);
    if (a >= 14'h0C00) n_sh_wr++; else n_ram_wr++;
    n_wait += m0.last_waits;
  endtask
  task automatic rd1(input logic [13:0] a, output logic [7:0] r);
    exec1(1);
    m1.mem_read(a, r);
    if (a >= 14'h0C00) n_sh_rd++; else n_ram_rd++;
    n_wait += m1.last_waits;
  endtask
  task automatic wr1(input logic [13:0] a, input logic [7:0] v);
    exec1(1);
    m1.mem_write(a, v);
    if (a >= 14'h0C00) n_sh_wr++; else n_ram_wr++;
    n_wait += m1.last_waits;
  endtask
  task automatic out0(input logic [4:0] p, input logic [7:0] v);
    exec0(1); m0.io_out(p, v); n_io_out++;
  endtask
  task automatic out1(input logic [4:0] p, input logic [7:0] v);
    exec1(1); m1.io_out(p, v); n_io_out++;
  endtask
  task automatic in0(input logic [4:0] p, output logic [7:0] r);
    exec0(1); m0.io_in(p, r); n_io_in++;
  endtask

  // ---------------- TMS 9900 CRU model ----------------
  task automatic ldcr(input logic [15:0] r12, input logic [7:0] v);
    for (int b = 0; b < 8; b++) begin
      @(posedge clk);
      cru_addr <= 12'((r12 >> 1) + b); cru_out <= v[b]; cru_clk <= 1;
      @(posedge clk);
      cru_clk <= 0;
    end
    n_cru_wr++;
  endtask
  task automatic stcr(input logic [15:0] r12, output logic [7:0] v);
    for (int b = 0; b < 8; b++) begin
      @(posedge clk);
      cru_addr <= 12'((r12 >> 1) + b);
      @(negedge clk);
      v[b] = cru_in;
    end
    n_cru_rd++;
  endtask

  // reference calculations of the task
  function automatic logic [7:0] range_of(input logic [7:0] d);
    logic [7:0] r = 8'd50;
    for (int i = 1; i <= 5; i++) if (d >= 8'(50 * i)) r = 8'(50 * i);
    return r;
  endfunction
  function automatic logic [7:0] elev_of(input logic [7:0] r);
    case (r)
      8'd50: return 8'd70;   8'd100: return 8'd50;  8'd150: return 8'd40;
      8'd200: return 8'd20;  default: return 8'd20;
    endcase
  endfunction

  localparam int N_DIST = 8;
  logic [7:0] dists [N_DIST] = '{8'd120, 8'd50, 8'd255, 8'd30, 8'd199, 8'd200, 8'd151, 8'd99};
  bit p0_done = 0;
  localparam int N_FAST = 20;
  localparam int N_SLOW = 6;

  initial begin
    longint t0;
    // program both PROMs
    for (int p = 0; p < 2; p++)
      for (int i = 0; i < 2048; i++) begin
        @(posedge clk);
        prog_we <= 2'(1 << p); prog_addr <= 11'(i); prog_data <= pat(p, i);
      end
    @(posedge clk);
    prog_we <= 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    m0.idle(1);
    m1.idle(1);

    // fetch rate: one byte per 3 states = 36 crystal cycles
    t0 = cycles;
    exec0(1);
    check(cycles - t0 == 36, $sformatf("fetch took %0d crystal cycles", cycles - t0));

    fork
      // ======== processor 0: DISTANCE -> RANGE, then forwards ELEVATION ========
      begin
        logic [7:0] v, d, rng, el;
        // RANGE table in private RAM 10B:100B .. 10B:140B
        for (int i = 0; i < 5; i++) wr0(14'h0840 + 14'(8 * i), 8'(50 * (i + 1)));
        wr0(14'h0C40, 0);
        wr0(14'h0C80, 0);
        for (int k = 0; k < N_DIST; k++) begin
          do in0(5'd3, d); while (d == 0);
          rng = 8'd50;
          for (int i = 0; i < 5; i++) begin
            rd0(14'h0840 + 14'(8 * i), v);
            if (d >= v) rng = v;
          end
          out0(5'd8, rng);                      // RANGE to the 9900
          do in0(5'd3, d); while (d != 0);      // 9900 has taken it
          out0(5'd8, 0);                        // acknowledge
          wr0(14'h0C40, rng);                   // post RANGE for processor 1
          do rd0(14'h0C80, el); while (el == 0);
          wr0(14'h0C80, 0);
          out0(5'd8, el);                       // ELEVATION to the 9900
          m0.idle(20);                          // let the 9900 read it
          out0(5'd8, 0);
        end
        // fast count: wait for flag 0, count, set flag
        for (int k = 1; k <= N_FAST; k++) begin
          do rd0(14'h0C80, v); while (v != 0);
          out0(5'd8, 8'(k));
          out0(5'd9, ~8'(k));
          wr0(14'h0C80, 1);
        end
        do rd0(14'h0C80, v); while (v != 0);
        check(port_a[0] == N_FAST && port_b[0] == ~8'(N_FAST), "fast count on processor 0 ports");
        // slow count
        for (int k = 1; k <= N_SLOW; k++) begin
          wr0(14'h0C40, 8'(k));
          m0.idle(40);
        end
        p0_done = 1;
      end
      // ======== processor 1: RANGE -> ELEVATION ========
      begin
        logic [7:0] v, rng, el;
        for (int i = 0; i < 5; i++) begin
          logic [7:0] t [5] = '{8'd70, 8'd50, 8'd40, 8'd20, 8'd20};
          wr1(14'h0840 + 14'(8 * i), t[i]);
        end
        for (int k = 0; k < N_DIST; k++) begin
          do rd1(14'h0C40, rng); while (rng == 0);
          wr1(14'h0C40, 0);
          rd1(14'h0840 + 14'(8 * (rng / 50 - 1)), el);
          wr1(14'h0C80, el);
        end
        do rd1(14'h0C80, v); while (v != 0);    // last ELEVATION taken
        // fast count partner: wait for flag 1, clear it, report
        for (int k = 1; k <= N_FAST; k++) begin
          do rd1(14'h0C80, v); while (v == 0);
          wr1(14'h0C80, 0);
          rd1(14'h0C80, v);
          out1(5'd8, v);
          out1(5'd9, ~v);
        end
        check(port_a[1] == 0 && port_b[1] == 8'hFF, "fast count on processor 1 ports");
        // slow count: copy the shared word to the ports until processor 0 is done
        while (!p0_done) begin
          rd1(14'h0C40, v);
          out1(5'd8, v);
          out1(5'd9, ~v);
        end
        rd1(14'h0C40, v);
        out1(5'd8, v);
        out1(5'd9, ~v);
        check(port_a[1] == N_SLOW && port_b[1] == ~8'(N_SLOW), "slow count on processor 1 ports");
      end
      // ======== TMS 9900 ========
      begin
        logic [7:0] r;
        for (int k = 0; k < N_DIST; k++) begin
          ldcr(16'h1000, dists[k]);             // DISTANCE to the 8008 system
          do stcr(16'h1000, r); while (r == 0); // wait for the ready signal
          repeat (4) @(posedge clk);
          stcr(16'h1000, r);                    // RANGE
          check(r == range_of(dists[k]), $sformatf("RANGE for %0d: %0d expected %0d",
                dists[k], r, range_of(dists[k])));
          ldcr(16'h1000, 0);                    // ready for the next item
          do stcr(16'h1000, r); while (r != 0); // acknowledge
          do stcr(16'h1000, r); while (r == 0); // wait for the ready signal
          repeat (4) @(posedge clk);
          stcr(16'h1000, r);                    // ELEVATION
          check(r == elev_of(range_of(dists[k])), $sformatf("ELEVATION for %0d: %0d expected %0d",
                dists[k], r, elev_of(range_of(dists[k]))));
          if (k != N_DIST - 1) begin
            // hold the next distance back until processor 0 has cleared its port
            do stcr(16'h1000, r); while (r != 0);
          end
        end
        ldcr(16'h1010, 8'hA5);
        @(posedge clk); #1;
        check(cru_latch1 == 8'hA5, "second CRU latch");
      end
    join

    $display("fetch=%0d ram_rd=%0d ram_wr=%0d sh_rd=%0d sh_wr=%0d io_in=%0d io_out=%0d",
             n_fetch, n_ram_rd, n_ram_wr, n_sh_rd, n_sh_wr, n_io_in, n_io_out);
    $display("cru_wr=%0d cru_rd=%0d wait_states=%0d ties=%0d cycles=%0d",
             n_cru_wr, n_cru_rd, n_wait, n_tie, cycles);
    check(n_fetch > 0, "PROM fetches happened");
    check(n_ram_rd > 0 && n_ram_wr > 0, "private RAM used");
    check(n_sh_rd > 0 && n_sh_wr > 0, "shared memory used");
    check(n_wait > 0, "a processor waited for the shared memory");
    check(n_tie > 0, "simultaneous shared-memory requests happened");
    check(n_io_in > 0 && n_io_out > 0, "I/O ports used");
    check(n_cru_wr > 0 && n_cru_rd > 0, "CRU link used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
