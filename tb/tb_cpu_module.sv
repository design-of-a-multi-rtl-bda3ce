// tb_cpu_module: one CPU board driven by the 8008 bus-cycle model.
// The shared memory board is modelled here by an array whose READY can be held low for a
// chosen number of states.  Checks: instruction fetches return the programmed PROM bytes with
// no WAIT; private RAM writes read back; shared-memory writes and reads reach the board at the
// right offset; a shared access held off for N states makes the CPU take exactly N WAIT states;
// OUT 8 / OUT 9 load the two output ports; INP 3 returns the input port; unmapped addresses
// read 0; a fetch cycle lasts 3 states (T1, T2, T3).
// Timing: the bus model changes its outputs after a state strobe and samples READY and the data
// bus just before the next one, so every access sees whole 8008 states.  The state strobe here
// comes every 4 crystal cycles rather than 12, to keep the run short.
// The memory map and ports follow the board description.  The held-off READY stands in for the
// shared board.
module tb_cpu_module;
  import mpcs_pkg::*;
  logic clk = 0, rst_n = 0, state_en = 0;
  logic [2:0] s;
  logic [7:0] dout, din;
  logic ready;
  logic prog_we = 0;
  logic [10:0] prog_addr = 0;
  logic [7:0] prog_data = 0;
  logic [7:0] in_port = 0, port_a, port_b;
  logic sh_req, sh_wait, sh_t3, sh_we, sh_ready;
  logic [9:0] sh_addr;
  logic [7:0] sh_wdata, sh_rdata;
  logic [13:0] addr;
  logic rw_n, dbin, t3a;
  logic [7:0] shm [1024];
  int hold = 0;
  int checks = 0, failures = 0;
  int state_count = 0;

  cpu_module dut (.clk, .rst_n, .state_en, .s, .dout, .din, .ready, .prog_we, .prog_addr,
                  .prog_data, .in_port, .port_a, .port_b, .sh_req, .sh_wait, .sh_t3, .sh_we,
                  .sh_addr, .sh_wdata, .sh_rdata, .sh_ready, .addr, .rw_n, .dbin, .t3a);

  cpu8008_bus_model cpu (.clk, .state_en, .s, .dout, .din, .ready);

  always #5 clk = ~clk;

  // end-of-state strobe every 4 clocks
  int div = 0;
  always @(posedge clk) begin
    div <= (div == 3) ? 0 : div + 1;
    state_en <= (div == 2);
    if (state_en) state_count++;
  end

  // shared memory board stand-in
  assign sh_ready = (hold == 0);
  assign sh_rdata = sh_req ? shm[sh_addr] : 8'h00;
  always @(posedge clk)
    if (state_en && sh_req) begin
      if (hold > 0) hold <= hold - 1;
      else if (sh_we) shm[sh_addr] <= sh_wdata;
    end

  function automatic logic [7:0] pat(input int i);
    return 8'((i * 13 + 7 + (i >> 8)) % 256);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r, v;
    logic [13:0] a;
    logic [7:0] ramref [1024];
    int t0;
    for (int i = 0; i < 1024; i++) shm[i] = 8'(i ^ 8'h5A);
    for (int i = 0; i < 2048; i++) begin
      prog_we = 1; prog_addr = 11'(i); prog_data = pat(i);
      @(posedge clk); #1;
    end
    prog_we = 0;
    rst_n = 1;
    cpu.idle(2);
    // instruction fetches from the PROM
    for (int k = 0; k < 40; k++) begin
      a = 14'($urandom_range(0, 2047));
      t0 = state_count;
      cpu.fetch(a, r);
      check(r == pat(a), $sformatf("fetch %h got %h expected %h", a, r, pat(a)));
      check(cpu.last_waits == 0, "PROM needs no WAIT");
      check(state_count - t0 == 3, $sformatf("fetch took %0d states", state_count - t0));
    end
    // private RAM
    for (int k = 0; k < 40; k++) begin
      a = 14'h0800 + 14'($urandom_range(0, 1023));
      v = 8'($urandom);
      cpu.mem_write(a, v);
      ramref[a[9:0]] = v;
      cpu.mem_read(a, r);
      check(r == v, $sformatf("RAM %h got %h expected %h", a, r, v));
    end
    // shared memory, no contention
    cpu.mem_write(14'h0C40, 8'd150);
    check(shm[10'h040] == 8'd150, "shared write at 14B:100B");
    cpu.mem_read(14'h0C80, r);
    check(r == (8'h80 ^ 8'h5A), "shared read at 14B:200B");
    check(cpu.last_waits == 0, "free shared memory needs no WAIT");
    // shared memory held off for N states
    for (int n = 1; n <= 4; n++) begin
      hold = n;
      cpu.mem_read(14'h0C00 + 14'(n), r);
      check(cpu.last_waits == n, $sformatf("held %0d states, waited %0d", n, cpu.last_waits));
      check(r == 8'(n ^ 8'h5A), "read after WAIT");
    end
    hold = 2;
    cpu.mem_write(14'h0FFF, 8'hC3);
    check(shm[10'h3FF] == 8'hC3 && cpu.last_waits == 2, "write after WAIT");
    // I/O
    v = 8'($urandom); cpu.io_out(5'd8, v);
    check(port_a == v, "OUT 10B");
    r = 8'($urandom); cpu.io_out(5'd9, r);
    check(port_b == r && port_a == v, "OUT 11B");
    in_port = 8'd200;
    cpu.io_in(5'd3, r);
    check(r == 8'd200, "INP 3B");
    cpu.io_in(5'd4, r);
    check(r == 8'd0, "unused input port");
    // unmapped
    cpu.mem_read(14'h1234, r);
    check(r == 0, "unmapped address reads 0");
    // private RAM untouched by the shared writes
    for (int k = 0; k < 8; k++) begin
      a = 14'h0800 + 14'($urandom_range(0, 1023));
      v = 8'($urandom);
      cpu.mem_write(a, v);
      cpu.mem_write(14'h0C00 | (a & 14'h03FF), ~v);
      cpu.mem_read(a, r);
      check(r == v, "private and shared memories are separate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
