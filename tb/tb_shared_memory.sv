// tb_shared_memory: two processors' bus cycles against a reference memory.  Each transaction
// is T2 (request), WAIT while READY is low, T3 (data); the test runs random reads and writes
// from both ports at once, checks read data against the reference, that no port reads data
// while not granted, and that simultaneous requests make exactly one processor wait.
// Timing: each processor's cycle is driven one 8008 state at a time.  The testbench pulses the
// end-of-state strobe state_en itself, one crystal cycle per state.  READY is sampled just before the strobe, as the 8008 samples it at
// the end of T2 and of each WAIT.  The rule of one processor at a time, first come first
// served, with a WAIT for the other, is the board's.  The tie order (processor 0 first) is
// this design's.  It counts the WAIT states and ties seen, and fails if either never
// occurred.
module tb_shared_memory;
  logic clk = 0, rst_n = 0, state_en = 0;
  logic [1:0] req, waiting, done, we, ready, grant;
  logic [9:0] addr [2];
  logic [7:0] wdata [2], rdata [2];
  logic tie, denied;
  logic [7:0] ref_mem [1024];
  logic       valid [1024];
  int checks = 0, failures = 0, waits = 0, ties = 0;

  shared_memory dut (.clk, .rst_n, .state_en, .req, .waiting, .done, .we, .addr, .wdata,
                     .rdata, .ready, .grant, .tie, .denied);

  always #5 clk = ~clk;

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

  // per-port phase: 0 idle, 1 T2, 2 WAIT, 3 T3
  int ph [2];
  logic is_wr [2];
  logic [1:0] rdy;

  initial begin
    for (int i = 0; i < 1024; i++) valid[i] = 0;
    req = 0; waiting = 0; done = 0; we = 0;
    for (int p = 0; p < 2; p++) begin ph[p] = 0; addr[p] = 0; wdata[p] = 0; is_wr[p] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int st = 0; st < 3000; st++) begin
      for (int p = 0; p < 2; p++) begin
        if (ph[p] == 0 && $urandom_range(0, 1) == 1) begin
          ph[p] = 1;
          addr[p] = 10'($urandom_range(0, 31));
          wdata[p] = 8'($urandom);
          is_wr[p] = 1'($urandom);
        end
        req[p]     = (ph[p] != 0);
        waiting[p] = (ph[p] == 2);
        done[p]    = (ph[p] == 3);
        we[p]      = (ph[p] == 3) && is_wr[p];
      end
      #1;
      if (req == 2'b11 && tie) ties++;
      for (int p = 0; p < 2; p++) begin
        if (ph[p] == 3) begin
          check(grant[p], $sformatf("granted in T3 p%0d st%0d ph %0d %0d grant %b", p, st, ph[0], ph[1], grant));
          if (!is_wr[p] && valid[addr[p]])
            check(rdata[p] == ref_mem[addr[p]], $sformatf("port %0d read %h expected %h at %0d",
                  p, rdata[p], ref_mem[addr[p]], addr[p]));
        end else if (!grant[p]) begin
          check(rdata[p] == 0, "no data while not granted");
        end
      end
      check(!(ready == 2'b00 && req == 2'b11), "one of two requesters is always served");
      rdy = ready;
      state_en = 1; @(posedge clk); #1; state_en = 0;
      for (int p = 0; p < 2; p++) begin
        case (ph[p])
          1, 2: begin
            if (!rdy[p]) waits++;
            ph[p] = rdy[p] ? 3 : 2;
          end
          3: begin
            if (is_wr[p]) begin ref_mem[addr[p]] = wdata[p]; valid[addr[p]] = 1; end
            ph[p] = 0;
          end
          default: ;
        endcase
      end
    end
    check(waits > 0, "contention produced WAIT states");
    check(ties > 0, "simultaneous requests happened");
    $display("waits=%0d ties=%0d", waits, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
