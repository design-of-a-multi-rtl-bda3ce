// tb_local_ram: random writes and reads against a reference array; a write needs sel, we and
// the state strobe together, and an unselected RAM reads 0.
// Timing: one access per crystal cycle with state_en random; the RAM writes only when state_en,
// sel and we are all high, and reads are combinational.  Size 1K x 8 is the board's.  Reading 0
// when not selected stands in for the released data outputs, a choice of this design.
module tb_local_ram;
  logic clk = 0, state_en = 0, sel = 0, we = 0;
  logic [9:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] ref_mem [1024];
  logic       valid [1024];
  int checks = 0, failures = 0;

  local_ram dut (.clk, .state_en, .sel, .we, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) valid[i] = 0;
    addr = 0; wdata = 0;
    @(posedge clk); #1;
    for (int k = 0; k < 2000; k++) begin
      addr = 10'($urandom); wdata = 8'($urandom);
      case ($urandom_range(0, 3))
        0: begin  // proper write
          sel = 1; we = 1; state_en = 1;
          @(posedge clk); #1;
          ref_mem[addr] = wdata; valid[addr] = 1;
        end
        1: begin  // write without the state strobe: ignored
          sel = 1; we = 1; state_en = 0;
          @(posedge clk); #1;
        end
        2: begin  // write to an unselected RAM: ignored
          sel = 0; we = 1; state_en = 1;
          @(posedge clk); #1;
          checks++;
          if (rdata != 0) begin failures++; $display("FAIL: unselected read %h", rdata); end
        end
        default: begin  // read
          sel = 1; we = 0; state_en = 0; #1;
          if (valid[addr]) begin
            checks++;
            if (rdata != ref_mem[addr]) begin
              failures++; $display("FAIL: %0d read %h expected %h", addr, rdata, ref_mem[addr]);
            end
          end
        end
      endcase
      sel = 0; we = 0; state_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
