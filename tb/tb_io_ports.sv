// tb_io_ports: OUT to ports 8 and 9 loads the matching latch only in T3 of a PCC cycle on the
// state strobe; other ports and other cycles leave them alone; INP 3 returns the input byte,
// other input ports 0; io_input is set for ports 0..7 only.
// Stimulus: random ports, random accumulator bytes and random cycle types.  Each ends with one
// end-of-state strobe (state_en), driven by the testbench itself.  A reference model of the two latches gives
// the expected outputs.  The split of inputs 0..7 and outputs 8..31 follows the board
// description.  The port numbers 3, 8 and 9 are the ones its programs use.
module tb_io_ports;
  logic clk = 0, rst_n = 0, state_en = 0, pcc = 0, t3 = 0;
  logic [4:0] port;
  logic [7:0] out_data, in_port, port_a, port_b, in_data;
  logic io_input, out_a_stb, out_b_stb;
  int checks = 0, failures = 0;

  io_ports dut (.clk, .rst_n, .state_en, .pcc, .t3, .port, .out_data, .in_port,
                .port_a, .port_b, .io_input, .in_data, .out_a_stb, .out_b_stb);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic out_cycle(input logic [4:0] p, input logic [7:0] v, input logic is_pcc,
                           input logic in_t3);
    port = p; out_data = v; pcc = is_pcc; t3 = in_t3; state_en = 1;
    @(posedge clk); #1;
    pcc = 0; t3 = 0; state_en = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ea, eb, v;
    port = 0; out_data = 0; in_port = 0;
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    ea = 0; eb = 0;
    check(port_a == 0 && port_b == 0, "reset");
    for (int k = 0; k < 200; k++) begin
      v = 8'($urandom);
      case ($urandom_range(0, 4))
        0: begin out_cycle(5'd8, v, 1, 1); ea = v; end
        1: begin out_cycle(5'd9, v, 1, 1); eb = v; end
        2: out_cycle(5'($urandom_range(10, 31)), v, 1, 1);
        3: out_cycle(5'd8, v, 0, 1);
        default: out_cycle(5'd9, v, 1, 0);
      endcase
      check(port_a == ea && port_b == eb, $sformatf("latches %h %h expected %h %h",
            port_a, port_b, ea, eb));
    end
    for (int p = 0; p < 32; p++) begin
      in_port = 8'($urandom); port = 5'(p); pcc = 1; #1;
      check(io_input == (p < 8), $sformatf("io_input for port %0d", p));
      check(in_data == ((p == 3) ? in_port : 8'h00), $sformatf("in_data for port %0d", p));
    end
    pcc = 0; port = 3; #1;
    check(io_input == 0 && in_data == 0, "no input outside PCC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
