// mpcs_top: two-processor 8008 control system with a shared memory and a 9900 link.
//
// Two identical 8008 CPU boards, each with its own 2K PROM, 1K private RAM and I/O ports, work
// on separate tasks and exchange data through a 1K memory board that both can address (octal
// pages 14-17, 0x0C00-0x0FFF).  When both want that memory at once, one is served and the other
// is held in its WAIT state until the first one's T3 is over.  Processor 0's I/O ports connect
// to a TMS 9900 computer through the CRU interface: 9900 latch 0 feeds input port 3 and the
// 9900 reads output port 8 through the data selector.  Processor 1's ports are brought out.
//
// The 8008 chips themselves are not part of this RTL: their pins (state lines, data out, data
// in, READY, phi1/phi2) are ports, so a chip or a bus model connects outside.  One timing
// generator on the crystal clock paces both boards; the real boards each had their own crystal,
// so running them in step is this design's simplification.  Ports that end in [2] are indexed
// by processor.
module mpcs_top
  import mpcs_pkg::*;
(
  input  logic        clk,            // crystal clock (3 MHz)
  input  logic        rst_n,
  // timing to the 8008 chips
  output logic        phi1,
  output logic        phi2,
  output logic        synca,
  output logic        state_en,
  // 8008 pins, per processor
  input  logic [2:0]  cpu_s    [2],
  input  logic [7:0]  cpu_dout [2],
  output logic [7:0]  cpu_din  [2],
  output logic        cpu_ready[2],
  // PROM programming, per processor
  input  logic [1:0]  prog_we,
  input  logic [10:0] prog_addr,
  input  logic [7:0]  prog_data,
  // TMS 9900 CRU
  input  logic        cru_reset,
  input  logic [11:0] cru_addr,
  input  logic        cru_out,
  input  logic        cru_clk,
  output logic        cru_in,
  output logic [7:0]  cru_latch1,
  // I/O of processor 1, and the output latches of both
  input  logic [7:0]  p1_in_port,
  output logic [7:0]  port_a   [2],
  output logic [7:0]  port_b   [2],
  // observation
  output logic [13:0] cpu_addr [2],
  output logic        cpu_rw_n [2],   // R/W-bar of each board
  output logic        cpu_dbin [2],   // DBIN of each board
  output logic        cpu_t3a  [2],   // T3 directly after T2 (no WAIT)
  output logic [1:0]  sh_grant,
  output logic        sh_tie,
  output logic        sh_denied
);
  logic [1:0] sh_req, sh_wait, sh_t3, sh_we, sh_ready;
  logic [9:0] sh_addr  [2];
  logic [7:0] sh_wdata [2];
  logic [7:0] sh_rdata [2];
  logic [7:0] in_port  [2];
  logic [7:0] latch0;

  timing_generator u_tg (
    .clk, .rst_n, .phi1, .phi2, .synca, .state_en
  );

  assign in_port[0] = latch0;
  assign in_port[1] = p1_in_port;

  for (genvar i = 0; i < 2; i++) begin : g_cpu
    cpu_module u_cpu (
      .clk, .rst_n, .state_en,
      .s(cpu_s[i]), .dout(cpu_dout[i]), .din(cpu_din[i]), .ready(cpu_ready[i]),
      .prog_we(prog_we[i]), .prog_addr, .prog_data,
      .in_port(in_port[i]), .port_a(port_a[i]), .port_b(port_b[i]),
      .sh_req(sh_req[i]), .sh_wait(sh_wait[i]), .sh_t3(sh_t3[i]), .sh_we(sh_we[i]),
      .sh_addr(sh_addr[i]), .sh_wdata(sh_wdata[i]), .sh_rdata(sh_rdata[i]),
      .sh_ready(sh_ready[i]),
      .addr(cpu_addr[i]), .rw_n(cpu_rw_n[i]), .dbin(cpu_dbin[i]), .t3a(cpu_t3a[i])
    );
  end

  shared_memory u_shared (
    .clk, .rst_n, .state_en,
    .req(sh_req), .waiting(sh_wait), .done(sh_t3), .we(sh_we),
    .addr(sh_addr), .wdata(sh_wdata), .rdata(sh_rdata),
    .ready(sh_ready), .grant(sh_grant), .tie(sh_tie), .denied(sh_denied)
  );

  cru_interface u_cru (
    .clk, .rst_n, .cru_reset, .cru_addr, .cru_out, .cru_clk, .cru_in,
    .latch0, .latch1(cru_latch1), .sel_in(port_a[0])
  );
endmodule
