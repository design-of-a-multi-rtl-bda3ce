// cpu_module: the support logic of one 8008 CPU board.
//
// The 8008 multiplexes address and data on one 8-bit bus.  A machine cycle is T1 (low address
// byte out), T2 (high six address bits and two cycle bits out), WAIT for as long as READY is
// low at the end of T2, T3 (data in or out), and optionally T4 and T5.  This board latches the
// two address bytes, decodes the state and cycle lines, decodes the 14-bit address onto a 2K
// PROM, a 1K private RAM and the shared memory board, handles the 32-port I/O instructions and
// drives the data bus back to the CPU in T3.  READY is held low only while the shared memory is
// requested and not granted; the private memories are much faster than a state and never wait.
//
// Interface: s / dout / din / ready are the 8008 pins (dout is what the chip drives, din what
// the board returns while DBIN is high); sh_* is this board's side of the shared memory board;
// prog_* loads the PROM; in_port / port_a / port_b are the I/O ports 3, 8 and 9.  All state
// changes on the end-of-state strobe state_en of the timing generator.  The decoders and
// latches follow the board description; the choice of which state bounds a shared-memory
// request (T2 through T3) and the zero-when-idle data lines are this design's.
// sh_wdata is the CPU data bus itself: the shared board takes its write data from the bus
// driver that follows this bus.
module cpu_module
  import mpcs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        state_en,
  // 8008 pins
  input  logic [2:0]  s,
  input  logic [7:0]  dout,
  output logic [7:0]  din,
  output logic        ready,
  // PROM programming
  input  logic        prog_we,
  input  logic [10:0] prog_addr,
  input  logic [7:0]  prog_data,
  // I/O ports
  input  logic [7:0]  in_port,
  output logic [7:0]  port_a,
  output logic [7:0]  port_b,
  // shared memory board
  output logic        sh_req,
  output logic        sh_wait,
  output logic        sh_t3,
  output logic        sh_we,
  output logic [9:0]  sh_addr,
  output logic [7:0]  sh_wdata,
  input  logic [7:0]  sh_rdata,
  input  logic        sh_ready,
  // observation
  output logic [13:0] addr,
  output logic        rw_n,
  output logic        dbin,
  output logic        t3a
);
  state_dec_t       st;
  logic             t2l;
  logic [7:0]       lo_q, hi_q;
  logic             pci, pcr, pcc, pcw;
  logic             mem_cycle;
  logic [7:0]       prom_cs;
  logic             ram_sel, shared_sel;
  logic [7:0]       prom_data, ram_data, io_data;
  logic             io_input, out_a_stb, out_b_stb;

  state_decoder u_state (
    .clk, .rst_n, .state_en, .s, .st, .t2l, .t3a
  );

  address_latch #(.W(8)) u_lo (
    .clk, .rst_n, .state_en, .stb(st.t1 | st.t1i), .d(dout), .q(lo_q)
  );

  address_latch #(.W(8)) u_hi (
    .clk, .rst_n, .state_en, .stb(st.t2), .d(dout), .q(hi_q)
  );

  assign addr = {hi_q[5:0], lo_q};

  cycle_decoder u_cyc (
    .cyc(hi_q[7:6]), .pci, .pcr, .pcc, .pcw
  );

  assign mem_cycle = pci | pcr | pcw;

  mem_decoder u_dec (
    .addr, .mem_cycle, .prom_cs, .ram_sel, .shared_sel
  );

  rw_control u_rw (
    .st, .pci, .pcr, .pcc, .pcw, .io_input, .rw_n, .dbin
  );

  prom u_prom (
    .clk, .cs(prom_cs), .addr(lo_q), .rdata(prom_data),
    .prog_we, .prog_addr, .prog_data
  );

  local_ram u_ram (
    .clk, .state_en, .sel(ram_sel), .we(~rw_n), .addr(addr[9:0]),
    .wdata(dout), .rdata(ram_data)
  );

  io_ports u_io (
    .clk, .rst_n, .state_en, .pcc, .t3(st.t3), .port(hi_q[5:1]), .out_data(lo_q),
    .in_port, .port_a, .port_b, .io_input, .in_data(io_data), .out_a_stb, .out_b_stb
  );

  // shared memory board request window: T2 (address on the bus), WAIT, T3
  assign sh_req   = shared_sel & (st.t2 | st.wt | st.t3);
  assign sh_wait  = st.wt;
  assign sh_t3    = st.t3;
  assign sh_we    = ~rw_n;
  assign sh_addr  = addr[9:0];
  assign sh_wdata = dout;

  assign ready = ~sh_req | sh_ready;

  bus_logic u_bus (
    .dbin, .prom_sel(|prom_cs), .prom_data, .ram_sel, .ram_data,
    .shared_sel, .shared_data(sh_rdata), .io_sel(io_input), .io_data, .din
  );
endmodule
