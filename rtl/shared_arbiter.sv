// shared_arbiter: access control of the shared memory board for two processors.
//
// A processor requests the shared memory from T2 of a cycle whose address falls in the shared
// block until the end of that cycle's T3.  The first requester is granted and keeps the memory
// until its T3 ends; a processor that requests while the other holds the memory sees READY low,
// so the 8008 enters WAIT after T2 and stays there until the memory is free.  On the board this
// is done by a pair of D flip-flops, each driving the other processor's WAIT line and preset at
// T1, plus NAND-gated three-state enables; this module keeps the same rule as a small
// synchronous owner register.  When both request in the same state with the memory free, a
// processor already waiting wins; otherwise processor 0 wins (the document only says the order
// on a tie is arbitrary, so the fixed order is this design's choice).
// Interface: req, waiting (in WAIT) and done (in T3) per processor; grant is one-hot and
// combinational; ready = not requesting, or granted.  owner changes on the state strobe.
// tie and denied flag the two arbitration events for observation.
module shared_arbiter (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       state_en,
  input  logic [1:0] req,
  input  logic [1:0] waiting,
  input  logic [1:0] done,
  output logic [1:0] grant,
  output logic [1:0] ready,
  output logic       tie,      // both requested in the same state with the memory free
  output logic       denied    // some request is being held off this state
);
  logic [1:0] owner;

  always_comb begin
    tie = 1'b0;
    if ((owner & req) != 2'b00)  grant = owner;
    else if (req == 2'b11) begin
      tie   = 1'b1;
      grant = (waiting == 2'b10) ? 2'b10 : 2'b01;
    end
    else                         grant = req;
  end

  assign ready  = ~req | grant;
  assign denied = |(req & ~grant);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        owner <= 2'b00;
    else if (state_en) owner <= grant & ~done;
  end

  // at most one processor may own the memory
  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
