// holo_sync_fifo: single-clock first-in first-out buffer.
//
// Used as the hololine FIFOs of the video concentrator card and as the
// output and input buffers of the processor FPGA. `push` stores `wdata`
// when the FIFO is not full; `pop` removes the head when it is not empty.
// The head is visible on `rdata` whenever `empty` is low (show-ahead), so a
// pop and the use of its data happen in the same cycle. `count` gives the
// occupancy. DEPTH must be a power of two. Storage is a plain array so that
// it maps to block RAM. Pushing into a full or popping an empty FIFO is
// ignored and flagged by an assertion.
module holo_sync_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH):0]   count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr_q, rptr_q;
  logic             do_push, do_pop;

  assign empty   = (wptr_q == rptr_q);
  assign full    = (wptr_q[AW-1:0] == rptr_q[AW-1:0]) && (wptr_q[AW] != rptr_q[AW]);
  assign count   = wptr_q - rptr_q;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push)
      mem[wptr_q[AW-1:0]] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q <= '0;
      rptr_q <= '0;
    end else begin
      if (do_push) wptr_q <= wptr_q + 1'b1;
      if (do_pop)  rptr_q <= rptr_q + 1'b1;
    end
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("holo_sync_fifo: DEPTH must be a power of two");

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
