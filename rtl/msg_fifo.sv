// msg_fifo -- one DAVRID message queue (ATQ, STQ, ITQ or ETQ).
//
// In a node the four queues sit between the units: the TPU pops
// continuations from the ATQ and pushes into the STQ and the ETQ, the SU
// pops the ITQ and the STQ and pushes the ATQ, and the NIMU pushes the ITQ
// and pops the ETQ. Each unit inserts or deletes one item per access, so a
// queue is a first-in first-out buffer with an insert port and a delete port
// that may both be used in the same cycle.
//
// The queues of the original machine are dual-port FIFO parts accessed
// asynchronously by two processors. This implementation is a single-clock
// synchronous FIFO (its own choice): push writes `wdata` at the rising edge
// when `full` is low; `rdata` always shows the oldest entry (first-word
// fall-through) and pop removes it at the edge when `empty` is low. A push to
// a full queue or a pop from an empty one is ignored and flagged by an
// assertion. `count` is the number of entries held. Depth is a choice of this
// design; the item width is set by the instantiating block.
module msg_fifo #(
  parameter int unsigned WIDTH = 64,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic [WIDTH-1:0]           wdata,
  input  logic                       pop,
  output logic [WIDTH-1:0]           rdata,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_push, do_pop;

  assign full    = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= next_ptr(wptr);
      if (do_pop)  rptr <= next_ptr(rptr);
      count <= count + $bits(count)'(do_push) - $bits(count)'(do_pop);
    end
  end

  // Handshake rules: the producer never inserts into a full queue and the
  // consumer never deletes from an empty one.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);
endmodule
