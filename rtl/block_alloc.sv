// block_alloc -- allocator of equal-sized memory blocks.
//
// The SU allocates and frees frames in the FM, and the NIMU allocates and
// frees structure areas in the SM and cells of its I-structure deferred
// lists. This block hands out block numbers for all three. The memory is cut
// into NBLK blocks; a block number never handed out comes from a bump counter,
// and a freed number goes onto a free stack from which later requests are
// served first, so no initialisation pass is needed after reset.
//
// Interface: with `alloc` high and `avail` high, `alloc_idx` is the block
// taken at the rising edge. With `free` high, `free_idx` is returned at the
// edge. Both may happen in one cycle; a block freed in a cycle can be handed
// out from the next cycle on. `avail` is low when every block is in use.
// `in_use` counts blocks currently allocated. Freeing a block twice is not
// detected. The fixed block size is this design's choice: the document does
// not say how its run-time system lays out free memory.
module block_alloc #(
  parameter int unsigned NBLK = 1024
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      alloc,
  output logic                      avail,
  output logic [$clog2(NBLK)-1:0]   alloc_idx,
  input  logic                      free,
  input  logic [$clog2(NBLK)-1:0]   free_idx,
  output logic [$clog2(NBLK+1)-1:0] in_use
);
  localparam int unsigned IW = $clog2(NBLK);
  localparam int unsigned CW = $clog2(NBLK+1);

  logic [IW-1:0] stack [NBLK];
  logic [CW-1:0] sp;       // entries on the free stack
  logic [CW-1:0] bump;     // block numbers below this were handed out once
  logic          from_stack, do_alloc;

  assign from_stack = (sp != '0);
  assign avail      = from_stack || (bump != CW'(NBLK));
  assign alloc_idx  = from_stack ? stack[IW'(sp - 1'b1)] : bump[IW-1:0];
  assign do_alloc   = alloc && avail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp     <= '0;
      bump   <= '0;
      in_use <= '0;
    end else begin
      if (do_alloc && !from_stack) bump <= bump + 1'b1;
      // a pop and a push in the same cycle: the pushed number replaces the top
      if (do_alloc && from_stack && !free) sp <= sp - 1'b1;
      else if (free && !(do_alloc && from_stack)) sp <= sp + 1'b1;
      in_use <= in_use + CW'(do_alloc) - CW'(free);
    end
  end

  always_ff @(posedge clk) begin
    if (free) begin
      if (do_alloc && from_stack) stack[IW'(sp - 1'b1)] <= free_idx;
      else                        stack[IW'(sp)] <= free_idx;
    end
  end

  a_no_overfree: assert property (@(posedge clk) disable iff (!rst_n)
                                  free |-> (in_use != '0) || do_alloc);
endmodule
