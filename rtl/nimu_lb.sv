// nimu_lb -- load-balancing table of the NIMU.
//
// A frame allocation request names no node: the NIMU picks one. Taking the
// total size of the frames allocated on a node as the measure of its
// workload, the NIMU keeps one counter per node of its cluster and sends each
// allocation to the node with the smallest total, the lowest-numbered one on
// a tie. This is the policy the document describes; the counter width and the
// tie rule are this design's choices.
//
// `alloc` adds `alloc_size` to the counter of `alloc_node`; `dealloc`
// subtracts `dealloc_size` from that of `dealloc_node` (saturating at 0).
// Both may happen in one cycle, also on the same node. `pick` is
// combinational from the counters, so it reflects the updates of earlier
// cycles only.
module nimu_lb #(
  parameter int unsigned NNODES = 4,
  parameter int unsigned CW     = 21
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      alloc,
  input  logic [$clog2(NNODES)-1:0] alloc_node,
  input  logic [CW-1:0]             alloc_size,
  input  logic                      dealloc,
  input  logic [$clog2(NNODES)-1:0] dealloc_node,
  input  logic [CW-1:0]             dealloc_size,
  output logic [$clog2(NNODES)-1:0] pick,
  output logic [CW-1:0]             load [NNODES]
);
  localparam int unsigned NW = $clog2(NNODES);

  always_comb begin
    pick = '0;
    for (int unsigned i = 1; i < NNODES; i++) begin
      if (load[i] < load[pick]) pick = NW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NNODES; i++) load[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NNODES; i++) begin
        logic [CW:0] v;
        v = {1'b0, load[i]};
        if (alloc && alloc_node == NW'(i)) v = v + (CW+1)'(alloc_size);
        if (dealloc && dealloc_node == NW'(i))
          v = (v > (CW+1)'(dealloc_size)) ? v - (CW+1)'(dealloc_size) : '0;
        load[i] <= v[CW] ? '1 : v[CW-1:0];
      end
    end
  end
endmodule
