// frame_memory -- the Frame Memory (FM) of one DAVRID node.
//
// The FM holds the frames of the functions and loops activated on the node.
// A frame holds synchronization slots, each {synchronization counter, thread
// pointer}, and value slots, addressed relative to the frame base address fp
// by an offset or a displacement. Two units use it at the same time: the TPU
// loads and stores frame values and the SU stores arriving values and updates
// the synchronization counters, so the memory has two independent ports.
//
// Each port is synchronous: with `a_en` high a write (`a_we`) stores
// `a_wdata` at the rising edge, and a read returns `a_rdata` one cycle after
// the edge that sampled the address. The original FM is built from
// asynchronous dual-port SRAM parts; the clocked ports are this design's
// choice. The default depth, 2^20 words of 32 bits, follows from the 20-bit
// frame base address field of a message. When both ports write the same word
// in one cycle port B (the SU) wins, which is also this design's choice.
module frame_memory #(
  parameter int unsigned AW = 20,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  // port A: TPU
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  // port B: SU
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (a_en && a_we && !(b_en && b_we && (b_addr == a_addr))) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
  end

  always_ff @(posedge clk) begin
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end
endmodule
