// tb_block_alloc -- self-checking test of the block allocator.
//
// Allocates every block of a small pool and checks each number is handed
// out once and that `avail` drops when none is left; then frees and
// allocates at random against a reference set of blocks in use, including
// allocate-and-free in the same cycle, checking that no block is handed out
// twice and that `in_use` is right.
module tb_block_alloc;
  localparam int unsigned N = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc, avail, free;
  logic [$clog2(N)-1:0] alloc_idx, free_idx;
  logic [$clog2(N+1)-1:0] in_use;
  bit used [N];
  int nused = 0;
  int checks = 0, failures = 0;

  block_alloc #(.NBLK(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // one cycle: optionally allocate and optionally free block f
  task automatic step(bit a, bit fr, int f);
    alloc = a; free = fr; free_idx = $bits(free_idx)'(f);
    #1;
    if (a) begin
      check(avail == (nused - (fr ? 0 : 0) < N), "avail");
      if (avail) begin
        check(!used[alloc_idx], "fresh block");
        used[alloc_idx] = 1; nused++;
      end
    end
    @(posedge clk);
    if (fr) begin used[f] = 0; nused--; end
    #1;
    check(in_use == $bits(in_use)'(nused), "in_use");
    alloc = 0; free = 0;
  endtask

  initial begin
    alloc = 0; free = 0; free_idx = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) step(1, 0, 0);
    #1 check(!avail, "exhausted");
    for (int n = 0; n < 300; n++) begin
      int f; bit fr;
      int held [$];
      fr = 0; f = 0;
      held.delete();
      for (int k = 0; k < N; k++) if (used[k]) held.push_back(k);
      if (held.size() > 0 && $urandom_range(0, 1) == 1) begin
        f = held[$urandom_range(0, held.size() - 1)];
        fr = 1;
      end
      step((nused < N) && $urandom_range(0, 1) == 1, fr, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
