// tb_nimu_lb -- self-checking test of the load-balancing table.
//
// Applies random allocations (always to the node the table picks, as the
// router does) and random deallocations, sometimes both in one cycle, and
// compares every counter and the pick (smallest load, lowest node on a tie)
// with a reference model. It also checks saturation at zero.
module tb_nimu_lb;
  localparam int unsigned N = 4, CW = 12;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc, dealloc;
  logic [1:0] alloc_node, dealloc_node, pick;
  logic [CW-1:0] alloc_size, dealloc_size;
  logic [CW-1:0] load [N];
  int ref_load [N];
  int checks = 0, failures = 0;

  nimu_lb #(.NNODES(N), .CW(CW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int ref_pick();
    int p = 0;
    for (int i = 1; i < N; i++) if (ref_load[i] < ref_load[p]) p = i;
    return p;
  endfunction

  initial begin
    alloc = 0; dealloc = 0; alloc_node = 0; dealloc_node = 0; alloc_size = 0; dealloc_size = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < N; i++) ref_load[i] = 0;
    #1 check(pick == 0, "tie goes to node 0");
    for (int n = 0; n < 500; n++) begin
      alloc = $urandom_range(0, 2) != 0;
      alloc_node = pick;
      alloc_size = CW'($urandom_range(1, 40));
      dealloc = $urandom_range(0, 2) == 0;
      dealloc_node = 2'($urandom_range(0, N - 1));
      dealloc_size = CW'($urandom_range(1, 60));
      #1 check(int'(pick) == ref_pick(), "pick");
      @(posedge clk);
      if (alloc) ref_load[alloc_node] += alloc_size;
      if (dealloc) ref_load[dealloc_node] = (ref_load[dealloc_node] > dealloc_size) ?
                                            ref_load[dealloc_node] - dealloc_size : 0;
      #1;
      for (int i = 0; i < N; i++) check(int'(load[i]) == ref_load[i], "counter");
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
