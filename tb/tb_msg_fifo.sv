// tb_msg_fifo -- self-checking test of the message queue.
//
// Drives random inserts and deletes (never into a full or out of an empty
// queue) against a SystemVerilog queue used as the reference, and checks the
// head item, full, empty and count every cycle. It also fills the queue to
// the brim, checks an insert and a delete in the same cycle, and drains it
// in order.
module tb_msg_fifo;
  localparam int unsigned W = 16, D = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  msg_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic step(bit do_push, bit do_pop, logic [W-1:0] d);
    push = do_push; pop = do_pop; wdata = d;
    @(posedge clk);
    if (do_pop)  void'(model.pop_front());
    if (do_push) model.push_back(d);
    #1;
    check(count == $bits(count)'(model.size()), "count");
    check(full == (model.size() == D), "full");
    check(empty == (model.size() == 0), "empty");
    if (model.size() != 0) check(rdata == model[0], "head");
  endtask

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check(empty && !full && count == 0, "after reset");
    for (int n = 0; n < 400; n++) begin
      bit p, q;
      p = ($urandom_range(0, 1) == 1) && (model.size() < D);
      q = ($urandom_range(0, 1) == 1) && (model.size() > 0);
      step(p, q, W'($urandom));
    end
    while (model.size() < D) step(1, 0, W'($urandom));
    check(full, "filled");
    step(0, 1, '0);
    step(1, 1, 16'hBEEF);
    check(!full && count == D - 1, "insert+delete keeps count");
    while (model.size() > 0) step(0, 1, '0);
    check(empty, "drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
