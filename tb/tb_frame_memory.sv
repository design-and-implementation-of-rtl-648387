// tb_frame_memory -- self-checking test of the dual-port frame memory.
//
// Writes random words through both ports into disjoint address halves, reads
// them back through the other port and checks the one-cycle read latency,
// then checks that port B wins when both ports write the same word.
module tb_frame_memory;
  localparam int unsigned AW = 8, DW = 32;
  logic clk = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [DW-1:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  frame_memory #(.AW(AW), .DW(DW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    @(posedge clk);
    // fill: port A writes the lower half, port B the upper half, together
    for (int i = 0; i < 2**(AW-1); i++) begin
      a_en = 1; a_we = 1; a_addr = AW'(i);             a_wdata = $urandom;
      b_en = 1; b_we = 1; b_addr = AW'(i + 2**(AW-1)); b_wdata = $urandom;
      ref_mem[a_addr] = a_wdata; ref_mem[b_addr] = b_wdata;
      @(posedge clk); #1;
    end
    // read crosswise, both ports together
    for (int i = 0; i < 2**(AW-1); i++) begin
      a_en = 1; a_we = 0; a_addr = AW'(i + 2**(AW-1));
      b_en = 1; b_we = 0; b_addr = AW'(i);
      @(posedge clk); #1;
      check(a_rdata == ref_mem[a_addr], "port A read");
      check(b_rdata == ref_mem[b_addr], "port B read");
    end
    // the read data holds while a port is idle
    a_en = 0; b_en = 0;
    @(posedge clk); #1;
    check(a_rdata == ref_mem[AW'(2**AW - 1)], "port A holds");
    // same-word write collision: B wins
    a_en = 1; a_we = 1; a_addr = 8'h10; a_wdata = 32'hAAAA_AAAA;
    b_en = 1; b_we = 1; b_addr = 8'h10; b_wdata = 32'h5555_5555;
    @(posedge clk); #1;
    a_we = 0; b_en = 0;
    @(posedge clk); #1;
    check(a_rdata == 32'h5555_5555, "collision: port B wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
