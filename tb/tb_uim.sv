// tb_uim -- self-checking test of the Unit Interface Module.
//
// Checks that each of the four queues is wired from its insert port to its
// delete port in order and reports full and empty, and that the frame
// memory is shared: a word written through the TPU port is read through the
// SU port and the other way round.
module tb_uim;
  import davrid_pkg::*;
  localparam int unsigned FM_AW = 10, QD = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic fma_en, fma_we, fmb_en, fmb_we;
  logic [FM_AW-1:0] fma_addr, fmb_addr;
  logic [WORD_W-1:0] fma_wdata, fma_rdata, fmb_wdata, fmb_rdata;
  logic atq_push, atq_full, atq_pop, atq_empty;
  cont_t atq_wdata, atq_rdata;
  logic stq_push, stq_full, stq_pop, stq_empty;
  stq_t stq_wdata, stq_rdata;
  logic itq_push, itq_full, itq_pop, itq_empty;
  msg_t itq_wdata, itq_rdata;
  logic etq_push, etq_full, etq_pop, etq_empty;
  msg_t etq_wdata, etq_rdata;

  uim #(.FM_AW(FM_AW), .Q_DEPTH(QD)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    {fma_en, fma_we, fmb_en, fmb_we, atq_push, atq_pop, stq_push, stq_pop} = '0;
    {itq_push, itq_pop, etq_push, etq_pop} = '0;
    fma_addr = '0; fmb_addr = '0; fma_wdata = '0; fmb_wdata = '0;
    atq_wdata = '0; stq_wdata = '0; itq_wdata = '0; etq_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    check(atq_empty && stq_empty && itq_empty && etq_empty, "all queues empty");
    // fill each queue with distinct items
    for (int i = 0; i < QD; i++) begin
      atq_push = 1; atq_wdata = '{fp: FBA_W'(i + 1), ip: IP_W'(100 + i)};
      stq_push = 1; stq_wdata = '{kind: STQ_SYNC, fp: FBA_W'(i + 2), arg: IP_W'(200 + i)};
      itq_push = 1; itq_wdata = '0; itq_wdata.hdr.fba = FBA_W'(300 + i); itq_wdata.hdr.mt = MT_START;
      etq_push = 1; etq_wdata = '0; etq_wdata.hdr.fba = FBA_W'(400 + i); etq_wdata.hdr.mt = MT_ILOAD;
      @(posedge clk); #1;
    end
    {atq_push, stq_push, itq_push, etq_push} = '0;
    check(atq_full && stq_full && itq_full && etq_full, "all queues full");
    for (int i = 0; i < QD; i++) begin
      check(atq_rdata.fp == FBA_W'(i + 1) && atq_rdata.ip == IP_W'(100 + i), "ATQ order");
      check(stq_rdata.fp == FBA_W'(i + 2) && stq_rdata.arg == IP_W'(200 + i), "STQ order");
      check(itq_rdata.hdr.fba == FBA_W'(300 + i) && itq_rdata.hdr.mt == MT_START, "ITQ order");
      check(etq_rdata.hdr.fba == FBA_W'(400 + i) && etq_rdata.hdr.mt == MT_ILOAD, "ETQ order");
      {atq_pop, stq_pop, itq_pop, etq_pop} = '1;
      @(posedge clk); #1;
      {atq_pop, stq_pop, itq_pop, etq_pop} = '0;
    end
    check(atq_empty && stq_empty && itq_empty && etq_empty, "all queues drained");
    // shared FM
    fma_en = 1; fma_we = 1; fma_addr = 10'h123; fma_wdata = 32'hCAFE_0001;
    fmb_en = 1; fmb_we = 1; fmb_addr = 10'h321; fmb_wdata = 32'hCAFE_0002;
    @(posedge clk); #1;
    fma_we = 0; fmb_we = 0; fma_addr = 10'h321; fmb_addr = 10'h123;
    @(posedge clk); #1;
    check(fma_rdata == 32'hCAFE_0002, "TPU reads what the SU wrote");
    check(fmb_rdata == 32'hCAFE_0001, "SU reads what the TPU wrote");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
