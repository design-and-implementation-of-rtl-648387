// tb_davrid_node -- self-checking test of one node (UIM plus SU).
//
// The test plays the NIMU on the ITQ/ETQ side and the TPU on the other. A
// frame is allocated by FALLOC and its address returned through the ETQ; a
// value arrives by START; the TPU stores a second value itself and
// synchronizes through the STQ (STARTl); the thread becomes runnable, the TPU
// takes it from the ATQ (NEXT), reads both values from the FM and sends the
// sum in a START message. Then the TPU keeps inserting messages while the SU
// answers a STARTr, which checks the shared ETQ insert port: the SU goes
// first, the TPU waits, and nothing is lost.
module tb_davrid_node;
  import davrid_pkg::*;
  localparam int unsigned FM_AW = 12, FRAME_LOG = 6;
  localparam logic [NODE_W-1:0] ME = 12'h0A6;
  localparam logic [NODE_W-1:0] PEER = 12'h7F1;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic tpu_atq_pop, tpu_atq_empty, tpu_stq_push, tpu_stq_full, tpu_etq_push, tpu_etq_ready;
  cont_t tpu_atq_rdata;
  stq_t tpu_stq_wdata;
  msg_t tpu_etq_wdata, itq_wdata, etq_rdata;
  logic tpu_fm_en, tpu_fm_we;
  logic [FM_AW-1:0] tpu_fm_addr;
  logic [WORD_W-1:0] tpu_fm_wdata, tpu_fm_rdata;
  logic itq_push, itq_full, etq_pop, etq_empty;
  logic su_busy, err_alloc, err_msg;
  logic [FM_AW-FRAME_LOG:0] frames_in_use;

  davrid_node #(.FM_AW(FM_AW), .FRAME_LOG(FRAME_LOG), .Q_DEPTH(16)) dut (.*, .node_id(ME));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic nimu_send(msg_t m);
    itq_push = 1; itq_wdata = m;
    @(posedge clk); #1 itq_push = 0;
  endtask

  task automatic wait_quiet();
    int n = 0;
    do begin @(posedge clk); #1 n++; end while (su_busy && n < 100);
    @(posedge clk); #1;
    while (su_busy && n < 100) begin @(posedge clk); #1 n++; end
  endtask

  task automatic nimu_take(output msg_t m, input string what);
    check(!etq_empty, {what, ": ETQ has a message"});
    m = etq_rdata;
    if (!etq_empty) begin etq_pop = 1; @(posedge clk); #1 etq_pop = 0; end
  endtask

  task automatic fm(bit we, int addr, logic [31:0] wd, output logic [31:0] rd);
    tpu_fm_en = 1; tpu_fm_we = we; tpu_fm_addr = FM_AW'(addr); tpu_fm_wdata = wd;
    @(posedge clk); #1 tpu_fm_en = 0; tpu_fm_we = 0; rd = tpu_fm_rdata;
  endtask

  msg_t m;
  logic [31:0] d, v1, v2;
  logic [FBA_W-1:0] fp;
  int waited = 0, n_tpu = 0;

  initial begin
    tpu_atq_pop = 0; tpu_stq_push = 0; tpu_etq_push = 0; tpu_fm_en = 0; tpu_fm_we = 0;
    tpu_fm_addr = '0; tpu_fm_wdata = '0; tpu_stq_wdata = '0; tpu_etq_wdata = '0;
    itq_push = 0; itq_wdata = '0; etq_pop = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // FALLOC arrives from the NIMU; the frame address goes back to PEER
    m = '0; m.hdr.node = PEER; m.hdr.fba = 20'h00010; m.hdr.mt = MT_FALLOC;
    m.hdr.off = 1; m.hdr.disp = 2; m.w[0] = 8; m.w[1] = {8'd2, 24'h000040};
    nimu_send(m); wait_quiet();
    nimu_take(m, "FALLOC reply");
    check(m.hdr.mt == MT_START && m.hdr.node == PEER && m.hdr.fba == 20'h00010 &&
          m.hdr.off == 1 && m.hdr.disp == 2, "FALLOC reply header");
    check(m.w[0][31:20] == ME, "frame belongs to this node");
    fp = m.w[0][19:0];
    check(frames_in_use == 1, "one frame in use");

    // a value arrives by START: count 2 -> 1
    m = mk_start(MT_START, ME, fp, 0, 5, 32'd11);
    nimu_send(m); wait_quiet();
    check(tpu_atq_empty, "not yet runnable");
    // the TPU stores locally and synchronizes through the STQ
    fm(1, int'(fp) + 6, 32'd22, d);
    tpu_stq_push = 1; tpu_stq_wdata = '{kind: STQ_SYNC, fp: fp, arg: '0};
    @(posedge clk); #1 tpu_stq_push = 0;
    wait_quiet();
    check(!tpu_atq_empty, "thread runnable");
    check(tpu_atq_rdata.fp == fp && tpu_atq_rdata.ip == 24'h000040, "continuation");
    // NEXT: take the continuation, run the thread
    tpu_atq_pop = 1; @(posedge clk); #1 tpu_atq_pop = 0;
    fm(0, int'(fp) + 5, '0, v1);
    fm(0, int'(fp) + 6, '0, v2);
    check(v1 == 32'd11 && v2 == 32'd22, "thread reads both inputs from the FM");
    tpu_etq_wdata = mk_start(MT_START, PEER, 20'h00010, 3, 4, v1 + v2);
    tpu_etq_push = 1;
    @(posedge clk); #1 tpu_etq_push = 0;
    nimu_take(m, "result message");
    check(m.hdr.node == PEER && m.w[0] == 32'd33, "result message");

    // shared ETQ insert port: the SU answers a STARTr while the TPU inserts
    fm(1, int'(fp) + 7, {8'd5, 24'h000050}, d);
    m = mk_start(MT_STARTR, ME, fp, 7, 8, 32'd1);
    m.w[1] = {PEER, 20'h00020}; m.w[2] = 32'd9;
    nimu_send(m);
    for (int i = 0; i < 8; i++) begin
      tpu_etq_wdata = mk_start(MT_START, PEER, 20'h00030, 0, 0, 32'(i));
      tpu_etq_push = 1;
      #1;
      while (!tpu_etq_ready) begin waited++; @(posedge clk); #1; end
      @(posedge clk); #1 tpu_etq_push = 0;
      n_tpu++;
    end
    wait_quiet();
    check(waited > 0, "the TPU waited for the SU");
    begin
      int n_sig = 0, n_data = 0, expect_v = 0;
      while (!etq_empty) begin
        nimu_take(m, "drain");
        if (m.hdr.mt == MT_STARTN) begin
          n_sig++;
          check(m.hdr.fba == 20'h00020 && m.hdr.off == 9, "STARTr signal");
        end else begin
          check(m.w[0] == 32'(expect_v), "TPU messages in order");
          expect_v++; n_data++;
        end
      end
      check(n_sig == 1 && n_data == n_tpu, "nothing lost on the shared port");
    end
    fm(0, int'(fp) + 7, '0, d);
    check(d == {8'd4, 24'h000050}, "STARTr decremented");
    check(!err_alloc && !err_msg, "no error");

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
