// tb_su -- self-checking test of the Synchronization Unit.
//
// The SU is surrounded by real queues and a small frame memory; the test
// plays the TPU (FM port A, STQ, ATQ) and the NIMU (ITQ, ETQ). It checks the
// START handler (value stored, counter decremented, thread activated when the
// counter is 1 and the slot left alone), STARTn, STARTN, STARTr and its
// signal back, both kinds of STQ token, FALLOC with its reply and slot
// initialisation, FDEALLOC and reuse of the frame, M_FALLOC starting a
// thread, the error flags, and the handler's cycle counts (3 cycles for a
// START that decrements, 4 for one that activates).
module tb_su;
  import davrid_pkg::*;
  localparam int unsigned FM_AW = 12, FRAME_LOG = 6;
  localparam logic [NODE_W-1:0] ME = 12'h015;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  // queues
  logic itq_push, itq_pop, itq_full, itq_empty;
  msg_t itq_wdata, itq_rdata;
  logic stq_push, stq_pop, stq_full, stq_empty;
  stq_t stq_wdata, stq_rdata;
  logic atq_push, atq_pop, atq_full, atq_empty;
  cont_t atq_wdata, atq_rdata;
  logic etq_push, etq_pop, etq_full, etq_empty;
  msg_t etq_wdata, etq_rdata;
  logic [4:0] c0, c1, c2, c3;
  // FM
  logic a_en, a_we, b_en, b_we;
  logic [FM_AW-1:0] a_addr, b_addr;
  logic [WORD_W-1:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic busy, err_alloc, err_msg;
  logic [FM_AW-FRAME_LOG:0] frames_in_use;

  msg_fifo #(.WIDTH(MSG_W), .DEPTH(16)) u_itq (.clk, .rst_n, .push(itq_push), .wdata(itq_wdata),
    .pop(itq_pop), .rdata(itq_rdata), .full(itq_full), .empty(itq_empty), .count(c0));
  msg_fifo #(.WIDTH($bits(stq_t)), .DEPTH(16)) u_stq (.clk, .rst_n, .push(stq_push), .wdata(stq_wdata),
    .pop(stq_pop), .rdata(stq_rdata), .full(stq_full), .empty(stq_empty), .count(c1));
  msg_fifo #(.WIDTH($bits(cont_t)), .DEPTH(16)) u_atq (.clk, .rst_n, .push(atq_push), .wdata(atq_wdata),
    .pop(atq_pop), .rdata(atq_rdata), .full(atq_full), .empty(atq_empty), .count(c2));
  msg_fifo #(.WIDTH(MSG_W), .DEPTH(16)) u_etq (.clk, .rst_n, .push(etq_push), .wdata(etq_wdata),
    .pop(etq_pop), .rdata(etq_rdata), .full(etq_full), .empty(etq_empty), .count(c3));
  frame_memory #(.AW(FM_AW)) u_fm (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  su #(.FM_AW(FM_AW), .FRAME_LOG(FRAME_LOG)) dut (
    .clk, .rst_n, .node_id(ME),
    .itq_rdata, .itq_empty, .itq_pop,
    .stq_rdata, .stq_empty, .stq_pop,
    .atq_push, .atq_wdata, .atq_full,
    .etq_push, .etq_wdata, .etq_ready(!etq_full),
    .fm_en(b_en), .fm_we(b_we), .fm_addr(b_addr), .fm_wdata(b_wdata), .fm_rdata(b_rdata),
    .busy, .err_alloc, .err_msg, .frames_in_use
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic fm_write(int addr, logic [31:0] d);
    a_en = 1; a_we = 1; a_addr = FM_AW'(addr); a_wdata = d;
    @(posedge clk); #1 a_en = 0; a_we = 0;
  endtask

  task automatic fm_read(int addr, output logic [31:0] d);
    a_en = 1; a_we = 0; a_addr = FM_AW'(addr);
    @(posedge clk); #1 a_en = 0; d = a_rdata;
  endtask

  task automatic send(msg_t m);
    itq_push = 1; itq_wdata = m;
    @(posedge clk); #1 itq_push = 0;
  endtask

  task automatic token(stq_kind_e k, int fp, int arg);
    stq_push = 1; stq_wdata = '{kind: k, fp: FBA_W'(fp), arg: IP_W'(arg)};
    @(posedge clk); #1 stq_push = 0;
  endtask

  task automatic settle();
    int n = 0;
    while ((!itq_empty || !stq_empty || busy) && n < 100) begin @(posedge clk); #1 n++; end
  endtask

  task automatic expect_atq(int fp, int ip, string what);
    check(!atq_empty, {what, ": ATQ has an entry"});
    if (!atq_empty) begin
      check(atq_rdata.fp == FBA_W'(fp) && atq_rdata.ip == IP_W'(ip), {what, ": continuation"});
      atq_pop = 1; @(posedge clk); #1 atq_pop = 0;
    end
  endtask

  task automatic get_etq(output msg_t m, input string what);
    check(!etq_empty, {what, ": ETQ has an entry"});
    m = etq_rdata;
    if (!etq_empty) begin etq_pop = 1; @(posedge clk); #1 etq_pop = 0; end
  endtask

  function automatic msg_t mk(mt_e mt, int fba, int off, int disp, logic [31:0] w0,
                              logic [31:0] w1 = '0, logic [31:0] w2 = '0);
    msg_t m = '0;
    m.hdr.node = ME; m.hdr.fba = FBA_W'(fba); m.hdr.mt = mt;
    m.hdr.off = OFF_W'(off); m.hdr.disp = DISP_W'(disp);
    m.w[0] = w0; m.w[1] = w1; m.w[2] = w2;
    return m;
  endfunction

  logic [31:0] d;
  msg_t m;
  int t0, t1;
  int cyc = 0, npop = 0;
  int pop_t [4];
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (itq_pop && npop < 4) begin pop_t[npop] = cyc; npop++; end
  end

  initial begin
    itq_push = 0; stq_push = 0; atq_pop = 0; etq_pop = 0; a_en = 0; a_we = 0;
    a_addr = '0; a_wdata = '0; itq_wdata = '0; stq_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // START: two events needed
    fm_write(12'h043, {8'd2, 24'h000123});
    send(mk(MT_START, 12'h040, 3, 10, 32'hAAAA_0001));
    settle();
    fm_read(12'h04A, d); check(d == 32'hAAAA_0001, "START stores the value");
    fm_read(12'h043, d); check(d == {8'd1, 24'h000123}, "START decrements sc");
    check(atq_empty, "no activation yet");
    send(mk(MT_STARTNV, 12'h040, 3, 11, 32'hAAAA_0002));
    settle();
    fm_read(12'h04B, d); check(d == 32'hAAAA_0002, "STARTN stores the value");
    expect_atq(12'h040, 24'h000123, "START activation");
    fm_read(12'h043, d); check(d == {8'd1, 24'h000123}, "slot left alone at activation");

    // STARTn: a signal only
    fm_write(12'h085, {8'd1, 24'h000456});
    fm_write(12'h080, 32'h1234_5678);
    send(mk(MT_STARTN, 12'h080, 5, 0, 32'hDEAD_BEEF));
    settle();
    expect_atq(12'h080, 24'h000456, "STARTn activation");
    fm_read(12'h080, d); check(d == 32'h1234_5678, "STARTn writes no value");

    // STQ tokens
    token(STQ_CONT, 12'h0C0, 24'h000777);
    settle();
    expect_atq(12'h0C0, 24'h000777, "STQ continuation");
    fm_write(12'h0C2, {8'd3, 24'h000888});
    token(STQ_SYNC, 12'h0C0, 2);
    settle();
    fm_read(12'h0C2, d); check(d == {8'd2, 24'h000888}, "STQ sync decrements");
    check(atq_empty, "STQ sync: no activation");

    // STARTr: activation, then a signal back to the sender
    fm_write(12'h101, {8'd1, 24'h000999});
    send(mk(MT_STARTR, 12'h100, 1, 2, 32'h0000_0042, {12'h3A5, 20'h00700}, 32'd9));
    settle();
    expect_atq(12'h100, 24'h000999, "STARTr activation");
    get_etq(m, "STARTr signal");
    check(m.hdr.mt == MT_STARTN && m.hdr.node == 12'h3A5 && m.hdr.fba == 20'h00700 &&
          m.hdr.off == 10'd9, "STARTr signal fields");

    // FALLOC: frame 0 first (bump allocation)
    send(mk(MT_FALLOC, 12'h500, 4, 7, 32'd20, {8'd2, 24'h000055}));
    settle();
    get_etq(m, "FALLOC reply");
    check(m.hdr.mt == MT_START && m.hdr.node == ME && m.hdr.fba == 20'h00500 &&
          m.hdr.off == 10'd4 && m.hdr.disp == 10'd7, "FALLOC reply header");
    check(m.w[0] == {ME, 20'h00000}, "FALLOC reply fp = {node, 0}");
    fm_read(0, d); check(d == {8'd2, 24'h000055}, "FALLOC initialises the slot");
    check(frames_in_use == 1, "one frame in use");
    send(mk(MT_FALLOC, 12'h500, 4, 7, 32'd64, {8'd1, 24'h000066}));
    settle();
    get_etq(m, "FALLOC reply 2");
    check(m.w[0] == {ME, 20'h00040}, "second frame at 64");
    // FDEALLOC of frame 0, then FALLOC reuses it
    send(mk(MT_FDEALLOC, 12'h000, 0, 0, 32'd20));
    settle();
    check(frames_in_use == 1, "frame freed");
    send(mk(MT_FALLOC, 12'h500, 4, 7, 32'd8, {8'd1, 24'h000077}));
    settle();
    get_etq(m, "FALLOC reply 3");
    check(m.w[0] == {ME, 20'h00000}, "freed frame reused");
    // M_FALLOC: the new frame's entry thread starts at once
    send(mk(MT_M_FALLOC, 12'h000, 0, 0, 32'd16, {8'd1, 24'h000ABC}));
    settle();
    expect_atq(12'h080, 24'h000ABC, "M_FALLOC starts main");
    check(etq_empty, "M_FALLOC sends no reply");
    // errors
    check(!err_alloc && !err_msg, "no error so far");
    send(mk(MT_FALLOC, 12'h500, 4, 7, 32'd65, '0));
    settle();
    get_etq(m, "oversize FALLOC reply");
    check(err_alloc && m.w[0] == '1, "oversize FALLOC refused");
    send(mk(MT_ILOAD, 12'h000, 0, 0, '0));
    settle();
    check(err_msg, "unknown message flagged");

    // handler timing: back-to-back STARTs
    fm_write(12'h201, {8'd9, 24'h000001});
    npop = 0;
    send(mk(MT_START, 12'h200, 1, 5, 32'd1));
    send(mk(MT_START, 12'h200, 1, 6, 32'd2));
    repeat (30) @(posedge clk);
    #1 t0 = pop_t[0]; t1 = pop_t[1];
    check(t1 - t0 == 3, "a decrementing START takes 3 cycles");
    fm_write(12'h241, {8'd1, 24'h000002});
    fm_write(12'h281, {8'd1, 24'h000003});
    npop = 0;
    send(mk(MT_STARTN, 12'h240, 1, 0, 0));
    send(mk(MT_STARTN, 12'h280, 1, 0, 0));
    repeat (30) @(posedge clk);
    #1 t0 = pop_t[0]; t1 = pop_t[1];
    check(t1 - t0 == 4, "an activating START takes 4 cycles");
    expect_atq(12'h240, 2, "timing activation 1");
    expect_atq(12'h280, 3, "timing activation 2");

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
