// tb_nimu_sm -- self-checking test of the Structured Memory handler.
//
// Plays the router: it inserts SM requests into the request queue and takes
// the answers from the answer queue. It checks HALLOC (clearing and the
// returned address), I-structure reads of empty words being deferred and
// all answered by the later ISTORE, reads of full words answered at once
// (2 cycles after they are taken), ISTORE's signal and ISTOREr's silence,
// HDEALLOC and reuse of the block, and each error flag.
module tb_nimu_sm;
  import davrid_pkg::*;
  localparam int unsigned SM_AW = 12, BLK_LOG = 6, DEF_N = 4;
  localparam logic [CLUSTER_W-1:0] CID = 10'h2A5;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic in_push, in_pop, in_full, in_empty, out_push, out_pop, out_full, out_empty;
  msg_t in_wdata, in_rdata, out_wdata, out_rdata;
  logic [4:0] c0, c1;
  logic busy, err_istore, err_alloc, err_defer, err_msg;

  msg_fifo #(.WIDTH(MSG_W), .DEPTH(16)) u_in (.clk, .rst_n, .push(in_push), .wdata(in_wdata),
    .pop(in_pop), .rdata(in_rdata), .full(in_full), .empty(in_empty), .count(c0));
  msg_fifo #(.WIDTH(MSG_W), .DEPTH(16)) u_out (.clk, .rst_n, .push(out_push), .wdata(out_wdata),
    .pop(out_pop), .rdata(out_rdata), .full(out_full), .empty(out_empty), .count(c1));

  nimu_sm #(.SM_AW(SM_AW), .BLK_LOG(BLK_LOG), .DEF_N(DEF_N)) dut (
    .clk, .rst_n, .cluster_id(CID),
    .in_rdata, .in_empty, .in_pop, .out_push, .out_wdata, .out_full,
    .busy, .err_istore, .err_alloc, .err_defer, .err_msg
  );

  always #5 clk = ~clk;

  int cyc = 0, t_pop = 0, t_push = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_pop) t_pop = cyc;
    if (out_push) t_push = cyc;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic msg_t req(mt_e mt, int addr, int off, int disp,
                               logic [31:0] w0, logic [31:0] w1 = '0);
    msg_t m = '0;
    m.hdr.node = {CID, 2'b00}; m.hdr.fba = FBA_W'(addr); m.hdr.mt = mt;
    m.hdr.off = OFF_W'(off); m.hdr.disp = DISP_W'(disp);
    m.w[0] = w0; m.w[1] = w1;
    return m;
  endfunction

  task automatic send(msg_t m);
    in_push = 1; in_wdata = m;
    @(posedge clk); #1 in_push = 0;
  endtask

  task automatic settle();
    int n = 0;
    while ((!in_empty || busy) && n < 300) begin @(posedge clk); #1 n++; end
  endtask

  task automatic expect_start(mt_e mt, logic [31:0] who, int off, int disp, logic [31:0] v,
                              string what);
    check(!out_empty, {what, ": answer present"});
    if (!out_empty) begin
      check(out_rdata.hdr.mt == mt && out_rdata.hdr.node == who[31:20] &&
            out_rdata.hdr.fba == who[19:0] && out_rdata.hdr.off == OFF_W'(off), {what, ": header"});
      if (mt == MT_START)
        check(out_rdata.hdr.disp == DISP_W'(disp) && out_rdata.w[0] == v, {what, ": value"});
      out_pop = 1; @(posedge clk); #1 out_pop = 0;
    end
  endtask

  localparam logic [31:0] A = {12'h155, 20'h00300};
  localparam logic [31:0] B = {12'h156, 20'h00400};
  localparam logic [31:0] C = {12'h157, 20'h00500};
  logic [31:0] base;

  initial begin
    in_push = 0; out_pop = 0; in_wdata = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // HALLOC: 10 words, cleared, address {cluster, 00, base}
    send(req(MT_HALLOC, 0, 2, 3, A, 32'd10));
    settle();
    base = {CID, 2'b00, 20'h00000};
    expect_start(MT_START, A, 2, 3, base, "HALLOC reply");
    check(t_push - t_pop == 12, "HALLOC of 10 words takes 12 cycles");

    // two reads of an empty word wait
    send(req(MT_ILOAD, 1, 4, 5, A));
    send(req(MT_ILOAD, 1, 6, 7, B));
    settle();
    check(out_empty, "reads of an empty word wait");
    // the write answers both (newest first), then signals the writer
    send(req(MT_ISTORE, 1, 8, 0, C, 32'h0000_0077));
    settle();
    expect_start(MT_START, B, 6, 7, 32'h77, "deferred read B");
    expect_start(MT_START, A, 4, 5, 32'h77, "deferred read A");
    expect_start(MT_STARTN, C, 8, 0, 0, "ISTORE signal");
    check(out_empty, "nothing else");
    // a read of a full word answers at once
    send(req(MT_ILOAD, 1, 9, 10, A));
    settle();
    expect_start(MT_START, A, 9, 10, 32'h77, "read of a full word");
    check(t_push - t_pop == 2, "full-word read answered 2 cycles after it is taken");
    // ISTOREr: no signal
    send(req(MT_ISTORER, 2, 0, 0, C, 32'h5));
    settle();
    check(out_empty, "ISTOREr sends nothing");
    send(req(MT_ILOAD, 2, 1, 1, B));
    settle();
    expect_start(MT_START, B, 1, 1, 32'h5, "read after ISTOREr");
    // errors
    check(!err_istore && !err_alloc && !err_defer && !err_msg, "no error so far");
    send(req(MT_ISTORE, 1, 8, 0, C, 32'h99));
    settle();
    expect_start(MT_STARTN, C, 8, 0, 0, "second ISTORE signal");
    check(err_istore, "second write flagged");
    send(req(MT_HALLOC, 0, 2, 3, A, 32'd65));
    settle();
    expect_start(MT_START, A, 2, 3, 32'hFFFF_FFFF, "oversize HALLOC refused");
    check(err_alloc, "oversize HALLOC flagged");
    // HDEALLOC and reuse
    send(req(MT_HALLOC, 0, 2, 3, A, 32'd5));
    settle();
    expect_start(MT_START, A, 2, 3, {CID, 2'b00, 20'h00040}, "second block at 64");
    send(req(MT_HDEALLOC, 0, 0, 0, '0));
    send(req(MT_HALLOC, 0, 2, 3, A, 32'd64));
    settle();
    expect_start(MT_START, A, 2, 3, base, "freed block reused");
    // deferred-cell pool: four fit, the fifth is flagged
    for (int i = 0; i < 5; i++) send(req(MT_ILOAD, 20 + i, 0, 0, A));
    settle();
    check(err_defer, "deferred pool exhaustion flagged");
    send(req(MT_START, 0, 0, 0, A));
    settle();
    check(err_msg, "unknown message flagged");

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
