// tb_nimu -- self-checking test of the NIMU (router, SM handler, load table).
//
// The four nodes' ETQs are SystemVerilog queues and the ITQs are always
// ready; every message the NIMU delivers is captured per destination. The
// test allocates an SM block from node 1, defers an I-structure read from
// node 2, writes the word from node 3 and checks the deferred answer at
// node 2 and the write signal at node 3; it then checks routing of an SM
// request for another cluster to the network, of a network message to a
// local node, of a host message, and the spreading of frame allocations.
module tb_nimu;
  import davrid_pkg::*;
  localparam int unsigned N = 4;
  localparam logic [CLUSTER_W-1:0] CID = 10'h003;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  msg_t etq_rdata [N];
  logic [N-1:0] etq_empty, etq_pop, itq_push, itq_full;
  msg_t itq_wdata, net_in_data, net_out_data, host_data;
  logic net_in_valid, net_in_ready, net_out_valid, net_out_ready, host_valid, host_ready;
  logic [FBA_W:0] load [N];
  logic sm_busy, err_istore, err_alloc, err_defer, err_msg;

  nimu #(.NNODES(N), .SM_AW(12), .SM_BLK_LOG(6), .DEF_N(8)) dut (.*, .cluster_id(CID));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  msg_t etq_q [N][$];
  msg_t itq_got [N][$];
  msg_t net_got [$];
  msg_t host_got [$];
  always_comb for (int i = 0; i < N; i++) begin
    etq_empty[i] = (etq_q[i].size() == 0);
    etq_rdata[i] = etq_empty[i] ? '0 : etq_q[i][0];
  end
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (etq_pop[i]) void'(etq_q[i].pop_front());
      if (itq_push[i]) itq_got[i].push_back(itq_wdata);
    end
    if (net_out_valid && net_out_ready) net_got.push_back(net_out_data);
    if (host_valid && host_ready) host_got.push_back(host_data);
    if (net_in_valid && net_in_ready) net_in_valid <= 1'b0;
  end

  function automatic logic [31:0] who(int n, int fba);
    return {CID, 2'(n), 20'(fba)};
  endfunction

  function automatic msg_t smreq(mt_e mt, logic [CLUSTER_W-1:0] c, int addr, int off, int disp,
                                 logic [31:0] w0, logic [31:0] w1);
    msg_t m = '0;
    m.hdr.node = {c, 2'b00}; m.hdr.fba = FBA_W'(addr); m.hdr.mt = mt;
    m.hdr.off = OFF_W'(off); m.hdr.disp = DISP_W'(disp); m.w[0] = w0; m.w[1] = w1;
    return m;
  endfunction

  task automatic run(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  msg_t m;
  logic [31:0] sm_base;
  initial begin
    itq_full = '0; net_out_ready = 1; host_ready = 1; net_in_valid = 0; net_in_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // node 1 allocates 8 SM words
    etq_q[1].push_back(smreq(MT_HALLOC, CID, 0, 3, 4, who(1, 'h100), 8));
    run(30);
    check(itq_got[1].size() == 1, "HALLOC answered to node 1");
    m = itq_got[1].pop_front();
    check(m.hdr.mt == MT_START && m.hdr.fba == 20'h00100 && m.hdr.off == 3 && m.hdr.disp == 4,
          "HALLOC answer slot");
    sm_base = m.w[0];
    check(sm_base[31:22] == CID, "SM address carries the cluster");
    // node 2 reads word 5 before anyone writes it
    etq_q[2].push_back(smreq(MT_ILOAD, CID, int'(sm_base[19:0]) + 5, 1, 2, who(2, 'h200), 0));
    run(10);
    check(itq_got[2].size() == 0, "read of an empty word waits");
    // node 3 writes it
    etq_q[3].push_back(smreq(MT_ISTORE, CID, int'(sm_base[19:0]) + 5, 6, 0, who(3, 'h300), 32'hFACE));
    run(15);
    check(itq_got[2].size() == 1 && itq_got[2][0].w[0] == 32'hFACE &&
          itq_got[2][0].hdr.fba == 20'h00200, "deferred read answered at node 2");
    check(itq_got[3].size() == 1 && itq_got[3][0].hdr.mt == MT_STARTN &&
          itq_got[3][0].hdr.off == 6, "write signal at node 3");
    itq_got[2].delete(); itq_got[3].delete();
    // SM request for another cluster goes to the network
    etq_q[0].push_back(smreq(MT_ILOAD, 10'h004, 7, 0, 0, who(0, 1), 0));
    // network message for local node 2
    net_in_data = mk_start(MT_START, {CID, 2'd2}, 20'h00777, 1, 1, 32'd5);
    net_in_valid = 1;
    // host message
    m = '0; m.hdr.mt = MT_HOST_OUT1; m.w[0] = 32'h1234;
    etq_q[1].push_back(m);
    run(10);
    check(net_got.size() == 1 && net_got[0].hdr.node == {10'h004, 2'b00} &&
          net_got[0].hdr.mt == MT_ILOAD, "remote SM request to the network");
    check(itq_got[2].size() == 1 && itq_got[2][0].hdr.fba == 20'h00777, "network to local node");
    check(host_got.size() == 1 && host_got[0].w[0] == 32'h1234, "host message");
    // frame allocations spread over the nodes
    for (int i = 0; i < 4; i++) begin
      m = '0; m.hdr.mt = MT_FALLOC; m.hdr.node = {CID, 2'd0}; m.w[0] = 32'(10 + i);
      etq_q[0].push_back(m);
    end
    run(10);
    for (int i = 0; i < N; i++) begin
      int n_alloc;
      n_alloc = 0;
      for (int k = 0; k < itq_got[i].size(); k++) if (itq_got[i][k].hdr.mt == MT_FALLOC) n_alloc++;
      check(n_alloc == 1, "one allocation per node");
      check(load[i] == 21'(10 + i), "load table");
    end
    check(!err_istore && !err_alloc && !err_defer && !err_msg, "no error");
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
