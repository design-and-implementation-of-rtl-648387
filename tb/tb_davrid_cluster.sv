// tb_davrid_cluster -- end-to-end test of a DAVRID cluster at its default size.
//
// Four tpu_model instances stand in for the nodes' processors and run one
// multithreaded program (see tpu_model): the host starts the main function
// with M_FALLOC through the network port; the main thread allocates an
// I-structure array in the SM and K worker frames spread over the nodes by
// the load balancer; it asks for every array element before any is written,
// so all those reads wait in deferred lists; each worker writes its element
// (ISTORE with a signal back), returns its value with STARTr and frees its
// frame; the main threads gather the values both ways, plus one value from
// another cluster's SM that this test answers in place of the network, and
// report to the host, which checks the sums against its own arithmetic.
// A second phase holds the network output while a sink thread sends more
// remote stores than its ETQ holds (the TPU must wait), then floods the sink's
// ITQ through the network port, to show back-pressure reaching the network.
//
// Each mechanism the design has is counted and must occur at least once:
// thread activations, counter decrements, STQ syncs and continuations,
// allocation on more than one node, M_FALLOC, deferred I-structure answers,
// STARTr and ISTORE signals, HALLOC, HDEALLOC, frame deallocation, network
// out and in, host messages, TPU waits on the ETQ insert port, a held network
// output, and ITQ back-pressure on the network input. At the end every frame and SM block is
// free and no error flag is set.
module tb_davrid_cluster;
  import davrid_pkg::*;
  localparam int N = 4;
  localparam int K = 6;
  localparam int QD = 512;          // the cluster's default queue depth
  localparam logic [CLUSTER_W-1:0] CID = 10'h021;
  localparam logic [31:0] REMOTE_VAL = 32'h0000_5A5A;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [N-1:0] tpu_atq_pop, tpu_atq_empty, tpu_stq_push, tpu_stq_full;
  logic [N-1:0] tpu_etq_push, tpu_etq_ready, tpu_fm_en, tpu_fm_we;
  cont_t tpu_atq_rdata [N];
  stq_t  tpu_stq_wdata [N];
  msg_t  tpu_etq_wdata [N];
  logic [FBA_W-1:0]  tpu_fm_addr [N];
  logic [WORD_W-1:0] tpu_fm_wdata [N], tpu_fm_rdata [N];
  logic net_in_valid, net_in_ready, net_out_valid, net_out_ready, host_valid, host_ready;
  msg_t net_in_data, net_out_data, host_data;
  logic [N-1:0] su_busy;
  logic sm_busy;
  logic [FBA_W-DISP_W:0] frames_in_use [N];
  logic [FBA_W:0] load [N];
  logic err_su_alloc, err_su_msg, err_istore, err_sm_alloc, err_defer, err_sm_msg;

  davrid_cluster dut (.*, .cluster_id(CID));

  int n_threads [N], n_etq_waits [N], n_stq_sync [N], n_stq_cont [N], n_unknown [N];

  for (genvar i = 0; i < N; i++) begin : g_tpu
    tpu_model #(.FM_AW(FBA_W), .K(K), .NREMOTE(QD + 16)) u_tpu (
      .clk, .rst_n, .node_id({CID, 2'(i)}),
      .atq_pop(tpu_atq_pop[i]), .atq_rdata(tpu_atq_rdata[i]), .atq_empty(tpu_atq_empty[i]),
      .stq_push(tpu_stq_push[i]), .stq_wdata(tpu_stq_wdata[i]), .stq_full(tpu_stq_full[i]),
      .etq_push(tpu_etq_push[i]), .etq_wdata(tpu_etq_wdata[i]), .etq_ready(tpu_etq_ready[i]),
      .fm_en(tpu_fm_en[i]), .fm_we(tpu_fm_we[i]), .fm_addr(tpu_fm_addr[i]),
      .fm_wdata(tpu_fm_wdata[i]), .fm_rdata(tpu_fm_rdata[i]),
      .n_threads(n_threads[i]), .n_etq_waits(n_etq_waits[i]), .n_stq_sync(n_stq_sync[i]),
      .n_stq_cont(n_stq_cont[i]), .n_unknown(n_unknown[i])
    );
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------ network and host models
  msg_t net_q [$];
  msg_t host_got [$];
  int n_net_out = 0, n_net_in = 0, n_net_stall = 0, n_net_out_stall = 0;
  assign net_in_valid = (net_q.size() != 0);
  assign net_in_data  = net_in_valid ? net_q[0] : '0;
  logic net_hold = 1'b0;
  assign net_out_ready = !net_hold;
  assign host_ready    = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (net_in_valid && net_in_ready) begin void'(net_q.pop_front()); n_net_in++; end
    if (net_in_valid && !net_in_ready) n_net_stall++;
    if (host_valid) host_got.push_back(host_data);
    if (net_out_valid) begin
      n_net_out++;
      // the other cluster's SM answers the read at once
      if (net_out_data.hdr.mt == MT_ILOAD)
        net_q.push_back(mk_start(MT_START, net_out_data.w[0][31:20], net_out_data.w[0][19:0],
                                 net_out_data.hdr.off, net_out_data.hdr.disp, REMOTE_VAL));
    end
  end

  // ------------------------------------------------ mechanism counters
  int n_act = 0, n_sync_msgs = 0, n_startr_sig, n_defer_ans = 0;
  int n_halloc = 0, n_hdealloc = 0, n_dealloc = 0, n_m_falloc = 0, n_istore_sig = 0;
  bit node_had_frame [N];
  always @(posedge clk) if (rst_n) begin
    n_act += $countones(tpu_atq_pop);
    for (int i = 0; i < N; i++) begin
      if (dut.itq_push[i] && dut.itq_wdata.hdr.mt inside {MT_START, MT_STARTN, MT_STARTNV, MT_STARTR})
        n_sync_msgs++;
      if (dut.itq_push[i] && is_dealloc_msg(dut.itq_wdata.hdr.mt)) n_dealloc++;
      if (dut.itq_push[i] && dut.itq_wdata.hdr.mt == MT_M_FALLOC) n_m_falloc++;
      if (frames_in_use[i] != 0) node_had_frame[i] = 1;
    end
    if (dut.u_nimu.u_sm.cell_free) n_defer_ans++;
    if (dut.u_nimu.u_sm.out_push && dut.u_nimu.u_sm.out_wdata.hdr.mt == MT_STARTN) n_istore_sig++;
    if (!net_out_ready && !(&dut.etq_empty)) n_net_out_stall++;
    if (dut.u_nimu.sm_push && dut.u_nimu.sm_wdata.hdr.mt == MT_HALLOC) n_halloc++;
    if (dut.u_nimu.sm_push && dut.u_nimu.sm_wdata.hdr.mt == MT_HDEALLOC) n_hdealloc++;
  end

  // STARTr signals: the only STARTn an SU sends
  int n_startr_node [N];
  for (genvar i = 0; i < N; i++) begin : g_sig
    initial n_startr_node[i] = 0;
    always @(posedge clk)
      if (rst_n && dut.g_node[i].u_node.su_etq_push && dut.g_node[i].u_node.su_etq_wdata.hdr.mt == MT_STARTN)
        n_startr_node[i]++;
  end
  assign n_startr_sig = n_startr_node[0] + n_startr_node[1] + n_startr_node[2] + n_startr_node[3];

  task automatic mechanism(string name, int count);
    $display("  %-28s %0d", name, count);
    check(count > 0, {"mechanism happened: ", name});
  endtask

  function automatic msg_t m_falloc(int size, int ip);
    msg_t m = '0;
    m.hdr.node = {CID, 2'b00}; m.hdr.mt = MT_M_FALLOC; m.hdr.s = 4'd2;
    m.w[0] = 32'(size); m.w[1] = {8'd1, IP_W'(ip)};
    return m;
  endfunction

  task automatic wait_host(int n, int limit);
    int c = 0;
    while (host_got.size() < n && c < limit) begin @(posedge clk); c++; end
  endtask

  int expect_sum;
  int cycles_main;
  msg_t m;
  logic [31:0] sink;

  initial begin
    for (int i = 0; i < N; i++) node_had_frame[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;

    // ---------------- phase 1: the program
    expect_sum = 0;
    for (int i = 0; i < K; i++) expect_sum += i * i + 3;
    net_q.push_back(m_falloc(128, 1));
    cycles_main = 0;
    while (host_got.size() < 2 && cycles_main < 20000) begin @(posedge clk); cycles_main++; end
    check(host_got.size() >= 2, "program finished");
    if (host_got.size() >= 2) begin
      m = host_got[0];
      check(m.hdr.mt == MT_HOST_OUT1, "first host message is the result");
      check(m.w[0] == 32'(expect_sum), "sum of the I-structure array");
      check(m.w[1] == 32'(expect_sum), "sum of the STARTr values");
      check(m.w[2] == REMOTE_VAL, "value from the remote cluster");
      m = host_got[1];
      check(m.hdr.mt == MT_HOST_OUT2 && m.w[0] == 1, "program end reported");
    end
    repeat (50) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) check(frames_in_use[i] == 0, "all frames freed");
    check(dut.u_nimu.u_sm.blk_in_use == 0, "SM block freed");
    check(dut.u_nimu.u_sm.cells_in_use == 0, "no deferred read left");
    $display("program took %0d cycles", cycles_main);

    // ---------------- phase 2: flood one node's ITQ from the network, and
    // hold the network output so that the sink's remote stores fill its ETQ
    net_hold = 1'b1;
    net_q.push_back(m_falloc(16, 12));
    wait_host(3, 2000);
    begin
      int c = 0;
      while (n_etq_waits[0] + n_etq_waits[1] + n_etq_waits[2] + n_etq_waits[3] == 0 && c < 5000) begin
        @(posedge clk); c++;
      end
      repeat (20) @(posedge clk);
    end
    #1 net_hold = 1'b0;
    check(host_got.size() == 3 && host_got[2].w[0] == 2, "sink thread started");
    sink = host_got[2].w[1];
    for (int i = 0; i < QD + 60; i++)
      net_q.push_back(mk_start(MT_STARTN, sink[31:20], sink[19:0], OFF_W'(1 + i % 4), 0, '0));
    begin
      int c = 0;
      int idle = 0;
      while ((net_q.size() != 0 || idle < 10) && c < 10000) begin
        @(posedge clk); c++;
        idle = (|su_busy) ? 0 : idle + 1;
      end
    end
    m = '0; m.hdr.node = sink[31:20]; m.hdr.fba = sink[19:0]; m.hdr.mt = MT_FDEALLOC; m.w[0] = 16;
    net_q.push_back(m);
    repeat (50) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) check(frames_in_use[i] == 0, "sink frame freed");
    for (int i = 0; i < N; i++) check(load[i] == 0, "load table back to zero");

    // ---------------- mechanisms
    $display("mechanisms:");
    mechanism("thread activations", n_act);
    mechanism("counter decrements", n_sync_msgs + n_stq_sync[0] + n_stq_sync[1] + n_stq_sync[2]
              + n_stq_sync[3] - n_act);
    mechanism("STQ syncs (STARTl)", n_stq_sync[0] + n_stq_sync[1] + n_stq_sync[2] + n_stq_sync[3]);
    mechanism("STQ continuations (STARTd)", n_stq_cont[0] + n_stq_cont[1] + n_stq_cont[2] + n_stq_cont[3]);
    mechanism("nodes given frames", int'(node_had_frame[0]) + int'(node_had_frame[1]) +
              int'(node_had_frame[2]) + int'(node_had_frame[3]) - 1);
    mechanism("M_FALLOC", n_m_falloc);
    mechanism("deferred I-structure answers", n_defer_ans);
    mechanism("ISTORE signals", n_istore_sig);
    mechanism("STARTr signals", n_startr_sig);
    mechanism("HALLOC", n_halloc);
    mechanism("HDEALLOC", n_hdealloc);
    mechanism("frame deallocations", n_dealloc);
    mechanism("network out", n_net_out);
    mechanism("network in", n_net_in);
    mechanism("host messages", host_got.size());
    mechanism("TPU waits on the ETQ port", n_etq_waits[0] + n_etq_waits[1] + n_etq_waits[2] + n_etq_waits[3]);
    mechanism("ITQ back-pressure on network", n_net_stall);
    mechanism("network output held", n_net_out_stall);
    check(n_net_out == 1 + QD + 16, "every remote message left through the network");
    check(n_istore_sig == K, "one signal per ISTORE");
    check(n_defer_ans == K, "every array read was deferred and answered");
    check(n_startr_sig == K, "one signal per STARTr");
    check(n_halloc == 1 && n_hdealloc == 1, "one SM block allocated and freed");
    check(n_dealloc == K + 2, "all worker, main and sink frames freed");
    for (int i = 0; i < N; i++) check(n_unknown[i] == 0, "no unknown thread");
    check(!err_su_alloc && !err_su_msg && !err_istore && !err_sm_alloc && !err_defer && !err_sm_msg,
          "no error flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
