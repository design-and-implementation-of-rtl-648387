// tb_nimu_router -- self-checking test of the NIMU message router.
//
// The ETQs, the network input and the SM answer queue are modelled as
// SystemVerilog queues; every destination (four ITQs, SM queue, network
// output, host) refuses at random. Random messages of every kind are tagged
// in body word 3 and a scoreboard checks that each arrives exactly once, at
// the destination the routing rules give, and in order per source and
// destination. Directed parts check frame allocations going to the least
// loaded node and moving the load table, deallocations lowering it, SM
// answers taking precedence, and one message per cycle when nothing blocks.
module tb_nimu_router;
  import davrid_pkg::*;
  localparam int unsigned N = 4;
  localparam logic [CLUSTER_W-1:0] CID = 10'h011;
  typedef enum int {DST_ITQ0, DST_ITQ1, DST_ITQ2, DST_ITQ3, DST_SM, DST_NET, DST_HOST} dst_e;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  msg_t etq_rdata [N];
  logic [N-1:0] etq_empty, etq_pop, itq_push, itq_full;
  msg_t itq_wdata, sm_wdata, smr_rdata, net_in_data, net_out_data, host_data;
  logic sm_push, sm_full, smr_empty, smr_pop;
  logic net_in_valid, net_in_ready, net_out_valid, net_out_ready, host_valid, host_ready;
  logic [FBA_W:0] load [N];

  nimu_router #(.NNODES(N)) dut (.*, .cluster_id(CID));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // sources: 0..3 ETQs, 4 network, 5 SM answers
  msg_t src_q [6][$];
  always_comb begin
    for (int i = 0; i < N; i++) begin
      etq_empty[i] = (src_q[i].size() == 0);
      etq_rdata[i] = etq_empty[i] ? '0 : src_q[i][0];
    end
    net_in_valid = (src_q[4].size() != 0);
    net_in_data  = net_in_valid ? src_q[4][0] : '0;
    smr_empty    = (src_q[5].size() == 0);
    smr_rdata    = smr_empty ? '0 : src_q[5][0];
  end

  // expected destination and arrival bookkeeping
  int exp_dst [int];
  int exp_src [int];
  int seen [int];
  int last_tag [6][7];
  int moved_this_cycle;
  int n_seen = 0;

  function automatic dst_e route(msg_t m);
    if (m.hdr.mt inside {MT_ILOAD, MT_ISTORE, MT_ISTORER, MT_HALLOC, MT_HDEALLOC})
      return (m.hdr.node[11:2] == CID) ? DST_SM : DST_NET;
    if (m.hdr.mt inside {MT_HOST_OUT1, MT_HOST_OUT2}) return DST_HOST;
    if (m.hdr.node[11:2] == CID) return dst_e'(m.hdr.node[1:0]);
    return DST_NET;
  endfunction

  task automatic arrive(msg_t m, dst_e d);
    int tag = int'(m.w[3]);
    n_seen++;
    moved_this_cycle++;
    check(exp_dst.exists(tag), "known message");
    if (exp_dst.exists(tag)) begin
      if (!(m.hdr.mt inside {MT_FALLOC, MT_M_FALLOC}))
        check(exp_dst[tag] == int'(d), "destination");
      check(!seen.exists(tag), "delivered once");
      seen[tag] = 1;
      check(tag > last_tag[exp_src[tag]][d], "order per source and destination");
      last_tag[exp_src[tag]][d] = tag;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    moved_this_cycle = 0;
    for (int i = 0; i < N; i++) if (itq_push[i]) begin
      check(!itq_full[i], "no push into a full ITQ");
      arrive(itq_wdata, dst_e'(i));
    end
    if (sm_push) begin check(!sm_full, "no push into a full SM queue"); arrive(sm_wdata, DST_SM); end
    if (net_out_valid && net_out_ready) arrive(net_out_data, DST_NET);
    if (host_valid && host_ready) arrive(host_data, DST_HOST);
    check(moved_this_cycle <= 1, "one message per cycle");
    for (int i = 0; i < N; i++) if (etq_pop[i]) void'(src_q[i].pop_front());
    if (net_in_valid && net_in_ready) void'(src_q[4].pop_front());
    if (smr_pop) void'(src_q[5].pop_front());
  end

  int next_tag = 1;
  task automatic inject(int src, msg_t m);
    m.w[3] = next_tag;
    exp_dst[next_tag] = int'(route(m));
    exp_src[next_tag] = src;
    next_tag++;
    src_q[src].push_back(m);
  endtask

  function automatic msg_t rnd_msg();
    msg_t m = '0;
    int k = $urandom_range(0, 5);
    m.hdr.node = {($urandom_range(0, 3) == 0) ? 10'h012 : CID, 2'($urandom_range(0, 3))};
    case (k)
      0, 1: m.hdr.mt = MT_START;
      2:    m.hdr.mt = MT_STARTN;
      3:    m.hdr.mt = MT_ILOAD;
      4:    m.hdr.mt = MT_ISTORE;
      default: m.hdr.mt = MT_HOST_OUT1;
    endcase
    m.hdr.fba = FBA_W'($urandom);
    return m;
  endfunction

  task automatic drain(int limit);
    int n = 0;
    while (n < limit) begin
      bit busy = 0;
      for (int i = 0; i < 6; i++) if (src_q[i].size() != 0) busy = 1;
      if (!busy) break;
      @(posedge clk); #1 n++;
    end
  endtask

  msg_t m;
  int t0;
  initial begin
    itq_full = '0; sm_full = 0; net_out_ready = 1; host_ready = 1;
    for (int s = 0; s < 6; s++) for (int d = 0; d < 7; d++) last_tag[s][d] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // throughput: 12 messages to distinct free destinations, nothing blocked
    for (int i = 0; i < 12; i++) begin
      m = '0; m.hdr.mt = MT_START; m.hdr.node = {CID, 2'(i)};
      inject(i % 4, m);
    end
    t0 = n_seen;
    repeat (12) @(posedge clk);
    #1 check(n_seen - t0 == 12, "12 messages in 12 cycles");

    // SM answers go first
    m = '0; m.hdr.mt = MT_START; m.hdr.node = {CID, 2'd1};
    inject(0, m);
    m.hdr.node = {CID, 2'd2};
    inject(5, m);
    @(posedge clk); #1;
    check(src_q[5].size() == 0 && src_q[0].size() == 1, "SM answer first");
    drain(20);

    // allocation: to the least loaded node, load table follows
    for (int i = 0; i < N; i++) check(load[i] == 0, "load starts at 0");
    m = '0; m.hdr.mt = MT_FALLOC; m.hdr.node = {CID, 2'd3}; m.w[0] = 100;
    inject(1, m); drain(20);
    check(load[0] == 100, "first allocation to node 0");
    m.w[0] = 50; inject(1, m); drain(20);
    check(load[1] == 50, "second allocation to node 1");
    m.w[0] = 70; inject(2, m); drain(20);
    check(load[2] == 70, "third allocation to node 2");
    m.w[0] = 10; inject(3, m); drain(20);
    check(load[3] == 10, "fourth allocation to node 3");
    m.w[0] = 5; inject(0, m); drain(20);
    check(load[3] == 15, "fifth allocation to the least loaded node 3");
    m = '0; m.hdr.mt = MT_FDEALLOC; m.hdr.node = {CID, 2'd0}; m.w[0] = 100;
    inject(2, m); drain(20);
    check(load[0] == 0, "deallocation lowers the load");

    // a blocked ITQ does not hold up other destinations
    itq_full = 4'b0010;
    m = '0; m.hdr.mt = MT_START; m.hdr.node = {CID, 2'd1}; inject(0, m);
    m.hdr.node = {CID, 2'd2}; inject(1, m);
    repeat (3) @(posedge clk); #1;
    check(src_q[0].size() == 1 && src_q[1].size() == 0, "blocked ITQ bypassed");
    itq_full = '0;
    drain(20);

    // random traffic with random back-pressure
    fork
      begin
        for (int n = 0; n < 400; n++) begin
          inject($urandom_range(0, 5), rnd_msg());
          if ($urandom_range(0, 1) == 1) begin @(posedge clk); #1; end
        end
      end
      begin
        repeat (1500) begin
          @(posedge clk); #1;
          itq_full = 4'($urandom); sm_full = $urandom_range(0, 1) == 1;
          net_out_ready = $urandom_range(0, 2) != 0; host_ready = $urandom_range(0, 1) == 1;
        end
      end
    join
    itq_full = '0; sm_full = 0; net_out_ready = 1; host_ready = 1;
    drain(100);
    check(seen.num() == next_tag - 1, "every message delivered");

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
