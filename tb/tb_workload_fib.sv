// tb_workload_fib -- the recursive Fibonacci benchmark on one default-size cluster.
//
// Four tpu_model instances run the doubly recursive fib(n) with n = 15, the
// argument of the benchmark: every call is a frame of its own, allocated with
// FALLOC wherever the NIMU's load table sends it; a call with n >= 2 allocates
// two child frames, sends each its argument, its parent's frame and the slot
// to answer into, and adds the two answers when both have arrived; a call with
// n < 2 answers n at once. Every frame is freed by its own last thread. The
// main thread is started by M_FALLOC through the network port and reports
// the result to the host.
//
// Checked: the result (fib(15) = 610, computed here independently), the
// number of frame allocations (2*fib(n+1) - 1 calls plus main), that all
// four nodes received frames, that every frame is freed, and that no error
// flag is set. Printed: cycles, threads run per node, the largest number of
// frames held at once, and the fraction of cycles each unit was busy.
module tb_workload_fib;
  import davrid_pkg::*;
  localparam int N = 4;
  localparam int FIB_N = 15;
  localparam logic [CLUSTER_W-1:0] CID = 10'h003;

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
    tpu_model #(.FM_AW(FBA_W), .FIB_N(FIB_N)) u_tpu (
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

  function automatic int fib(int n);
    int a = 0, b = 1, t;
    for (int i = 0; i < n; i++) begin t = a + b; a = b; b = t; end
    return a;
  endfunction

  // network: only the start message comes in; host: collect
  msg_t start_msg;
  logic started = 1'b0;
  assign net_in_valid  = started;
  assign net_in_data   = start_msg;
  assign net_out_ready = 1'b1;
  assign host_ready    = 1'b1;
  always @(posedge clk) if (net_in_valid && net_in_ready) started <= 1'b0;

  msg_t host_got [$];
  int n_falloc = 0, n_net_out = 0, max_frames = 0, cycles = 0, busy_nimu = 0;
  int busy_su [N], busy_tpu [N], first_frame [N];
  always @(posedge clk) if (rst_n) begin
    int f;
    f = 0;
    cycles++;
    if (host_valid) host_got.push_back(host_data);
    if (net_out_valid) n_net_out++;
    for (int i = 0; i < N; i++) begin
      if (dut.itq_push[i] && dut.itq_wdata.hdr.mt == MT_FALLOC) n_falloc++;
      if (su_busy[i]) busy_su[i]++;
      if (tpu_fm_en[i] || tpu_etq_push[i] || tpu_stq_push[i]) busy_tpu[i]++;
      if (frames_in_use[i] != 0) first_frame[i] = 1;
      f += int'(frames_in_use[i]);
    end
    if (dut.u_nimu.u_router.sel_valid) busy_nimu++;
    if (f > max_frames) max_frames = f;
  end

  initial begin
    for (int i = 0; i < N; i++) begin busy_su[i] = 0; busy_tpu[i] = 0; first_frame[i] = 0; end
    start_msg = '0;
    start_msg.hdr.node = {CID, 2'b00}; start_msg.hdr.mt = MT_M_FALLOC; start_msg.hdr.s = 4'd2;
    start_msg.w[0] = 16; start_msg.w[1] = {8'd1, 24'd24};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    started = 1'b1;
    while (host_got.size() == 0 && cycles < 400000) @(posedge clk);
    repeat (100) @(posedge clk);
    #1;
    check(host_got.size() == 1, "one result");
    if (host_got.size() >= 1) begin
      check(host_got[0].hdr.mt == MT_HOST_OUT1 && host_got[0].w[0] == 3, "result message");
      check(host_got[0].w[1] == 32'(fib(FIB_N)), "fib(n)");
      $display("fib(%0d) = %0d (expected %0d)", FIB_N, host_got[0].w[1], fib(FIB_N));
    end
    check(n_falloc == 2 * fib(FIB_N + 1) - 1, "one frame allocation per call");
    for (int i = 0; i < N; i++) check(first_frame[i] == 1, "every node got frames");
    for (int i = 0; i < N; i++) check(frames_in_use[i] == 0, "every frame freed");
    for (int i = 0; i < N; i++) check(load[i] == 0, "load table back to zero");
    for (int i = 0; i < N; i++) check(n_unknown[i] == 0, "no unknown thread");
    check(n_net_out == 0, "nothing left the cluster");
    check(!err_su_alloc && !err_su_msg && !err_istore && !err_sm_alloc && !err_defer && !err_sm_msg,
          "no error flag");
    $display("calls %0d, cycles %0d, most frames held at once %0d", n_falloc, cycles, max_frames);
    for (int i = 0; i < N; i++)
      $display("node %0d: threads %0d, TPU port activity %0d%%, SU busy %0d%%, ETQ waits %0d",
               i, n_threads[i], busy_tpu[i] * 100 / cycles, busy_su[i] * 100 / cycles, n_etq_waits[i]);
    $display("NIMU moved a message in %0d%% of cycles", busy_nimu * 100 / cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
