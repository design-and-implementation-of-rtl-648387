// tb_workload_lll1 -- Livermore loop 1 on one default-size cluster.
//
// Four tpu_model instances run the first Livermore loop,
// x[k] = Q + y[k] * (R * z[k+10] + T * z[k+11]) for k < 1001 (the standard
// loop length; integers instead of floating point), with x, y and z as
// I-structure arrays in the Structured Memory. The main thread allocates the
// arrays, fills y and z with ISTOREr, and unfolds the loop into 16 loop frames
// spread over the nodes; loop frame u runs k = u, u+16, ... one iteration per
// thread: three ILOADs whose answers re-activate it, one ISTOREr of x[k].
//
// Checked: every x[k] in the SM against the loop computed here, the number
// of ILOADs (3 per iteration), that all nodes got frames, that all frames and
// SM blocks are freed, and no error flag. Printed: cycles and how busy each
// unit was.
module tb_workload_lll1;
  import davrid_pkg::*;
  localparam int N = 4;
  localparam int LLL_N = 1001;
  localparam int LLL_U = 16;
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
    tpu_model #(.FM_AW(FBA_W), .LLL_N(LLL_N), .LLL_U(LLL_U)) u_tpu (
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

  function automatic logic [31:0] lll_x(int k);
    logic [31:0] y, z1, z2;
    y = 32'(k % 13 + 1); z1 = 32'((k + 10) % 17 + 3); z2 = 32'((k + 11) % 17 + 3);
    return 32'd5 + y * (32'd3 * z1 + 32'd2 * z2);
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
  int n_answers = 0, n_iload = 0, busy_sm = 0, n_falloc = 0, n_net_out = 0, max_frames = 0, cycles = 0, busy_nimu = 0;
  int busy_su [N], busy_tpu [N], first_frame [N];
  always @(posedge clk) if (rst_n) begin
    int f;
    f = 0;
    cycles++;
    if (host_valid) host_got.push_back(host_data);
    if (net_out_valid) n_net_out++;
    for (int i = 0; i < N; i++) begin
      if (dut.itq_push[i] && dut.itq_wdata.hdr.mt == MT_FALLOC) n_falloc++;
      if (dut.itq_push[i] && dut.itq_wdata.hdr.mt == MT_START && dut.itq_wdata.hdr.off == 1 &&
          dut.itq_wdata.hdr.disp inside {10'd13, 10'd14, 10'd15}) n_answers++;
      if (su_busy[i]) busy_su[i]++;
      if (tpu_fm_en[i] || tpu_etq_push[i] || tpu_stq_push[i]) busy_tpu[i]++;
      if (frames_in_use[i] != 0) first_frame[i] = 1;
      f += int'(frames_in_use[i]);
    end
    if (dut.u_nimu.u_router.sel_valid) busy_nimu++;
    if (sm_busy) busy_sm++;
    if (dut.u_nimu.sm_push && dut.u_nimu.sm_wdata.hdr.mt == MT_ILOAD) n_iload++;
    if (f > max_frames) max_frames = f;
  end

  initial begin
    for (int i = 0; i < N; i++) begin busy_su[i] = 0; busy_tpu[i] = 0; first_frame[i] = 0; end
    start_msg = '0;
    start_msg.hdr.node = {CID, 2'b00}; start_msg.hdr.mt = MT_M_FALLOC; start_msg.hdr.s = 4'd2;
    start_msg.w[0] = 32; start_msg.w[1] = {8'd1, 24'd70};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    started = 1'b1;
    while (host_got.size() == 0 && cycles < 900000) @(posedge clk);
    repeat (100) @(posedge clk);
    #1;
    check(host_got.size() == 1, "one result");
    if (host_got.size() >= 1) begin
      int bad = 0;
      logic [31:0] c;
      c = host_got[0].w[1];
      check(host_got[0].hdr.mt == MT_HOST_OUT1 && host_got[0].w[0] == 5, "result message");
      for (int k = 0; k < LLL_N; k++)
        if (dut.u_nimu.u_sm.sm_data[c[FBA_W-1:0] + FBA_W'(k)] != lll_x(k)) bad++;
      check(bad == 0, "every element of x");
      $display("x elements wrong: %0d of %0d", bad, LLL_N);
    end
    check(n_iload == 3 * LLL_N, "three ILOADs per iteration");
    check(n_answers == n_iload, "every ILOAD answered");
    check(n_falloc == LLL_U, "one frame per unfolded loop body");
    check(dut.u_nimu.u_sm.blk_in_use == 0, "SM blocks freed");
    for (int i = 0; i < N; i++) check(first_frame[i] == 1, "every node got frames");
    for (int i = 0; i < N; i++) check(frames_in_use[i] == 0, "every frame freed");
    for (int i = 0; i < N; i++) check(load[i] == 0, "load table back to zero");
    for (int i = 0; i < N; i++) check(n_unknown[i] == 0, "no unknown thread");
    check(n_net_out == 0, "nothing left the cluster");
    check(!err_su_alloc && !err_su_msg && !err_istore && !err_sm_alloc && !err_defer && !err_sm_msg,
          "no error flag");
    $display("loop frames %0d, ILOADs %0d, cycles %0d, most frames held at once %0d", n_falloc, n_iload, cycles, max_frames);
    for (int i = 0; i < N; i++)
      $display("node %0d: threads %0d, TPU port activity %0d%%, SU busy %0d%%, ETQ waits %0d",
               i, n_threads[i], busy_tpu[i] * 100 / cycles, busy_su[i] * 100 / cycles, n_etq_waits[i]);
    $display("NIMU moved a message in %0d%% of cycles; SM handler busy %0d%%", busy_nimu * 100 / cycles,
             busy_sm * 100 / cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
