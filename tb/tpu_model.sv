// tpu_model -- behavioural model of a Thread Processing Unit running a test program.
//
// The real TPU is a conventional RISC processor executing compiled thread
// code; it is not part of the RTL. This model stands in for it in the
// cluster test: it repeatedly takes a continuation <fp, ip> from the ATQ
// (NEXT), runs the thread whose code address is ip to completion, reading
// and writing the node's FM through its port and sending messages through
// the ETQ and STQ, exactly as compiled code would do it. Every thread of the
// test program is a case of `run_thread` below.
//
// The program (K workers, parent frame P, worker frames W[i], SM array A):
//   ip 1  P: set up P's sync slots, HALLOC A[K] (answer -> P slot 1)
//   ip 2  P: FALLOC K worker frames (answers -> P slot 2), ILOAD from a
//            remote cluster's SM (answer -> P slot 6)
//   ip 3  P: ILOAD A[i] for all i (answers -> P slot 3), then START each
//            W[i] three times with i, A and P (slot 0 of W[i] counts 3)
//   ip 4  W: v = i*i + 3; ISTORE A[i] = v, signal -> W slot 1
//   ip 6  W: STARTr v to P slot 4, signal back -> W slot 2
//   ip 8  W: FDEALLOC W
//   ip 5  P: sum of the A[i] read back; STARTl into P slot 5
//   ip 7  P: sum of the values sent by STARTr; STARTl into P slot 5
//   ip 11 P: the remote value; STARTl into P slot 5
//   ip 9  P: HOST_OUT1 {sum1, sum2, remote}; STARTd <P, 10> through the STQ
//   ip 10 P: HDEALLOC A, FDEALLOC P, HOST_OUT2 {1, ...}
//   ip 12 S: sink frame: slots 1-4 count 250, HOST_OUT2 {2, its address},
//            then NREMOTE ISTOREr to a remote cluster's SM (enough to fill
//            the ETQ while the network holds them back)
//   ip 20-22, 24-26: the recursive Fibonacci program (see below)
//   ip 40-43, 50-52, 60-62: matrix multiplication (see below)
//   ip 70-73, 80-81: Livermore loop 1 (see below)
// Slot 0 of a new frame is set by FALLOC / M_FALLOC; a thread sets the
// other slots of its own frame with FM stores before anything can reach them.
module tpu_model
  import davrid_pkg::*;
#(
  parameter int unsigned FM_AW = FBA_W,
  parameter int          K     = 6,
  parameter int          FIB_N = 15,
  parameter int          NREMOTE = 2 * K + 8,
  parameter int          MAT_N = 20,
  parameter int          LLL_N = 1001,
  parameter int          LLL_U = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  output logic                 atq_pop,
  input  cont_t                atq_rdata,
  input  logic                 atq_empty,
  output logic                 stq_push,
  output stq_t                 stq_wdata,
  input  logic                 stq_full,
  output logic                 etq_push,
  output msg_t                 etq_wdata,
  input  logic                 etq_ready,
  output logic                 fm_en,
  output logic                 fm_we,
  output logic [FM_AW-1:0]     fm_addr,
  output logic [WORD_W-1:0]    fm_wdata,
  input  logic [WORD_W-1:0]    fm_rdata,
  // statistics for the test
  output int                   n_threads,
  output int                   n_etq_waits,
  output int                   n_stq_sync,
  output int                   n_stq_cont,
  output int                   n_unknown
);
  localparam int FRAME_WORDS = 128;
  logic [CLUSTER_W-1:0] cid;
  assign cid = node_id[NODE_W-1 -: CLUSTER_W];

  initial begin
    atq_pop = 0; stq_push = 0; etq_push = 0; fm_en = 0; fm_we = 0;
    fm_addr = '0; fm_wdata = '0; stq_wdata = '0; etq_wdata = '0;
    n_threads = 0; n_etq_waits = 0; n_stq_sync = 0; n_stq_cont = 0; n_unknown = 0;
  end

  task automatic st(logic [FBA_W-1:0] fp, int disp, logic [31:0] v);
    fm_en = 1; fm_we = 1; fm_addr = FM_AW'(fp) + FM_AW'(disp); fm_wdata = v;
    @(posedge clk); #1 fm_en = 0; fm_we = 0;
  endtask

  task automatic ld(logic [FBA_W-1:0] fp, int disp, output logic [31:0] v);
    fm_en = 1; fm_we = 0; fm_addr = FM_AW'(fp) + FM_AW'(disp);
    @(posedge clk); #1 fm_en = 0; v = fm_rdata;
  endtask

  task automatic send(msg_t m);
    etq_push = 1; etq_wdata = m;
    #0;
    while (!etq_ready) begin n_etq_waits++; @(posedge clk); #1; end
    @(posedge clk); #1 etq_push = 0;
  endtask

  task automatic token(stq_kind_e k, logic [FBA_W-1:0] fp, int arg);
    stq_push = 1; stq_wdata = '{kind: k, fp: fp, arg: IP_W'(arg)};
    while (stq_full) begin @(posedge clk); #1; end
    @(posedge clk); #1 stq_push = 0;
    if (k == STQ_SYNC) n_stq_sync++; else n_stq_cont++;
  endtask

  function automatic logic [31:0] me(logic [FBA_W-1:0] fp);
    return {node_id, fp};
  endfunction

  function automatic msg_t smmsg(mt_e mt, logic [CLUSTER_W-1:0] c, logic [FBA_W-1:0] a,
                                 int off, int disp, logic [31:0] w0, logic [31:0] w1);
    msg_t m = '0;
    m.hdr.node = {c, 2'b00}; m.hdr.fba = a; m.hdr.mt = mt; m.hdr.s = 4'd2;
    m.hdr.off = OFF_W'(off); m.hdr.disp = DISP_W'(disp); m.w[0] = w0; m.w[1] = w1;
    return m;
  endfunction

  function automatic logic [31:0] slot(int sc, int ip);
    return {SC_W'(sc), IP_W'(ip)};
  endfunction

  localparam int FIB_FRAME = 16;

  function automatic msg_t falloc(logic [FBA_W-1:0] fp, int off, int disp, int size,
                                  logic [31:0] first_slot);
    msg_t m = '0;
    m.hdr.node = node_id; m.hdr.fba = fp; m.hdr.mt = MT_FALLOC; m.hdr.s = 4'd2;
    m.hdr.off = OFF_W'(off); m.hdr.disp = DISP_W'(disp);
    m.w[0] = 32'(size); m.w[1] = first_slot;
    return m;
  endfunction

  function automatic msg_t dealloc(logic [FBA_W-1:0] fp, int size);
    msg_t m = '0;
    m.hdr.node = node_id; m.hdr.fba = fp; m.hdr.mt = MT_FDEALLOC; m.hdr.s = 4'd1;
    m.w[0] = 32'(size);
    return m;
  endfunction

  // matrix contents
  function automatic logic [31:0] mat_a(int n);
    return 32'(n % 7 + 1);
  endfunction

  function automatic logic [31:0] mat_b(int n);
    return 32'(n % 5 + 2);
  endfunction

  // one inner-loop step of element frame fp: read A[i][k] and B[k][j]
  task automatic mat_step(logic [FBA_W-1:0] fp, logic [31:0] k);
    logic [31:0] i, j, a, b;
    ld(fp, 5, i); ld(fp, 6, j); ld(fp, 7, a); ld(fp, 8, b);
    st(fp, 1, slot(2, 61));
    send(smmsg(MT_ILOAD, a[31:22], a[FBA_W-1:0] + FBA_W'(i * MAT_N + k), 1, 13, me(fp), '0));
    send(smmsg(MT_ILOAD, b[31:22], b[FBA_W-1:0] + FBA_W'(k * MAT_N + j), 1, 14, me(fp), '0));
  endtask

  // Livermore loop 1 data and constants
  localparam logic [31:0] LLL_Q = 5, LLL_R = 3, LLL_T = 2;

  function automatic logic [31:0] lll_y(int k);
    return 32'(k % 13 + 1);
  endfunction

  function automatic logic [31:0] lll_z(int k);
    return 32'(k % 17 + 3);
  endfunction

  // one iteration of a loop frame: read y[k], z[k+10], z[k+11]
  task automatic lll_step(logic [FBA_W-1:0] fp, logic [31:0] k);
    logic [31:0] y, z;
    ld(fp, 8, y); ld(fp, 9, z);
    st(fp, 1, slot(3, 81));
    send(smmsg(MT_ILOAD, y[31:22], y[FBA_W-1:0] + FBA_W'(k), 1, 13, me(fp), '0));
    send(smmsg(MT_ILOAD, z[31:22], z[FBA_W-1:0] + FBA_W'(k + 10), 1, 14, me(fp), '0));
    send(smmsg(MT_ILOAD, z[31:22], z[FBA_W-1:0] + FBA_W'(k + 11), 1, 15, me(fp), '0));
  endtask

  task automatic run_thread(logic [FBA_W-1:0] fp, logic [IP_W-1:0] ip);
    logic [31:0] a, b, c, sum;
    msg_t m;
    case (int'(ip))
      1: begin
        st(fp, 1, slot(1, 2));
        st(fp, 2, slot(K, 3));
        st(fp, 3, slot(K, 5));
        st(fp, 4, slot(K, 7));
        st(fp, 5, slot(3, 9));
        st(fp, 6, slot(1, 11));
        send(smmsg(MT_HALLOC, cid, '0, 1, 10, me(fp), K));
      end
      2: begin
        for (int i = 0; i < K; i++) begin
          m = '0; m.hdr.node = node_id; m.hdr.fba = fp; m.hdr.mt = MT_FALLOC; m.hdr.s = 4'd2;
          m.hdr.off = 2; m.hdr.disp = DISP_W'(20 + i);
          m.w[0] = FRAME_WORDS; m.w[1] = slot(3, 4);
          send(m);
        end
        send(smmsg(MT_ILOAD, cid + 1'b1, 20'h00000, 6, 90, me(fp), '0));
      end
      3: begin
        ld(fp, 10, a);
        for (int i = 0; i < K; i++)
          send(smmsg(MT_ILOAD, cid, a[FBA_W-1:0] + FBA_W'(i), 3, 40 + i, me(fp), '0));
        for (int i = 0; i < K; i++) begin
          ld(fp, 20 + i, b);
          send(mk_start(MT_START, b[31:20], b[19:0], 0, 5, 32'(i)));
          send(mk_start(MT_STARTNV, b[31:20], b[19:0], 0, 6, a));
          send(mk_start(MT_START, b[31:20], b[19:0], 0, 7, me(fp)));
        end
      end
      4: begin
        ld(fp, 5, a);            // i
        ld(fp, 6, b);            // A
        st(fp, 1, slot(1, 6));
        st(fp, 2, slot(1, 8));
        c = a * a + 3;
        st(fp, 8, c);
        send(smmsg(MT_ISTORE, b[31:22], b[FBA_W-1:0] + a[FBA_W-1:0], 1, 0, me(fp), c));
      end
      6: begin
        ld(fp, 5, a);
        ld(fp, 7, b);            // P
        ld(fp, 8, c);
        m = mk_start(MT_STARTR, b[31:20], b[19:0], 4, 60 + int'(a), c);
        m.w[1] = me(fp); m.w[2] = 32'd2; m.hdr.s = 4'd3;
        send(m);
      end
      8: begin
        m = '0; m.hdr.node = node_id; m.hdr.fba = fp; m.hdr.mt = MT_FDEALLOC; m.hdr.s = 4'd1;
        m.w[0] = FRAME_WORDS;
        send(m);
      end
      5: begin
        sum = 0;
        for (int i = 0; i < K; i++) begin ld(fp, 40 + i, a); sum += a; end
        st(fp, 80, sum);
        token(STQ_SYNC, fp, 5);
      end
      7: begin
        sum = 0;
        for (int i = 0; i < K; i++) begin ld(fp, 60 + i, a); sum += a; end
        st(fp, 81, sum);
        token(STQ_SYNC, fp, 5);
      end
      11: begin
        ld(fp, 90, a);
        st(fp, 82, a);
        token(STQ_SYNC, fp, 5);
      end
      9: begin
        ld(fp, 80, a); ld(fp, 81, b); ld(fp, 82, c);
        m = '0; m.hdr.mt = MT_HOST_OUT1; m.hdr.s = 4'd3; m.w[0] = a; m.w[1] = b; m.w[2] = c;
        send(m);
        token(STQ_CONT, fp, 10);
      end
      10: begin
        ld(fp, 10, a);
        send(smmsg(MT_HDEALLOC, a[31:22], a[FBA_W-1:0], 0, 0, '0, '0));
        m = '0; m.hdr.node = node_id; m.hdr.fba = fp; m.hdr.mt = MT_FDEALLOC; m.hdr.s = 4'd1;
        m.w[0] = FRAME_WORDS;
        send(m);
        m = '0; m.hdr.mt = MT_HOST_OUT2; m.hdr.s = 4'd2; m.w[0] = 1; m.w[1] = me(fp);
        send(m);
      end
      12: begin
        for (int i = 1; i <= 4; i++) st(fp, i, slot(250, 13));
        m = '0; m.hdr.mt = MT_HOST_OUT2; m.hdr.s = 4'd2; m.w[0] = 2; m.w[1] = me(fp);
        send(m);
        for (int i = 0; i < NREMOTE; i++)
          send(smmsg(MT_ISTORER, cid + 1'b1, FBA_W'(i), 0, 0, '0, 32'(i)));
      end
      // ---- recursive Fibonacci: frame F of one call fib(n)
      //   disp 5 n, 6 return frame {NODE,FBA}, 7 return slot {off, disp},
      //   10/11 child frames, 12/13 child results
      20: begin
        ld(fp, 5, a); ld(fp, 6, b); ld(fp, 7, c);
        if (a < 2) begin
          send(mk_start(MT_START, b[31:20], b[19:0], c[19:10], c[9:0], a));
          send(dealloc(fp, FIB_FRAME));
        end else begin
          st(fp, 1, slot(2, 21));
          st(fp, 2, slot(2, 22));
          for (int i = 0; i < 2; i++) send(falloc(fp, 1, 10 + i, FIB_FRAME, slot(3, 20)));
        end
      end
      21: begin
        ld(fp, 5, a);
        for (int i = 0; i < 2; i++) begin
          ld(fp, 10 + i, b);
          send(mk_start(MT_START, b[31:20], b[19:0], 0, 5, a - 1 - 32'(i)));
          send(mk_start(MT_STARTNV, b[31:20], b[19:0], 0, 6, me(fp)));
          send(mk_start(MT_START, b[31:20], b[19:0], 0, 7, {12'd0, 10'd2, 10'(12 + i)}));
        end
      end
      22: begin
        ld(fp, 12, a); ld(fp, 13, sum); ld(fp, 6, b); ld(fp, 7, c);
        send(mk_start(MT_START, b[31:20], b[19:0], c[19:10], c[9:0], a + sum));
        send(dealloc(fp, FIB_FRAME));
      end
      // main of the Fibonacci program, started by M_FALLOC
      24: begin
        st(fp, 1, slot(1, 25));
        st(fp, 2, slot(1, 26));
        send(falloc(fp, 1, 10, FIB_FRAME, slot(3, 20)));
      end
      25: begin
        ld(fp, 10, b);
        send(mk_start(MT_START, b[31:20], b[19:0], 0, 5, FIB_N));
        send(mk_start(MT_START, b[31:20], b[19:0], 0, 6, me(fp)));
        send(mk_start(MT_START, b[31:20], b[19:0], 0, 7, {12'd0, 10'd2, 10'd12}));
      end
      26: begin
        ld(fp, 12, a);
        m = '0; m.hdr.mt = MT_HOST_OUT1; m.hdr.s = 4'd2; m.w[0] = 3; m.w[1] = a;
        send(m);
        send(dealloc(fp, FIB_FRAME));
      end
      // ---- matrix multiplication C = A x B, MAT_N x MAT_N, arrays in the SM.
      // Both outer loops are unfolded (one row frame per i, one element frame
      // per (i, j)); the inner loop over k is sequential inside the element.
      // main frame M: disp 10/11/12 A, B, C; disp 20.. row frames
      40: begin
        st(fp, 1, slot(3, 41));
        for (int i = 0; i < 3; i++) send(smmsg(MT_HALLOC, cid, '0, 1, 10 + i, me(fp), MAT_N * MAT_N));
      end
      41: begin
        ld(fp, 10, a); ld(fp, 11, b);
        for (int n = 0; n < MAT_N * MAT_N; n++) begin
          send(smmsg(MT_ISTORER, a[31:22], a[FBA_W-1:0] + FBA_W'(n), 0, 0, '0, mat_a(n)));
          send(smmsg(MT_ISTORER, b[31:22], b[FBA_W-1:0] + FBA_W'(n), 0, 0, '0, mat_b(n)));
        end
        st(fp, 2, slot(MAT_N, 42));
        for (int i = 0; i < MAT_N; i++) send(falloc(fp, 2, 20 + i, 64, slot(5, 50)));
      end
      42: begin
        ld(fp, 10, a); ld(fp, 11, b); ld(fp, 12, c);
        st(fp, 3, slot(MAT_N, 43));
        for (int i = 0; i < MAT_N; i++) begin
          ld(fp, 20 + i, sum);
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 5, 32'(i)));
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 6, me(fp)));
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 7, a));
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 8, b));
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 9, c));
        end
      end
      43: begin
        ld(fp, 10, a); ld(fp, 11, b); ld(fp, 12, c);
        m = '0; m.hdr.mt = MT_HOST_OUT1; m.hdr.s = 4'd2; m.w[0] = 4; m.w[1] = c;
        send(m);
        send(smmsg(MT_HDEALLOC, a[31:22], a[FBA_W-1:0], 0, 0, '0, '0));
        send(smmsg(MT_HDEALLOC, b[31:22], b[FBA_W-1:0], 0, 0, '0, '0));
        send(smmsg(MT_HDEALLOC, c[31:22], c[FBA_W-1:0], 0, 0, '0, '0));
        send(dealloc(fp, 64));
      end
      // row frame R: disp 5 i, 6 main, 7 A, 8 B, 9 C; disp 20.. element frames
      50: begin
        st(fp, 1, slot(MAT_N, 51));
        for (int j = 0; j < MAT_N; j++) send(falloc(fp, 1, 20 + j, 32, slot(6, 60)));
      end
      51: begin
        st(fp, 2, slot(MAT_N, 52));
        for (int j = 0; j < MAT_N; j++) begin
          ld(fp, 20 + j, sum);
          for (int d = 5; d <= 9; d++) begin
            if (d == 6) c = 32'(j);
            else ld(fp, d, c);
            send(mk_start(MT_START, sum[31:20], sum[19:0], 0, DISP_W'(d), c));
          end
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 10, me(fp)));
        end
      end
      52: begin
        ld(fp, 6, a);
        send(mk_start(MT_STARTN, a[31:20], a[19:0], 3, 0, '0));
        send(dealloc(fp, 64));
      end
      // element frame E: disp 5 i, 6 j, 7 A, 8 B, 9 C, 10 row frame,
      // 11 running sum, 12 k, 13/14 the two operands read from the SM
      60: begin
        st(fp, 11, '0); st(fp, 12, '0);
        mat_step(fp, 0);
      end
      61: begin
        ld(fp, 13, a); ld(fp, 14, b); ld(fp, 11, sum); ld(fp, 12, c);
        sum += a * b;
        c += 1;
        st(fp, 11, sum); st(fp, 12, c);
        if (c < MAT_N) mat_step(fp, c);
        else begin
          ld(fp, 5, a); ld(fp, 6, b); ld(fp, 9, c);
          st(fp, 2, slot(1, 62));
          send(smmsg(MT_ISTORE, c[31:22], c[FBA_W-1:0] + FBA_W'(a * MAT_N + b), 2, 0, me(fp), sum));
        end
      end
      62: begin
        ld(fp, 10, a);
        send(mk_start(MT_STARTN, a[31:20], a[19:0], 2, 0, '0));
        send(dealloc(fp, 32));
      end
      // ---- Livermore loop 1: x[k] = Q + y[k] * (R * z[k+10] + T * z[k+11]),
      // k < LLL_N, in integers. The loop is unfolded LLL_U times: loop frame u
      // runs k = u, u + LLL_U, ... sequentially.
      // main frame L: disp 10/11/12 x, y, z; disp 20.. loop frames
      70: begin
        st(fp, 1, slot(3, 71));
        send(smmsg(MT_HALLOC, cid, '0, 1, 10, me(fp), LLL_N));
        send(smmsg(MT_HALLOC, cid, '0, 1, 11, me(fp), LLL_N));
        send(smmsg(MT_HALLOC, cid, '0, 1, 12, me(fp), LLL_N + 11));
      end
      71: begin
        ld(fp, 11, a); ld(fp, 12, b);
        for (int k = 0; k < LLL_N + 11; k++) begin
          if (k < LLL_N) send(smmsg(MT_ISTORER, a[31:22], a[FBA_W-1:0] + FBA_W'(k), 0, 0, '0, lll_y(k)));
          send(smmsg(MT_ISTORER, b[31:22], b[FBA_W-1:0] + FBA_W'(k), 0, 0, '0, lll_z(k)));
        end
        st(fp, 2, slot(LLL_U, 72));
        for (int u = 0; u < LLL_U; u++) send(falloc(fp, 2, 20 + u, 32, slot(5, 80)));
      end
      72: begin
        st(fp, 3, slot(LLL_U, 73));
        for (int u = 0; u < LLL_U; u++) begin
          ld(fp, 20 + u, sum);
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 5, 32'(u)));
          send(mk_start(MT_START, sum[31:20], sum[19:0], 0, 6, me(fp)));
          for (int d = 7; d <= 9; d++) begin
            ld(fp, d + 3, c);
            send(mk_start(MT_START, sum[31:20], sum[19:0], 0, DISP_W'(d), c));
          end
        end
      end
      73: begin
        ld(fp, 10, a);
        m = '0; m.hdr.mt = MT_HOST_OUT1; m.hdr.s = 4'd2; m.w[0] = 5; m.w[1] = a;
        send(m);
        for (int d = 10; d <= 12; d++) begin
          ld(fp, d, a);
          send(smmsg(MT_HDEALLOC, a[31:22], a[FBA_W-1:0], 0, 0, '0, '0));
        end
        send(dealloc(fp, 32));
      end
      // loop frame: disp 5 u, 6 main, 7 x, 8 y, 9 z, 11 k, 13-15 y[k], z[k+10], z[k+11]
      80: begin
        ld(fp, 5, a);
        st(fp, 11, a);
        lll_step(fp, a);
      end
      81: begin
        ld(fp, 13, a); ld(fp, 14, b); ld(fp, 15, c); ld(fp, 11, sum);
        c = LLL_Q + a * (LLL_R * b + LLL_T * c);
        ld(fp, 7, a);
        send(smmsg(MT_ISTORER, a[31:22], a[FBA_W-1:0] + FBA_W'(sum), 0, 0, '0, c));
        sum += LLL_U;
        if (sum < LLL_N) begin
          st(fp, 11, sum);
          lll_step(fp, sum);
        end else begin
          ld(fp, 6, a);
          send(mk_start(MT_STARTN, a[31:20], a[19:0], 3, 0, '0));
          send(dealloc(fp, 32));
        end
      end
      default: n_unknown++;
    endcase
  endtask

  initial begin
    cont_t c;
    @(posedge rst_n);
    forever begin
      @(posedge clk); #1;
      if (!atq_empty) begin
        c = atq_rdata;
        atq_pop = 1;
        @(posedge clk); #1 atq_pop = 0;
        n_threads++;
        run_thread(c.fp, c.ip);
      end
    end
  end
endmodule
